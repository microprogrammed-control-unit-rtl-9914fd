// control_store: the micro-program ROM of the control unit.
//
// DEPTH words of 12 bits, read asynchronously: rdata shows the word at addr
// in the same cycle, so the control lines follow the uPC without a cycle of
// delay (the reference design reads the store combinationally into what it
// calls the micro-instruction register). The contents are built at
// elaboration time by init_rom() and held in a constant array, which
// synthesis maps to a ROM or to logic.
//
// Contents (from the reference design):
//   uAddr  0  PC_OUT, MAR_IN              SEQ_NEXT    fetch, step 1
//   uAddr  1  RAM_OUT, IR_IN              SEQ_DECODE  fetch, step 2
//   uAddr 16  PC_INC                      SEQ_FETCH   NOP routine
//   uAddr 20  MAR_IN (address from IR)    SEQ_NEXT    LOAD_ACC, step 1
//   uAddr 21  PC_INC, RAM_OUT, ACC_IN     SEQ_FETCH   LOAD_ACC, step 2
//   uAddr 30  (no control line)           SEQ_FETCH   JUMP routine
// Every other word is zero: no control line and SEQ_NEXT.
//
// The depth of 256 words is the reference design's; it is a parameter here
// so a smaller store can be built, as long as it still covers uAddr 30.
module control_store
  import mcu_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output uinstr_t                  rdata
);

  typedef logic [UCODE_WIDTH-1:0] rom_t [DEPTH];

  function automatic rom_t init_rom();
    rom_t rom;
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = '0;
    // Fetch routine
    rom[UADDR_FETCH]        = ucode(C_FETCH1, SEQ_NEXT);
    rom[UADDR_FETCH + 1]    = ucode(C_FETCH2, SEQ_DECODE);
    // LOAD_ACC routine
    rom[UADDR_LOAD_ACC]     = ucode(C_LDA1, SEQ_NEXT);
    rom[UADDR_LOAD_ACC + 1] = ucode(C_LDA2, SEQ_FETCH);
    // Targets of the conditional branch
    rom[UADDR_NOP]          = ucode(C_NOP1, SEQ_FETCH);
    rom[UADDR_JMP]          = ucode(C_JUMP1, SEQ_FETCH);
    return rom;
  endfunction

  localparam rom_t ROM = init_rom();

  initial begin
    assert (DEPTH > 32'(UADDR_JMP))
      else $error("control_store: DEPTH %0d cannot hold uAddr %0d", DEPTH, UADDR_JMP);
  end

  assign rdata = uinstr_t'(ROM[addr]);

endmodule
