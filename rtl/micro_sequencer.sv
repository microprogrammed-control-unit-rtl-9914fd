// micro_sequencer: the micro-program counter and its next-address logic.
//
// upc is a register that a synchronous, active-high rst clears to uAddr 0,
// the start of the fetch routine. Each rising clock edge it takes the next
// address chosen by the sequencing field of the current micro-instruction:
//   SEQ_NEXT    upc + 1 (wraps at the top of the store)
//   SEQ_DECODE  map_addr, the routine start given by the opcode mapping
//   SEQ_FETCH   uAddr 0, to fetch the next instruction
//   SEQ_HLT     upc, so the unit stays on this micro-instruction
// seq is read combinationally from the control store at upc, so one
// micro-instruction takes one clock cycle. Both the register and the
// next-address choice follow the reference design.
module micro_sequencer
  import mcu_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  seq_e   seq,       // sequencing field of the current micro-instruction
  input  uaddr_t map_addr,  // routine start from the opcode mapping
  output uaddr_t upc       // current micro-address
);

  uaddr_t next_upc;

  always_comb begin
    unique case (seq)
      SEQ_NEXT:   next_upc = upc + 1'b1;
      SEQ_DECODE: next_upc = map_addr;
      SEQ_FETCH:  next_upc = UADDR_FETCH;
      SEQ_HLT:    next_upc = upc;
      default:    next_upc = UADDR_FETCH;  // safe state
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) upc <= UADDR_FETCH;
    else     upc <= next_upc;
  end

endmodule
