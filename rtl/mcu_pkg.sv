// mcu_pkg: types and constants shared by the microprogrammed control unit.
//
// A micro-instruction is 12 bits: a 2-bit sequencing field in bits [11:10]
// and ten control bits in [9:0]. The control bits are, from bit 9 down to
// bit 0: PC_OUT, PC_INC, MAR_IN, RAM_OUT, RAM_IN, IR_IN, ACC_IN, ACC_OUT,
// TEMP_IN, ALU_OUT. The packed struct ctrl_t keeps exactly that order, so a
// micro-instruction can be viewed either as a 12-bit word or as named fields.
//
// The field order, the sequencing codes (NEXT=00, DECODE=01, FETCH=10,
// HLT=11), the opcodes LOAD_ACC=0001 and JUMP_IF_ZERO=1010, the routine
// addresses (fetch at 0, LOAD_ACC at 20, NOP at 16, JUMP at 30) and the
// control words of each micro-step follow the reference design. Grouping
// them into one package is this implementation's choice.
package mcu_pkg;

  localparam int unsigned SEQ_BITS    = 2;
  localparam int unsigned CTRL_BITS   = 10;
  localparam int unsigned UCODE_WIDTH = SEQ_BITS + CTRL_BITS;  // 12
  localparam int unsigned UADDR_BITS  = 8;                     // 256-word store
  localparam int unsigned OPCODE_BITS = 4;

  typedef logic [UADDR_BITS-1:0]  uaddr_t;
  typedef logic [OPCODE_BITS-1:0] opcode_t;

  // Sequencing field: how the micro-sequencer forms the next uPC.
  typedef enum logic [SEQ_BITS-1:0] {
    SEQ_NEXT   = 2'b00,  // uPC + 1
    SEQ_DECODE = 2'b01,  // jump to the routine mapped from opcode and flags
    SEQ_FETCH  = 2'b10,  // back to the fetch routine at uAddr 0
    SEQ_HLT    = 2'b11   // stay on this micro-address
  } seq_e;

  // Ten datapath control lines, MSB first as in the micro-instruction.
  typedef struct packed {
    logic pc_out;   // bit 9: PC drives the bus
    logic pc_inc;   // bit 8: PC increments
    logic mar_in;   // bit 7: MAR loads
    logic ram_out;  // bit 6: RAM drives the bus
    logic ram_in;   // bit 5: RAM writes
    logic ir_in;    // bit 4: IR loads
    logic acc_in;   // bit 3: accumulator loads
    logic acc_out;  // bit 2: accumulator drives the bus
    logic temp_in;  // bit 1: ALU operand register loads
    logic alu_out;  // bit 0: ALU result drives the bus
  } ctrl_t;

  typedef struct packed {
    seq_e  seq;   // bits [11:10]
    ctrl_t ctrl;  // bits [9:0]
  } uinstr_t;

  // Opcodes the mapping logic knows.
  localparam opcode_t OP_LOAD_ACC     = 4'b0001;
  localparam opcode_t OP_JUMP_IF_ZERO = 4'b1010;

  // Micro-routine start addresses.
  localparam uaddr_t UADDR_FETCH    = 8'd0;
  localparam uaddr_t UADDR_LOAD_ACC = 8'd20;
  localparam uaddr_t UADDR_NOP      = 8'd16;
  localparam uaddr_t UADDR_JMP      = 8'd30;

  // Control words of the micro-steps.
  localparam ctrl_t C_FETCH1 = 10'b10_1000_0000;  // PC_OUT, MAR_IN
  localparam ctrl_t C_FETCH2 = 10'b00_0101_0000;  // RAM_OUT, IR_IN
  localparam ctrl_t C_LDA1   = 10'b00_1000_0000;  // MAR_IN (address from IR)
  localparam ctrl_t C_LDA2   = 10'b01_0100_1000;  // PC_INC, RAM_OUT, ACC_IN
  localparam ctrl_t C_JUMP1  = 10'b00_0000_0000;  // PC load handled by datapath
  localparam ctrl_t C_NOP1   = 10'b01_0000_0000;  // PC_INC

  function automatic uinstr_t ucode(ctrl_t ctrl, seq_e seq);
    ucode.seq  = seq;
    ucode.ctrl = ctrl;
  endfunction

endpackage
