// opcode_map: the decode ("mapping ROM") logic of the micro-sequencer.
//
// Combinational. It turns the 4-bit opcode held in the IR, together with the
// zero flag, into the micro-address where that instruction's routine starts:
//   LOAD_ACC     (0001)          -> uAddr 20
//   JUMP_IF_ZERO (1010), Z = 1   -> uAddr 30 (JUMP routine)
//   JUMP_IF_ZERO (1010), Z = 0   -> uAddr 16 (NOP routine: only PC + 1)
//   any other opcode              -> uAddr 16 (treated as a NOP)
// The conditional branch is made here, by choosing between two routines,
// rather than by a conditional micro-instruction. All of this follows the
// reference design. The output is used only while the current
// micro-instruction carries SEQ_DECODE. With the present routine addresses
// (16, 20, 30) bits 7:5 of target are always 0 and bit 4 always 1; they are
// kept so that routines can be placed anywhere in the 256-word store.
module opcode_map
  import mcu_pkg::*;
(
  input  opcode_t opcode,
  input  logic    z_flag,
  output uaddr_t  target
);

  always_comb begin
    unique case (opcode)
      OP_LOAD_ACC:     target = UADDR_LOAD_ACC;
      OP_JUMP_IF_ZERO: target = z_flag ? UADDR_JMP : UADDR_NOP;
      default:         target = UADDR_NOP;
    endcase
  end

endmodule
