// micro_cu: a microprogrammed control unit for a small single-bus CPU.
//
// Each machine instruction is carried out by a micro-routine held in the
// control store. The micro-program counter (upc) addresses the store; the
// word read there drives the ten datapath control lines directly and its
// sequencing field tells the micro-sequencer where to go next. Every
// instruction starts with the two-step fetch routine at uAddr 0-1; its last
// step decodes: the opcode from the IR and the zero flag are mapped to the
// start of the instruction's routine, whose last step returns to uAddr 0.
//
//   LOAD_ACC (0001):      0 -> 1 -> 20 -> 21 -> 0     (4 cycles)
//   JUMP_IF_ZERO, Z = 1:  0 -> 1 -> 30 -> 0           (3 cycles)
//   JUMP_IF_ZERO, Z = 0:  0 -> 1 -> 16 -> 0           (3 cycles, NOP)
//   other opcodes:        0 -> 1 -> 16 -> 0           (3 cycles, NOP)
//
// Timing: one micro-instruction per clock. The control outputs are
// combinational from upc and valid for the whole cycle; the datapath acts on
// them at the next rising edge. The decode happens in the same cycle as the
// IR load (uAddr 1 carries both IR_IN and SEQ_DECODE), so opcode_in and
// z_flag are sampled at the end of that cycle: the datapath must present the
// opcode of the instruction being loaded, e.g. by forwarding the bus to
// opcode_in while IR_IN is high.
// rst is synchronous and active high and returns upc to uAddr 0.
//
// The structure, the ports, the encoding and the micro-program follow the
// reference design. The upc output and the bus-driver assertion are this
// implementation's additions.
module micro_cu
  import mcu_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  // From the datapath
  input  opcode_t opcode_in,
  input  logic    z_flag,
  // To the datapath
  output logic    pc_out,
  output logic    pc_inc,
  output logic    mar_in,
  output logic    ram_out,
  output logic    ram_in,
  output logic    ir_in,
  output logic    acc_in,
  output logic    acc_out,
  output logic    temp_in,
  output logic    alu_out,
  // Observation
  output uaddr_t  upc
);

  uinstr_t uir;       // current micro-instruction
  uaddr_t  map_addr;  // routine start from opcode and flag

  micro_sequencer u_seq (
    .clk      (clk),
    .rst      (rst),
    .seq      (uir.seq),
    .map_addr (map_addr),
    .upc      (upc)
  );

  control_store #(.DEPTH(2 ** UADDR_BITS)) u_store (
    .addr  (upc),
    .rdata (uir)
  );

  opcode_map u_map (
    .opcode (opcode_in),
    .z_flag (z_flag),
    .target (map_addr)
  );

  assign pc_out  = uir.ctrl.pc_out;
  assign pc_inc  = uir.ctrl.pc_inc;
  assign mar_in  = uir.ctrl.mar_in;
  assign ram_out = uir.ctrl.ram_out;
  assign ram_in  = uir.ctrl.ram_in;
  assign ir_in   = uir.ctrl.ir_in;
  assign acc_in  = uir.ctrl.acc_in;
  assign acc_out = uir.ctrl.acc_out;
  assign temp_in = uir.ctrl.temp_in;
  assign alu_out = uir.ctrl.alu_out;

  // At most one source drives the shared bus in any micro-instruction.
  always_ff @(posedge clk) begin
    if (!rst)
      assert ($onehot0({uir.ctrl.pc_out, uir.ctrl.ram_out,
                        uir.ctrl.acc_out, uir.ctrl.alu_out}))
        else $error("micro_cu: several bus drivers at uAddr %0d", upc);
  end

endmodule
