// datapath_model: behavioural model of the small single-bus CPU datapath
// that the control unit drives. Used only by testbenches.
//
// Registers: PC (4 bits), MAR (4 bits), IR (8 bits), ACC (8 bits) and a
// 16-byte RAM; an instruction is {opcode[7:4], address[3:0]}. The bus
// carries PC when PC_OUT is set, RAM[MAR] when RAM_OUT is set and ACC when
// ACC_OUT is set. On each rising edge: MAR_IN loads MAR from the bus, or
// from IR[3:0] when nothing drives the bus (the LOAD_ACC routine's first
// step); IR_IN loads IR; ACC_IN loads ACC; RAM_IN writes the bus
// into RAM[MAR]; PC_INC increments PC. The JUMP routine carries no control
// line, so the model loads PC from IR[3:0] while the control unit is at the
// JUMP routine's micro-address.
//
// opcode is the IR's opcode field, except while IR_IN is set: then it is
// the opcode on the bus, i.e. the instruction being loaded, because the
// control unit decodes in the same cycle as it loads the IR. The zero flag
// is ACC == 0. TEMP_IN and ALU_OUT have no effect: no routine uses them.
module datapath_model
  import mcu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       pc_out,
  input  logic       pc_inc,
  input  logic       mar_in,
  input  logic       ram_out,
  input  logic       ram_in,
  input  logic       ir_in,
  input  logic       acc_in,
  input  logic       acc_out,
  input  uaddr_t     upc,
  output opcode_t    opcode,
  output logic       z_flag,
  output logic [3:0] pc,
  output logic [7:0] acc
);

  logic [7:0] ram [16];
  logic [3:0] mar;
  logic [7:0] ir;
  logic [7:0] bus;
  logic       bus_driven;

  always_comb begin
    bus = 8'h00;
    if (pc_out)  bus = {4'h0, pc};
    if (ram_out) bus = ram[mar];
    if (acc_out) bus = acc;
    bus_driven = pc_out | ram_out | acc_out;
  end

  assign opcode = ir_in ? bus[7:4] : ir[7:4];
  assign z_flag = (acc == 8'h00);

  always_ff @(posedge clk) begin
    if (rst) begin
      pc  <= '0;
      mar <= '0;
      ir  <= '0;
      acc <= '0;
    end else begin
      if (mar_in) mar <= bus_driven ? bus[3:0] : ir[3:0];
      if (ir_in)  ir  <= bus;
      if (acc_in) acc <= bus;
      if (ram_in) ram[mar] <= bus;
      if (pc_inc) pc <= pc + 1'b1;
      else if (upc == UADDR_JMP) pc <= ir[3:0];
    end
  end

  // Load a program image.
  task automatic load(input logic [7:0] image [16]);
    for (int i = 0; i < 16; i++) ram[i] = image[i];
  endtask

endmodule
