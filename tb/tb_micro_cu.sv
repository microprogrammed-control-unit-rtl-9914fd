// tb_micro_cu: end-to-end test of the control unit driving a CPU datapath.
//
// The control unit runs a 10-instruction program in the behavioural
// datapath model (16-byte RAM, PC, MAR, IR, ACC). An instruction-level
// reference model, written here independently of the RTL, predicts for each
// instruction the micro-address trace (LOAD_ACC: 0,1,20,21; JUMP_IF_ZERO
// taken: 0,1,30; not taken or unknown opcode: 0,1,16), so the cycle count
// of every instruction is checked too, and the PC and ACC at its end.
// Every cycle the ten control outputs are compared with the control word
// expected at that micro-address, written out here as literals.
//
// Program: 0: LOAD [10]  (ACC = 0, Z = 1)     1: JZ 4     (taken)
//          2: LOAD [11]  (skipped)            3: opcode 0111 (skipped)
//          4: LOAD [11]  (ACC = 5C, Z = 0)    5: JZ 0     (not taken)
//          6: opcode 0111 (unknown: NOP)      7: JZ 7     (not taken)
//          8: LOAD [10]  (ACC = 0)            9: JZ 9     (taken, loops)
//          10: data 00   11: data 5C
// After 14 instructions a reset is applied in the middle of a JUMP
// routine, and the program is run again from PC 0.
//
// Counted mechanisms (each must occur): fetch, decode, LOAD_ACC routine,
// taken and not-taken conditional jump, unknown-opcode NOP, return to fetch,
// reset. The halt command exists in the sequencer but no word of the
// control store uses it, so it cannot occur here; the sequencer's own
// testbench covers it.
module tb_micro_cu;
  import mcu_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  opcode_t    opcode;
  logic       z_flag;
  logic       pc_out, pc_inc, mar_in, ram_out, ram_in, ir_in;
  logic       acc_in, acc_out, temp_in, alu_out;
  uaddr_t     upc;
  logic [3:0] pc;
  logic [7:0] acc;

  int checks = 0;
  int failures = 0;
  int n_fetch = 0, n_decode = 0, n_load = 0, n_jz_taken = 0, n_jz_not = 0;
  int n_nop = 0, n_return = 0, n_reset = 0;

  logic [7:0] image [16] = '{
    8'h1A, 8'hA4, 8'h1B, 8'h70, 8'h1B, 8'hA0, 8'h70, 8'hA7,
    8'h1A, 8'hA9, 8'h00, 8'h5C, 8'h00, 8'h00, 8'h00, 8'h00
  };

  micro_cu dut (
    .clk(clk), .rst(rst), .opcode_in(opcode), .z_flag(z_flag),
    .pc_out(pc_out), .pc_inc(pc_inc), .mar_in(mar_in), .ram_out(ram_out),
    .ram_in(ram_in), .ir_in(ir_in), .acc_in(acc_in), .acc_out(acc_out),
    .temp_in(temp_in), .alu_out(alu_out), .upc(upc)
  );

  datapath_model dp (
    .clk(clk), .rst(rst), .pc_out(pc_out), .pc_inc(pc_inc), .mar_in(mar_in),
    .ram_out(ram_out), .ram_in(ram_in), .ir_in(ir_in), .acc_in(acc_in),
    .acc_out(acc_out), .upc(upc), .opcode(opcode), .z_flag(z_flag),
    .pc(pc), .acc(acc)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected control lines {PC_OUT .. ALU_OUT} at a micro-address.
  function automatic logic [9:0] ctrl_at(int a);
    case (a)
      0:       return 10'b1010000000;
      1:       return 10'b0001010000;
      16:      return 10'b0100000000;
      20:      return 10'b0010000000;
      21:      return 10'b0101001000;
      default: return 10'b0000000000;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (upc=%0d pc=%0d acc=%h)", what, upc, pc, acc);
    end
  endtask

  // Instruction-level reference state.
  int ref_pc, ref_acc;

  task automatic run_instruction();
    int trace [$];
    int op, addr;
    op = int'(image[ref_pc][7:4]);
    addr = int'(image[ref_pc][3:0]);
    if (op == 1) begin
      trace = '{0, 1, 20, 21};
      ref_acc = int'(image[addr]);
      ref_pc = (ref_pc + 1) % 16;
      n_load++;
    end else if (op == 10 && ref_acc == 0) begin
      trace = '{0, 1, 30};
      ref_pc = addr;
      n_jz_taken++;
    end else begin
      trace = '{0, 1, 16};
      ref_pc = (ref_pc + 1) % 16;
      if (op == 10) n_jz_not++;
      else n_nop++;
    end
    foreach (trace[k]) begin
      check(int'(upc) == trace[k], $sformatf("micro-address step %0d, expected %0d", k,
                                             trace[k]));
      check({pc_out, pc_inc, mar_in, ram_out, ram_in, ir_in, acc_in, acc_out, temp_in,
             alu_out} == ctrl_at(trace[k]), $sformatf("control lines at uAddr %0d", trace[k]));
      if (trace[k] == 0) n_fetch++;
      if (trace[k] == 1) n_decode++;
      @(posedge clk);
      #1;
    end
    n_return++;
    check(upc == 0, "back at fetch after the routine");
    check(int'(pc) == ref_pc, $sformatf("PC, expected %0d", ref_pc));
    check(int'(acc) == ref_acc, $sformatf("ACC, expected %h", ref_acc));
  endtask

  task automatic do_reset();
    rst = 1'b1;
    @(posedge clk);
    #1;
    rst = 1'b0;
    n_reset++;
    ref_pc = 0;
    ref_acc = 0;
    check(upc == 0 && pc == 0 && acc == 0, "state after reset");
  endtask

  initial begin
    dp.load(image);
    do_reset();
    repeat (14) run_instruction();
    check(ref_pc == 9 && pc == 9, "program ends in its jump-to-self loop");
    // Reset in the middle of the JUMP routine of the final loop.
    @(posedge clk);  // uAddr 1
    #1;
    @(posedge clk);  // uAddr 30
    #1;
    check(upc == 30, "inside the JUMP routine before reset");
    do_reset();
    repeat (3) run_instruction();
    check(ref_pc == 5 && pc == 5 && acc == 8'h5C, "rerun after reset");

    check(n_fetch > 0, "fetch occurred");
    check(n_decode > 0, "decode occurred");
    check(n_load > 0, "LOAD_ACC routine occurred");
    check(n_jz_taken > 0, "taken conditional jump occurred");
    check(n_jz_not > 0, "not-taken conditional jump occurred");
    check(n_nop > 0, "unknown opcode mapped to NOP occurred");
    check(n_return > 0, "return to fetch occurred");
    check(n_reset > 1, "reset during a routine occurred");
    $display("fetch=%0d decode=%0d load=%0d jz_taken=%0d jz_not_taken=%0d nop=%0d return=%0d reset=%0d",
             n_fetch, n_decode, n_load, n_jz_taken, n_jz_not, n_nop, n_return, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
