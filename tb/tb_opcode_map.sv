// tb_opcode_map: exhaustive check of the opcode mapping logic.
//
// Drives all 16 opcodes with the zero flag at 0 and at 1 and compares the
// routine start address with a table written out here by hand:
// 0001 -> 20, 1010 with Z=1 -> 30, everything else -> 16.
module tb_opcode_map;
  import mcu_pkg::*;

  opcode_t opcode;
  logic    z_flag;
  uaddr_t  target;

  int checks = 0;
  int failures = 0;

  opcode_map dut (.opcode(opcode), .z_flag(z_flag), .target(target));

  function automatic int expected(int op, int z);
    if (op == 1) return 20;
    if (op == 10 && z == 1) return 30;
    return 16;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 16; op++) begin
      for (int z = 0; z < 2; z++) begin
        opcode = op[3:0];
        z_flag = z[0];
        #1;
        checks++;
        if (int'(target) != expected(op, z)) begin
          failures++;
          $display("FAIL opcode=%b z=%0d target=%0d expected=%0d", opcode, z, target,
                   expected(op, z));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
