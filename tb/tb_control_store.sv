// tb_control_store: reads every word of the micro-program ROM.
//
// The expected contents are written out here as 12-bit literals,
// {seq[1:0], PC_OUT, PC_INC, MAR_IN, RAM_OUT, RAM_IN, IR_IN, ACC_IN,
// ACC_OUT, TEMP_IN, ALU_OUT}: six programmed words and zero elsewhere.
module tb_control_store;
  import mcu_pkg::*;

  logic [7:0] addr;
  uinstr_t    rdata;

  int checks = 0;
  int failures = 0;

  control_store dut (.addr(addr), .rdata(rdata));

  function automatic logic [11:0] expected(int a);
    case (a)
      0:       return 12'b00_1010000000;  // PC_OUT, MAR_IN; next
      1:       return 12'b01_0001010000;  // RAM_OUT, IR_IN; decode
      16:      return 12'b10_0100000000;  // PC_INC; fetch
      20:      return 12'b00_0010000000;  // MAR_IN; next
      21:      return 12'b10_0101001000;  // PC_INC, RAM_OUT, ACC_IN; fetch
      30:      return 12'b10_0000000000;  // fetch
      default: return 12'b00_0000000000;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = a[7:0];
      #1;
      checks++;
      if (rdata !== expected(a)) begin
        failures++;
        $display("FAIL addr=%0d rdata=%b expected=%b", a, rdata, expected(a));
      end
    end
    // Field view: the struct must split the word as documented.
    addr = 8'd21;
    #1;
    checks++;
    if (rdata.seq != SEQ_FETCH || !rdata.ctrl.pc_inc || !rdata.ctrl.ram_out ||
        !rdata.ctrl.acc_in || rdata.ctrl.pc_out || rdata.ctrl.mar_in) begin
      failures++;
      $display("FAIL field view of uAddr 21: %p", rdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
