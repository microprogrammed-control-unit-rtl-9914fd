// tb_micro_sequencer: random sequencing commands against a reference model.
//
// Every cycle the testbench picks a random sequencing field and a random
// mapped address, predicts the next micro-address (NEXT: +1 modulo 256,
// DECODE: the mapped address, FETCH: 0, HLT: unchanged) and compares after
// the clock edge. Reset is asserted now and then and must return the
// counter to 0. Each command, and the wrap from 255 to 0, must be seen at
// least once.
module tb_micro_sequencer;
  import mcu_pkg::*;

  logic   clk = 1'b0;
  logic   rst;
  seq_e   seq;
  uaddr_t map_addr;
  uaddr_t upc;

  int checks = 0;
  int failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  int resets = 0;
  int wraps = 0;
  int model;

  micro_sequencer dut (.clk(clk), .rst(rst), .seq(seq), .map_addr(map_addr), .upc(upc));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    seq = SEQ_NEXT;
    map_addr = '0;
    @(posedge clk);
    #1;
    rst = 1'b0;
    model = 0;
    checks++;
    if (upc != 0) begin
      failures++;
      $display("FAIL upc=%0d after reset", upc);
    end
    for (int i = 0; i < 2000; i++) begin
      automatic int s = $urandom_range(0, 3);
      // Favour NEXT so the counter also wraps past 255.
      if ($urandom_range(0, 3) != 0) s = 0;
      seq = seq_e'(s[1:0]);
      map_addr = uaddr_t'($urandom_range(0, 255));
      rst = ($urandom_range(0, 99) == 0);
      @(posedge clk);
      if (rst) begin
        model = 0;
        resets++;
      end else begin
        seen[s]++;
        case (s)
          0: begin
            if (model == 255) wraps++;
            model = (model + 1) % 256;
          end
          1: model = int'(map_addr);
          2: model = 0;
          default: ;
        endcase
      end
      #1;
      checks++;
      if (int'(upc) != model) begin
        failures++;
        $display("FAIL cycle %0d seq=%0d upc=%0d expected=%0d", i, s, upc, model);
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin
        failures++;
        $display("FAIL sequencing command %0d never exercised", s);
      end
    end
    checks++;
    if (resets == 0) begin
      failures++;
      $display("FAIL reset never exercised");
    end
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL wrap from 255 to 0 never exercised");
    end
    $display("next=%0d decode=%0d fetch=%0d hlt=%0d resets=%0d wraps=%0d",
             seen[0], seen[1], seen[2], seen[3], resets, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
