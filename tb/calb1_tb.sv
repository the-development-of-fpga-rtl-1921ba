// calb1_tb: self-checking test of calb1.
//
// Runs the {1, 9, 17} example (x loaded into registers 0 and 2, products
// read on OS 7, 4 and 1, with the 8x intermediate on OS 0), then 400 random
// configurations and register contents checked on all eight OS codes
// against the integer reference model. Also checks that a register keeps
// its value while its load strobe is low.
module calb1_tb;
  import pof_pkg::*;
  import pof_tb_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  data_t      din;
  logic [3:0] load;
  calb1_cfg_t cfg;
  osel_t      os;
  data_t      dout;
  int         checks = 0, failures = 0;
  int         q [4];

  calb1 dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int exp, input string what);
    checks++;
    if (int'(dout) != exp) begin
      failures++;
      $display("FAIL %s: os=%0d got %0d expected %0d", what, os, dout, exp);
    end
  endtask

  task automatic put(input int idx, input int v);
    din = data_t'(v);
    load = 4'(1 << idx);
    @(posedge clk); #1;
    load = '0;
    q[idx] = v;
  endtask

  initial begin
    rst = 1'b1; load = '0; din = '0; cfg = '0; os = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // paper example: x = 1 into L(0) and L(2) in the same cycle
    cfg = cfg_c1_1_9_17();
    din = 8'd1; load = 4'b0101;
    @(posedge clk); #1 load = '0;
    os = 3'd7; #1 check(1, "w0=1x");
    os = 3'd4; #1 check(9, "w1=9x");
    os = 3'd1; #1 check(17, "w2=17x");
    os = 3'd0; #1 check(8, "SH1=8x");
    // same configuration, x = 7: 9*7 = 63, 17*7 = 119
    din = 8'd7; load = 4'b0101;
    @(posedge clk); #1 load = '0;
    os = 3'd4; #1 check(63, "9*7");
    os = 3'd1; #1 check(119, "17*7");

    q = '{7, 0, 7, 0};  // register contents after the example
    for (int t = 0; t < 400; t++) begin
      cfg = calb1_cfg_t'($urandom());
      for (int i = 0; i < 4; i++) put(i, $urandom_range(0, 255));
      for (int o = 0; o < 8; o++) begin
        os = osel_t'(o); #1;
        check(ref_calb1(q[0], q[1], q[2], q[3], cfg, o), "random");
      end
    end

    // hold: with no load strobe the registers keep their values
    din = ~din;
    repeat (3) @(posedge clk);
    #1;
    for (int o = 0; o < 8; o++) begin
      os = osel_t'(o); #1;
      check(ref_calb1(q[0], q[1], q[2], q[3], cfg, o), "hold");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
