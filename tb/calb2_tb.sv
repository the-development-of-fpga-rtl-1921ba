// calb2_tb: self-checking test of calb2.
//
// Two blocks run the {1, 9, 17} example the way the CALB2 fabric does: the
// first forms 8x (OS 0) and 9x (OS 1) from x; these are loaded into the
// second, which forms 17x. Then 400 random configurations and register
// values are checked on every OS code against the integer reference model.
module calb2_tb;
  import pof_pkg::*;
  import pof_tb_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  data_t      din_a, din_b;
  logic [1:0] load_a, load_b;
  calb2_cfg_t cfg_a, cfg_b;
  osel_t      os_a, os_b;
  data_t      dout_a, dout_b;
  int         checks = 0, failures = 0;

  calb2 dut_a (.clk, .rst, .din(din_a), .load(load_a), .cfg(cfg_a), .os(os_a), .dout(dout_a));
  calb2 dut_b (.clk, .rst, .din(din_b), .load(load_b), .cfg(cfg_b), .os(os_b), .dout(dout_b));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input data_t got, input int exp, input string what);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int q0, q1;
    rst = 1'b1; load_a = '0; load_b = '0; din_a = '0; din_b = '0;
    cfg_a = '0; cfg_b = '0; os_a = '0; os_b = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    for (int x = 1; x <= 13; x += 4) begin
      cfg_a = cfg_c2_a(); cfg_b = cfg_c2_b();
      din_a = data_t'(x); load_a = 2'b11;
      @(posedge clk); #1 load_a = '0;
      os_a = 3'd1; #1 check(dout_a, (9 * x) & 255, "9x");
      din_b = dout_a; load_b = 2'b01;          // 9x -> second block L(0)
      @(posedge clk); #1 load_b = '0;
      os_a = 3'd0; #1 check(dout_a, (8 * x) & 255, "8x");
      din_b = dout_a; load_b = 2'b10;          // 8x -> second block L(1)
      @(posedge clk); #1 load_b = '0;
      os_b = 3'd1; #1 check(dout_b, (17 * x) & 255, "17x");
    end

    q0 = 0; q1 = 0;
    for (int t = 0; t < 400; t++) begin
      cfg_a = calb2_cfg_t'($urandom());
      q0 = $urandom_range(0, 255); q1 = $urandom_range(0, 255);
      din_a = data_t'(q0); load_a = 2'b01; @(posedge clk); #1;
      din_a = data_t'(q1); load_a = 2'b10; @(posedge clk); #1;
      load_a = '0;
      for (int o = 0; o < 8; o++) begin
        os_a = osel_t'(o); #1;
        check(dout_a, ref_calb2(q0, q1, cfg_a, o), "random");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
