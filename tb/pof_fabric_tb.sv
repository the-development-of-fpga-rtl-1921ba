// pof_fabric_tb: self-checking end-to-end test of pof_fabric.
//
// Two small fabrics, one of two CALB1 blocks and one of three CALB2
// blocks, each with an 8-word W-memory and a 16-word program. Both are
// configured and programmed through their load ports to produce the
// products of x with {1, 9, 17, 15}:
//   CALB1 fabric: block 0 makes x, 9x, 17x from one sample (shift plus two
//     additions); block 1, loaded with x from block 0 over the bus, makes
//     15x = 16x - x by subtraction.
//   CALB2 fabric: block 0 makes 9x = 8x + x and 8x; both go over the bus
//     into block 1, which makes 17x; block 2 makes 15x = 16x - x; x itself
//     is written to the W-memory straight from the input.
// The products are written to the W-memory and then read out in order.
// For 40 samples the test checks every output word against (h*x) mod 256,
// the number of output words, the cycles from start to done, and that a
// start raised while the fabric is busy is ignored.
module pof_fabric_tb;
  import pof_pkg::*;
  import pof_tb_pkg::*;

  localparam int unsigned N1 = 2, N2 = 3, WD = 8, PD = 16;
  localparam int unsigned IW1 = 1, IW2 = 2, AW = 3, PAW = 4;
  localparam int unsigned PW1 = N1 * 4 + IW1 + 2 + 3 + AW + 3;
  localparam int unsigned PW2 = N2 * 2 + IW2 + 2 + 3 + AW + 3;
  localparam int NCOEF = 4;
  localparam int H [NCOEF] = '{1, 9, 17, 15};
  localparam int PROG_LEN = 9;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;

  // CALB1 fabric
  logic             c1_cfg_we, c1_prog_we, c1_start, c1_busy, c1_done, c1_out_valid;
  logic [IW1-1:0]   c1_cfg_idx;
  logic [27:0]      c1_cfg_wdata;
  logic [PAW-1:0]   c1_prog_addr;
  logic [PW1-1:0]   c1_prog_wdata;
  data_t            c1_in_data, c1_out_data;
  // CALB2 fabric
  logic             c2_cfg_we, c2_prog_we, c2_start, c2_busy, c2_done, c2_out_valid;
  logic [IW2-1:0]   c2_cfg_idx;
  logic [8:0]       c2_cfg_wdata;
  logic [PAW-1:0]   c2_prog_addr;
  logic [PW2-1:0]   c2_prog_wdata;
  data_t            c2_in_data, c2_out_data;

  pof_fabric #(.CALB_TYPE(1), .N_CALB(N1), .W_DEPTH(WD), .PROG_DEPTH(PD)) dut1 (
    .clk, .rst, .cfg_we(c1_cfg_we), .cfg_idx(c1_cfg_idx), .cfg_wdata(c1_cfg_wdata),
    .prog_we(c1_prog_we), .prog_addr(c1_prog_addr), .prog_wdata(c1_prog_wdata),
    .start(c1_start), .in_data(c1_in_data), .busy(c1_busy), .done(c1_done),
    .out_data(c1_out_data), .out_valid(c1_out_valid));

  pof_fabric #(.CALB_TYPE(2), .N_CALB(N2), .W_DEPTH(WD), .PROG_DEPTH(PD)) dut2 (
    .clk, .rst, .cfg_we(c2_cfg_we), .cfg_idx(c2_cfg_idx), .cfg_wdata(c2_cfg_wdata),
    .prog_we(c2_prog_we), .prog_addr(c2_prog_addr), .prog_wdata(c2_prog_wdata),
    .start(c2_start), .in_data(c2_in_data), .busy(c2_busy), .done(c2_done),
    .out_data(c2_out_data), .out_valid(c2_out_valid));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // control word: {load, idx, src, os, waddr, w_we, out_load, last}
  function automatic logic [PW1-1:0] w1(input logic [N1*4-1:0] ld, input int idx, input bus_src_e s,
                                        input int o, input int wa, input bit we, input bit ol, input bit last);
    return {ld, IW1'(idx), s, 3'(o), AW'(wa), we, ol, last};
  endfunction
  function automatic logic [PW2-1:0] w2(input logic [N2*2-1:0] ld, input int idx, input bus_src_e s,
                                        input int o, input int wa, input bit we, input bit ol, input bit last);
    return {ld, IW2'(idx), s, 3'(o), AW'(wa), we, ol, last};
  endfunction

  calb1_cfg_t sub15_1;
  calb2_cfg_t sub15_2;
  logic [PW1-1:0] p1 [PROG_LEN];
  logic [PW2-1:0] p2 [PROG_LEN];

  // output collectors
  int got1 [$], got2 [$];
  always @(posedge clk) begin
    if (!rst && c1_out_valid) got1.push_back(int'(c1_out_data));
    if (!rst && c2_out_valid) got2.push_back(int'(c2_out_data));
  end

  task automatic check_products(input int x, input int got [$], input string tag);
    checks++;
    if (got.size() != NCOEF) begin
      failures++;
      $display("FAIL %s x=%0d: %0d output words, expected %0d", tag, x, got.size(), NCOEF);
    end else begin
      for (int i = 0; i < NCOEF; i++) begin
        checks++;
        if (got[i] != ((H[i] * x) & 255)) begin
          failures++;
          $display("FAIL %s x=%0d w%0d: got %0d expected %0d", tag, x, i, got[i], (H[i] * x) & 255);
        end
      end
    end
  endtask

  initial begin
    int cyc;
    rst = 1'b1;
    {c1_cfg_we, c1_prog_we, c1_start, c2_cfg_we, c2_prog_we, c2_start} = '0;
    c1_cfg_idx = '0; c1_cfg_wdata = '0; c1_prog_addr = '0; c1_prog_wdata = '0; c1_in_data = '0;
    c2_cfg_idx = '0; c2_cfg_wdata = '0; c2_prog_addr = '0; c2_prog_wdata = '0; c2_in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // configurations
    sub15_1 = '0;
    sub15_1.c[1] = 1'b1; sub15_1.s[1] = 3'd4;                 // SH1 = 16 Q0
    sub15_1.c[3] = 1'b0; sub15_1.c[9] = 1'b1; sub15_1.x[2] = 1'b1;  // A2 = SH1 - Q2
    sub15_2 = '0;
    sub15_2.s[1] = 3'd4; sub15_2.c[1] = 1'b0; sub15_2.c[2] = 1'b1; sub15_2.x = 1'b1;

    c1_cfg_we = 1'b1;
    c1_cfg_idx = 0; c1_cfg_wdata = cfg_c1_1_9_17(); @(posedge clk); #1;
    c1_cfg_idx = 1; c1_cfg_wdata = sub15_1;         @(posedge clk); #1;
    c1_cfg_we = 1'b0;
    c2_cfg_we = 1'b1;
    c2_cfg_idx = 0; c2_cfg_wdata = cfg_c2_a(); @(posedge clk); #1;
    c2_cfg_idx = 1; c2_cfg_wdata = cfg_c2_b(); @(posedge clk); #1;
    c2_cfg_idx = 2; c2_cfg_wdata = sub15_2;    @(posedge clk); #1;
    c2_cfg_we = 1'b0;

    // programs (load bit of CALB k, register j = k*NL + j)
    p1[0] = w1(8'b0000_0101, 0, SRC_INPUT, 0, 0, 0, 0, 0);  // x -> c0.Q0, c0.Q2
    p1[1] = w1(8'b0101_0000, 0, SRC_CALB,  7, 0, 1, 0, 0);  // x  -> W0, c1.Q0, c1.Q2
    p1[2] = w1(8'b0,         0, SRC_CALB,  4, 1, 1, 0, 0);  // 9x -> W1
    p1[3] = w1(8'b0,         0, SRC_CALB,  1, 2, 1, 0, 0);  // 17x -> W2
    p1[4] = w1(8'b0,         1, SRC_CALB,  4, 3, 1, 0, 0);  // 15x -> W3
    for (int i = 0; i < NCOEF; i++) p1[5 + i] = w1('0, 0, SRC_WMEM, 0, i, 0, 1, i == NCOEF - 1);

    p2[0] = w2(6'b11_00_11, 0, SRC_INPUT, 0, 0, 1, 0, 0);   // x -> c0, c2, W0
    p2[1] = w2(6'b00_01_00, 0, SRC_CALB,  1, 1, 1, 0, 0);   // 9x -> c1.Q0, W1
    p2[2] = w2(6'b00_10_00, 0, SRC_CALB,  0, 0, 0, 0, 0);   // 8x -> c1.Q1
    p2[3] = w2(6'b0,        1, SRC_CALB,  1, 2, 1, 0, 0);   // 17x -> W2
    p2[4] = w2(6'b0,        2, SRC_CALB,  1, 3, 1, 0, 0);   // 15x -> W3
    for (int i = 0; i < NCOEF; i++) p2[5 + i] = w2('0, 0, SRC_WMEM, 0, i, 0, 1, i == NCOEF - 1);

    for (int a = 0; a < PROG_LEN; a++) begin
      c1_prog_we = 1'b1; c1_prog_addr = PAW'(a); c1_prog_wdata = p1[a];
      c2_prog_we = 1'b1; c2_prog_addr = PAW'(a); c2_prog_wdata = p2[a];
      @(posedge clk); #1;
    end
    c1_prog_we = 1'b0; c2_prog_we = 1'b0;

    for (int t = 0; t < 40; t++) begin
      int x;
      x = (t == 0) ? 1 : $urandom_range(0, 255);
      got1.delete(); got2.delete();
      c1_in_data = data_t'(x); c2_in_data = data_t'(x);
      c1_start = 1'b1; c2_start = 1'b1;
      @(posedge clk); #1;
      // a second start with another sample while busy must be ignored
      c1_in_data = ~data_t'(x); c2_in_data = ~data_t'(x);
      cyc = 1;
      while (!(c1_done && c2_done) && cyc < 100) begin
        checks++;
        if (!c1_busy || !c2_busy) begin
          failures++;
          $display("FAIL busy dropped early at cycle %0d", cyc);
        end
        @(posedge clk); #1;
        c1_start = 1'b0; c2_start = 1'b0;
        cyc++;
      end
      checks++;
      if (cyc != PROG_LEN + 1) begin
        failures++;
        $display("FAIL start-to-done took %0d cycles, expected %0d", cyc, PROG_LEN + 1);
      end
      @(posedge clk); #1;
      check_products(x, got1, "CALB1");
      check_products(x, got2, "CALB2");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
