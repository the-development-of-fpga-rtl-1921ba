// control_unit_tb: self-checking test of control_unit.
//
// Small sizes (8 latch strobes, 4 CALBs, 8-word W-memory, 16-word program).
// Loads random programs of random length with the last bit on the final
// word, starts them and checks, cycle by cycle, that the control bus shows
// word k in the k-th cycle after start, that busy covers exactly the
// program, that done pulses once after it, that in_load marks only an
// accepted start, that a start while busy is ignored and that an idle unit
// drives an idle control bus. One program without a last bit must stop at
// the final address.
module control_unit_tb;
  import pof_pkg::*;
  localparam int unsigned NLAT = 8, IW = 2, AW = 3, PD = 16, PAW = 4;
  localparam int unsigned PW = NLAT + IW + 2 + 3 + AW + 3;

  logic            clk = 1'b0;
  logic            rst, prog_we, start, busy, done, in_load;
  logic [PAW-1:0]  prog_addr;
  logic [PW-1:0]   prog_wdata;
  bus_src_e        src;
  logic [IW-1:0]   src_idx;
  osel_t           os;
  logic [NLAT-1:0] load;
  logic            w_we, out_load;
  logic [AW-1:0]   waddr;
  logic [PW-1:0]   prog [PD];
  int              checks = 0, failures = 0;

  control_unit #(.NLAT(NLAT), .IW(IW), .AW(AW), .PROG_DEPTH(PD)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PW-1:0] bus_word();
    return {load, src_idx, src, os, waddr, w_we, out_load, 1'b0};
  endfunction

  task automatic expect_word(input logic [PW-1:0] w, input string what);
    logic [PW-1:0] e;
    e = w;
    e[0] = 1'b0;  // the last bit is not a control-bus signal
    checks++;
    if (bus_word() !== e || !busy || done) begin
      failures++;
      $display("FAIL %s: bus %h expected %h busy %b done %b", what, bus_word(), e, busy, done);
    end
  endtask

  task automatic expect_idle(input logic exp_done, input string what);
    checks++;
    if (bus_word() != '0 || busy || done != exp_done) begin
      failures++;
      $display("FAIL %s: idle bus %h busy %b done %b", what, bus_word(), busy, done);
    end
  endtask

  task automatic load_prog(input int len, input bit with_last);
    for (int a = 0; a < PD; a++) begin
      prog[a] = PW'({$urandom(), $urandom()});
      prog[a][0] = with_last && (a == len - 1);
      if (a < len - 1) prog[a][0] = 1'b0;
      prog_we = 1'b1; prog_addr = PAW'(a); prog_wdata = prog[a];
      @(posedge clk); #1;
    end
    prog_we = 1'b0;
  endtask

  task automatic run(input int len);
    start = 1'b1;
    #1;
    checks++;
    if (!in_load) begin failures++; $display("FAIL in_load missing on start"); end
    @(posedge clk); #1;
    for (int k = 0; k < len; k++) begin
      start = (k == 1);  // a start while busy must be ignored
      #1;
      checks++;
      if (in_load) begin failures++; $display("FAIL in_load while busy"); end
      expect_word(prog[k], $sformatf("word %0d", k));
      @(posedge clk); #1;
    end
    start = 1'b0;
    expect_idle(1'b1, "done");
    @(posedge clk); #1;
    expect_idle(1'b0, "after done");
  endtask

  initial begin
    rst = 1'b1; prog_we = 1'b0; start = 1'b0; prog_addr = '0; prog_wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    expect_idle(1'b0, "after reset");
    for (int t = 0; t < 20; t++) begin
      int len;
      len = $urandom_range(1, PD);
      load_prog(len, 1'b1);
      run(len);
    end
    load_prog(PD, 1'b0);
    run(PD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
