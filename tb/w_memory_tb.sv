// w_memory_tb: self-checking test of w_memory.
//
// Fills all 32 words, reads them back, then runs 500 cycles of random
// writes and reads against an array model. The read port is checked in the
// same cycle its address is applied (asynchronous read).
module w_memory_tb;
  import pof_pkg::*;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned AW = 5;
  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  data_t         wdata, rdata;
  int            model [DEPTH];
  int            checks = 0, failures = 0;

  w_memory #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (int'(rdata) != model[raddr]) begin
      failures++;
      $display("FAIL %s: addr %0d got %0d expected %0d", what, raddr, rdata, model[raddr]);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; waddr = AW'(a); wdata = data_t'((a * 37 + 5) & 255);
      @(posedge clk); #1;
      model[a] = (a * 37 + 5) & 255;
    end
    we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a); #1 check("fill");
    end
    for (int t = 0; t < 500; t++) begin
      we = 1'($urandom()); waddr = AW'($urandom()); wdata = data_t'($urandom());
      raddr = AW'($urandom());
      #1 check("read");
      @(posedge clk); #1;
      if (we) model[waddr] = int'(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
