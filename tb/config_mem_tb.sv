// config_mem_tb: self-checking test of config_mem.
//
// Checks reset to zero, that a write stores the word at the clock edge, and
// that the word holds while we is low, over 200 random writes.
module config_mem_tb;
  localparam int unsigned W = 28;
  logic         clk = 1'b0;
  logic         rst, we;
  logic [W-1:0] wdata, cfg, model;
  int           checks = 0, failures = 0;

  config_mem #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (cfg !== model) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, cfg, model);
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b1; wdata = '1;
    @(posedge clk); #1;
    model = '0; check("reset");
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      we = 1'($urandom());
      wdata = W'($urandom());
      @(posedge clk); #1;
      if (we) model = wdata;
      check("write/hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
