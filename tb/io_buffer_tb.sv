// io_buffer_tb: self-checking test of io_buffer.
//
// Random in_load/out_load strobes over 300 cycles: in_q must follow in_data
// only on in_load, out_data must follow the bus only on out_load, and
// out_valid must be out_load delayed by one clock.
module io_buffer_tb;
  import pof_pkg::*;
  logic  clk = 1'b0;
  logic  rst, in_load, out_load, out_valid;
  data_t in_data, in_q, bus, out_data;
  int    m_in, m_out, m_valid;
  int    checks = 0, failures = 0;

  io_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (int'(in_q) != m_in || int'(out_data) != m_out || int'(out_valid) != m_valid) begin
      failures++;
      $display("FAIL %s: in_q %0d/%0d out %0d/%0d valid %0d/%0d",
               what, in_q, m_in, out_data, m_out, out_valid, m_valid);
    end
  endtask

  initial begin
    rst = 1'b1; in_load = 1'b1; out_load = 1'b1; in_data = 8'hff; bus = 8'hff;
    @(posedge clk); #1;
    m_in = 0; m_out = 0; m_valid = 0; check("reset");
    rst = 1'b0;
    for (int t = 0; t < 300; t++) begin
      in_load = 1'($urandom()); out_load = 1'($urandom());
      in_data = data_t'($urandom()); bus = data_t'($urandom());
      @(posedge clk); #1;
      if (in_load) m_in = int'(in_data);
      if (out_load) m_out = int'(bus);
      m_valid = int'(out_load);
      check("run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
