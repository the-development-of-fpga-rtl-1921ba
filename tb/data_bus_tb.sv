// data_bus_tb: self-checking test of data_bus.
//
// Five CALB drivers plus the input and W-memory sources. Every source is
// selected in turn and at random; the bus must carry exactly the selected
// word, calb_oe must be one-hot for a CALB source and zero otherwise, and
// an idle bus reads zero.
module data_bus_tb;
  import pof_pkg::*;
  localparam int unsigned N = 5;
  localparam int unsigned IW = 3;
  bus_src_e          src;
  logic [IW-1:0]     src_idx;
  data_t             in_q, wmem_q, bus;
  data_t             calb_q [N];
  logic [N-1:0]      calb_oe;
  int                checks = 0, failures = 0;
  logic              clk = 1'b0;

  data_bus #(.N_CALB(N), .IW(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int exp_bus;
    logic [N-1:0] exp_oe;
    exp_oe = '0;
    case (src)
      SRC_INPUT: exp_bus = int'(in_q);
      SRC_WMEM:  exp_bus = int'(wmem_q);
      SRC_CALB:  begin exp_bus = int'(calb_q[src_idx]); exp_oe[src_idx] = 1'b1; end
      default:   exp_bus = 0;
    endcase
    checks++;
    if (int'(bus) != exp_bus || calb_oe != exp_oe) begin
      failures++;
      $display("FAIL src=%s idx=%0d bus %0d/%0d oe %b/%b",
               src.name(), src_idx, bus, exp_bus, calb_oe, exp_oe);
    end
  endtask

  task automatic randomize_sources();
    in_q = data_t'($urandom()); wmem_q = data_t'($urandom());
    for (int i = 0; i < N; i++) calb_q[i] = data_t'($urandom());
  endtask

  initial begin
    randomize_sources();
    src = SRC_NONE; src_idx = '0; #1 check();
    src = SRC_INPUT; #1 check();
    src = SRC_WMEM;  #1 check();
    for (int i = 0; i < N; i++) begin
      src = SRC_CALB; src_idx = IW'(i); #1 check();
    end
    for (int t = 0; t < 300; t++) begin
      randomize_sources();
      src = bus_src_e'($urandom_range(0, 3));
      src_idx = IW'($urandom_range(0, N - 1));
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
