// tfir_chain_tb: self-checking test of tfir_chain.
//
// A 5-tap chain with a 4-word product buffer and 12-bit accumulation. The
// tap map is random (so products are shared between taps); each sample
// delivers a random number of products (0..6, more than the buffer holds in
// some samples) with gaps, the last one together with done, as the fabric
// does. y is checked against the direct convolution sum over the per-tap
// product history, and y_valid must come exactly two cycles after done.
module tfir_chain_tb;
  import pof_pkg::*;
  localparam int NT = 5, NP = 4, AW = 12, TAW = 3, PIW = 2;

  logic           clk = 1'b0;
  logic           rst, map_we, w_valid, w_done, y_valid;
  logic [TAW-1:0] map_addr;
  logic [PIW-1:0] map_wdata;
  data_t          w_data;
  logic [AW-1:0]  y;
  int             checks = 0, failures = 0;

  tfir_chain #(.NTAPS(NT), .NPROD(NP), .ACC_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tmap [NT];
  int buffer [NP];
  int hist [$];   // hist[k] holds the tap values of sample n-k, flattened per sample

  initial begin
    int tapval [NT];
    int taps_hist [$][NT];
    rst = 1'b1; map_we = 1'b0; w_valid = 1'b0; w_done = 1'b0; map_addr = '0; map_wdata = '0; w_data = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int p = 0; p < NP; p++) buffer[p] = 0;
    for (int i = 0; i < NT; i++) begin
      tmap[i] = $urandom_range(0, NP - 1);
      map_we = 1'b1; map_addr = TAW'(i); map_wdata = PIW'(tmap[i]);
      @(posedge clk); #1;
    end
    map_we = 1'b0;

    for (int n = 0; n < 60; n++) begin
      int np, acc, yexp;
      np = $urandom_range(0, 6);
      if (np == 0) begin
        w_done = 1'b1; @(posedge clk); #1; w_done = 1'b0;
      end
      for (int k = 0; k < np; k++) begin
        int v;
        v = $urandom_range(0, 255);
        if (k < NP) buffer[k] = v;
        w_valid = 1'b1; w_data = data_t'(v);
        w_done = (k == np - 1);
        @(posedge clk); #1;
        w_valid = 1'b0; w_done = 1'b0;
        repeat ($urandom_range(0, 2)) if (k != np - 1) @(posedge clk);
        #0;
      end
      // model: tap values of this sample, then direct sum over the history
      for (int i = 0; i < NT; i++) tapval[i] = buffer[tmap[i]];
      taps_hist.push_front(tapval);
      acc = 0;
      for (int i = 0; i < NT && i < taps_hist.size(); i++) begin
        int s;
        s = taps_hist[i][i];
        if (s > 127) s -= 256;
        acc += s;
      end
      yexp = acc & ((1 << AW) - 1);
      // y_valid two cycles after done
      checks++;
      if (y_valid) begin failures++; $display("FAIL y_valid one cycle early"); end
      @(posedge clk); #1;
      checks++;
      if (!y_valid || int'(y) != yexp) begin
        failures++;
        $display("FAIL sample %0d: y_valid %b y %0d expected %0d", n, y_valid, y, yexp);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
