// tfir_chain: the delay-and-add section of a transposed-form FIR filter,
// fed with the products the fabric reads out of its W-memory.
//
// The filter is y[n] = sum_i h[i] x[n-i], i = 0..NTAPS-1. In transposed
// form every product w_i[n] = h[i] x[n] is added into a register chain:
//   y[n]  = w_0[n] + r_1,    r_i <= w_i[n] + r_{i+1},    r_{NTAPS-1} <= w_{NTAPS-1}[n].
// The fabric computes each distinct coefficient's product only once, so a
// tap map (one entry per tap, loaded through map_we/map_addr/map_wdata)
// tells which product feeds which tap; symmetric and repeated
// coefficients share one product.
//
// Operation: every w_valid word is stored in a product buffer in order of
// arrival (index 0, 1, ...; words past NPROD are dropped). The fabric's
// done pulse marks the end of a sample; the chain steps one cycle later
// (the last product arrives together with done), giving y and a one-cycle
// y_valid, and the arrival index restarts at 0. Products are 8-bit two's
// complement and are sign-extended to ACC_W bits; the chain wraps modulo
// 2^ACC_W. The transposed structure is the one of the filter drawing; the
// tap map, the product buffer and ACC_W are this design's choices. The
// default of 81 taps and 32 products covers the largest example filter
// (81 taps, 28 distinct coefficients).
module tfir_chain
  import pof_pkg::*;
#(
  parameter int unsigned NTAPS = 81,
  parameter int unsigned NPROD = 32,
  parameter int unsigned ACC_W = 16,
  parameter int unsigned TAW   = (NTAPS > 1) ? $clog2(NTAPS) : 1,
  parameter int unsigned PIW   = (NPROD > 1) ? $clog2(NPROD) : 1
) (
  input  logic             clk,
  input  logic             rst,        // synchronous, active high
  // tap map load
  input  logic             map_we,
  input  logic [TAW-1:0]   map_addr,
  input  logic [PIW-1:0]   map_wdata,
  // products from the fabric
  input  logic             w_valid,
  input  data_t            w_data,
  input  logic             w_done,
  // filter output
  output logic [ACC_W-1:0] y,
  output logic             y_valid
);

  logic [PIW-1:0]   tap_map [NTAPS];
  data_t            prod    [NPROD];
  logic [ACC_W-1:0] r       [NTAPS];   // r[0] unused
  logic [PIW:0]     cnt;
  logic             step;

  function automatic logic [ACC_W-1:0] sx(input data_t v);
    return ACC_W'(signed'(v));
  endfunction

  always_ff @(posedge clk) begin
    if (map_we) tap_map[map_addr] <= map_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      step <= 1'b0;
      for (int p = 0; p < NPROD; p++) prod[p] <= '0;
    end else begin
      step <= w_done;
      if (w_valid && 32'(cnt) < NPROD) begin
        prod[cnt[PIW-1:0]] <= w_data;
        cnt <= cnt + 1'b1;
      end
      if (step) cnt <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y       <= '0;
      y_valid <= 1'b0;
      for (int i = 0; i < NTAPS; i++) r[i] <= '0;
    end else begin
      y_valid <= step;
      if (step) begin
        if (NTAPS > 1) y <= sx(prod[tap_map[0]]) + r[1];
        else           y <= sx(prod[tap_map[0]]);
        for (int i = 1; i < NTAPS - 1; i++) r[i] <= sx(prod[tap_map[i]]) + r[i + 1];
        if (NTAPS > 1) r[NTAPS - 1] <= sx(prod[tap_map[NTAPS - 1]]);
      end
    end
  end

endmodule
