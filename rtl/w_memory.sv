// w_memory: the W-memory, which keeps the products w_i[n] of one sample.
//
// A DEPTH x 8-bit array with one write port and one read port, both
// addressed by the control bus. When we is high at a clock edge, the word on
// the data bus is written to waddr. The read port is asynchronous: rdata
// always shows the word at raddr, so a read can drive the data bus in the
// same cycle. The document gives the role of this memory (it stores the
// w_i[n] values and hands them to the outputs on a read from the control
// unit); the depth, the single-cycle read and the separate read and write
// addresses are this design's choices. DEPTH 32 holds the 28 different
// coefficients of the largest example filter.
module w_memory
  import pof_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  data_t         wdata,
  input  logic [AW-1:0] raddr,
  output data_t         rdata
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
