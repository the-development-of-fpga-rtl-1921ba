// config_mem: configuration memory of one CALB.
//
// Holds the CALB's static control word (multiplexer selects, add/subtract
// bits and shift amounts) and presents it to the CALB continuously. It is
// written once, before filtering starts, through a parallel write port:
// when we is high at a clock edge the word wdata is stored. Reset clears it.
// The document states only that each CALB has a configuration memory loaded
// with its control signals; a single-word parallel-write register is this
// design's choice.
module config_mem #(
  parameter int unsigned W = 28  // configuration word width (CALB1: 28)
) (
  input  logic         clk,
  input  logic         rst,     // synchronous, active high
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] cfg
);

  always_ff @(posedge clk) begin
    if (rst)     cfg <= '0;
    else if (we) cfg <= wdata;
  end

endmodule
