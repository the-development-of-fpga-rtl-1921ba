// io_buffer: the fabric's I/O buffer.
//
// Input side: when in_load is high at a clock edge the external sample
// in_data is stored, and in_q drives the data bus whenever the control unit
// selects the input as bus source. Output side: when out_load is high at a
// clock edge the word on the data bus is stored in out_data and out_valid is
// raised for one cycle. The document only names this buffer between the
// pins and the data bus; registers on both sides are this design's choice.
module io_buffer
  import pof_pkg::*;
(
  input  logic  clk,
  input  logic  rst,        // synchronous, active high
  input  data_t in_data,    // INPUTS pins
  input  logic  in_load,
  output data_t in_q,       // to the data bus
  input  data_t bus,        // from the data bus
  input  logic  out_load,
  output data_t out_data,   // OUTPUTS pins
  output logic  out_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      in_q      <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      if (in_load)  in_q     <= in_data;
      if (out_load) out_data <= bus;
      out_valid <= out_load;
    end
  end

endmodule
