// pof_pkg: types and constants shared by the primitive operator FPGA.
//
// The fabric moves 8-bit two's-complement words (the width printed on every
// bus of the CALB drawings). A CALB's configuration word holds the select
// bits of its 2:1 multiplexers (C), the add/subtract bits of its adders (X)
// and one 3-bit shift amount per shifter (S), as the CALB description lists.
// The bit order inside those words, and the encoding of the data-bus source,
// are this design's own choices.
package pof_pkg;

  parameter int unsigned DATA_W = 8;
  typedef logic [DATA_W-1:0] data_t;

  // shift amount: "a 3-bit signal will allow up to 7-bit shifts"
  parameter int unsigned SHAMT_W = 3;
  typedef logic [SHAMT_W-1:0] shamt_t;

  // output multiplexer select OS(2..0)
  typedef logic [2:0] osel_t;

  // CALB1: multiplexer selects C1..C12, adder controls X1..X4,
  // shifter amounts S1..S4.  28 bits.
  typedef struct packed {
    logic [12:1]        c;
    logic [4:1]         x;
    logic [4:1][2:0]    s;
  } calb1_cfg_t;

  // CALB2: multiplexer selects C1..C2, adder control X1,
  // shifter amounts S1..S2.  9 bits.
  typedef struct packed {
    logic [2:1]         c;
    logic               x;
    logic [2:1][2:0]    s;
  } calb2_cfg_t;

  parameter int unsigned CALB1_CFG_W = $bits(calb1_cfg_t);
  parameter int unsigned CALB2_CFG_W = $bits(calb2_cfg_t);
  parameter int unsigned CALB1_NLATCH = 4;
  parameter int unsigned CALB2_NLATCH = 2;

  // Which unit drives the shared data bus in a cycle.
  typedef enum logic [1:0] {
    SRC_NONE  = 2'd0,  // bus idle (reads as zero)
    SRC_INPUT = 2'd1,  // I/O buffer input register
    SRC_CALB  = 2'd2,  // output multiplexer of one CALB
    SRC_WMEM  = 2'd3   // W-memory read port
  } bus_src_e;

  // Add (x=0) or subtract (x=1, two's complement): result = a +/- b,
  // wrapping to DATA_W bits.
  function automatic data_t addsub(input data_t a, input data_t b, input logic sub);
    return sub ? data_t'(a - b) : data_t'(a + b);
  endfunction

  // Left shift by 0..7 places, multiplying by 2^k and keeping DATA_W bits.
  function automatic data_t lshift(input data_t a, input shamt_t k);
    return data_t'(a << k);
  endfunction

endpackage
