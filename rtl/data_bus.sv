// data_bus: the shared data bus of the fabric.
//
// Every CALB, the I/O buffer and the W-memory sit on one 8-bit bus through
// tri-state drivers; in each cycle the control unit lets exactly one of them
// drive it. Here the tri-state drivers are built as their logic
// equivalent: a decoded one-hot drive-enable per source (calb_oe shows which
// CALB's driver is on) and an AND-OR bus. With src = SRC_NONE the bus reads
// 0. All loads (CALB latches, W-memory, output register) sample the bus at
// the next clock edge, so one word moves per cycle and may go to many
// destinations at once.
module data_bus
  import pof_pkg::*;
#(
  parameter int unsigned N_CALB = 8,
  parameter int unsigned IW     = (N_CALB > 1) ? $clog2(N_CALB) : 1
) (
  input  bus_src_e          src,
  input  logic [IW-1:0]     src_idx,
  input  data_t             in_q,
  input  data_t             wmem_q,
  input  data_t             calb_q [N_CALB],
  output logic [N_CALB-1:0] calb_oe,
  output data_t             bus
);

  always_comb begin
    calb_oe = '0;
    if (src == SRC_CALB && 32'(src_idx) < N_CALB) calb_oe[src_idx] = 1'b1;
  end

  always_comb begin
    bus = (src == SRC_INPUT) ? in_q   : '0;
    bus |= (src == SRC_WMEM) ? wmem_q : '0;
    for (int i = 0; i < N_CALB; i++) begin
      bus |= calb_oe[i] ? calb_q[i] : '0;
    end
  end

  // at most one CALB driver on at a time
  always_comb assert ($onehot0(calb_oe));

endmodule
