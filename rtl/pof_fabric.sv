// pof_fabric: a primitive operator FPGA for the multiplication block of an
// FIR filter.
//
// N_CALB configurable arithmetic logic blocks (CALB1 or CALB2, chosen by
// CALB_TYPE), each with its own configuration memory, share one 8-bit data
// bus with the I/O buffer and the W-memory. A programmable control unit
// drives the control bus: per cycle it picks one bus source (input sample,
// one CALB's output mux with its OS code, or a W-memory word) and any set of
// destinations (CALB input latches, a W-memory write, the output register).
// Products w_i[n] = h[i]*x[n] are built from shifts and additions inside the
// CALBs, passed between CALBs over the bus where one block is not enough,
// collected in the W-memory and then read out in order through the output
// register, where the filter's delay-and-add section takes them.
//
// Use: write each CALB's configuration word (cfg_we, cfg_idx, cfg_wdata),
// write the control program (prog_we, prog_addr, prog_wdata; layout in
// control_unit), then for each sample put it on in_data and pulse start
// while busy is low. out_valid marks each word the program sends to
// out_data; done pulses after the program's last word.
//
// The block structure (CALBs with configuration memories, control unit,
// control bus, shared data bus with tri-state CALB drivers, W-memory, I/O
// buffer) follows the document's architecture drawing. Widths of the
// program and memories, the load ports and the handshake are this design's.
// Defaults: 8 CALB1 blocks and a 32-word W-memory, enough for the largest
// example filter (81 taps, 28 different coefficients, 8 CALB1 blocks).
module pof_fabric
  import pof_pkg::*;
#(
  parameter int unsigned CALB_TYPE  = 1,    // 1: CALB1, 2: CALB2
  parameter int unsigned N_CALB     = 8,
  parameter int unsigned W_DEPTH    = 32,
  parameter int unsigned PROG_DEPTH = 128,
  // derived
  parameter int unsigned NL    = (CALB_TYPE == 1) ? CALB1_NLATCH : CALB2_NLATCH,
  parameter int unsigned CFG_W = (CALB_TYPE == 1) ? CALB1_CFG_W : CALB2_CFG_W,
  parameter int unsigned IW    = (N_CALB > 1) ? $clog2(N_CALB) : 1,
  parameter int unsigned AW    = (W_DEPTH > 1) ? $clog2(W_DEPTH) : 1,
  parameter int unsigned PAW   = (PROG_DEPTH > 1) ? $clog2(PROG_DEPTH) : 1,
  parameter int unsigned PW    = N_CALB * NL + IW + 2 + 3 + AW + 3
) (
  input  logic             clk,
  input  logic             rst,        // synchronous, active high
  // configuration load
  input  logic             cfg_we,
  input  logic [IW-1:0]    cfg_idx,
  input  logic [CFG_W-1:0] cfg_wdata,
  // control program load
  input  logic             prog_we,
  input  logic [PAW-1:0]   prog_addr,
  input  logic [PW-1:0]    prog_wdata,
  // samples in, products out
  input  logic             start,
  input  data_t            in_data,
  output logic             busy,
  output logic             done,
  output data_t            out_data,
  output logic             out_valid
);

  if (CALB_TYPE != 1 && CALB_TYPE != 2) begin : g_bad_type
    $error("pof_fabric: CALB_TYPE must be 1 or 2");
  end

  // control bus
  bus_src_e               src;
  logic [IW-1:0]          src_idx;
  osel_t                  os;
  logic [N_CALB*NL-1:0]   load;
  logic                   w_we;
  logic [AW-1:0]          waddr;
  logic                   out_load;
  logic                   in_load;

  // data bus and its drivers
  data_t                  bus;
  data_t                  in_q;
  data_t                  wmem_q;
  data_t                  calb_q [N_CALB];
  logic [N_CALB-1:0]      calb_oe;

  control_unit #(
    .NLAT(N_CALB * NL), .IW(IW), .AW(AW), .PROG_DEPTH(PROG_DEPTH), .PAW(PAW), .PW(PW)
  ) u_ctrl (
    .clk, .rst,
    .prog_we, .prog_addr, .prog_wdata,
    .start, .busy, .done, .in_load,
    .src, .src_idx, .os, .load, .w_we, .waddr, .out_load
  );

  for (genvar k = 0; k < N_CALB; k++) begin : g_calb
    logic [CFG_W-1:0] cfg_word;

    config_mem #(.W(CFG_W)) u_cfg (
      .clk, .rst,
      .we    (cfg_we && 32'(cfg_idx) == k),
      .wdata (cfg_wdata),
      .cfg   (cfg_word)
    );

    if (CALB_TYPE == 1) begin : g_c1
      calb1 u_calb (
        .clk, .rst,
        .din  (bus),
        .load (load[k*NL +: NL]),
        .cfg  (calb1_cfg_t'(cfg_word)),
        .os   (os),
        .dout (calb_q[k])
      );
    end else begin : g_c2
      calb2 u_calb (
        .clk, .rst,
        .din  (bus),
        .load (load[k*NL +: NL]),
        .cfg  (calb2_cfg_t'(cfg_word)),
        .os   (os),
        .dout (calb_q[k])
      );
    end
  end

  data_bus #(.N_CALB(N_CALB), .IW(IW)) u_bus (
    .src, .src_idx, .in_q, .wmem_q, .calb_q, .calb_oe, .bus
  );

  // A control word that names a CALB as bus source must name one that
  // exists in this fabric.
  a_calb_exists: assert property (@(posedge clk) disable iff (rst)
    src == SRC_CALB |-> calb_oe != '0);

  w_memory #(.DEPTH(W_DEPTH), .AW(AW)) u_wmem (
    .clk,
    .we    (w_we),
    .waddr (waddr),
    .wdata (bus),
    .raddr (waddr),
    .rdata (wmem_q)
  );

  io_buffer u_io (
    .clk, .rst,
    .in_data, .in_load, .in_q,
    .bus, .out_load, .out_data, .out_valid
  );

endmodule
