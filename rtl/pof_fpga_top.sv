// pof_fpga_top: the two proposed primitive operator FPGAs side by side.
//
// The document proposes the same FPGA architecture with two CALB designs
// and compares them: CALB1 (four latches, four adders, four shifters; fewer
// blocks, faster) and CALB2 (two latches, one adder, two shifters; smaller).
// This top holds one fabric of each, each with its own ports (prefix c1_
// and c2_), sized for the largest example filter of the comparison (81
// taps, 28 different coefficients): 8 CALB1 blocks and 23 CALB2 blocks,
// each fabric with a 32-word W-memory. Behind each fabric an 81-tap
// transposed-form delay/add chain (tfir_chain) takes the products the
// fabric reads out and forms the filter output y[n]; the products
// themselves are also brought out (out_data/out_valid). See pof_fabric and
// tfir_chain for the interfaces and their timing; y_valid follows the
// fabric's done by two cycles.
module pof_fpga_top
  import pof_pkg::*;
#(
  parameter int unsigned N_CALB1    = 8,
  parameter int unsigned N_CALB2    = 23,
  parameter int unsigned W_DEPTH    = 32,
  parameter int unsigned PROG_DEPTH = 128,
  parameter int unsigned NTAPS      = 81,
  parameter int unsigned ACC_W      = 16,
  // derived
  parameter int unsigned TAW = (NTAPS > 1) ? $clog2(NTAPS) : 1,
  parameter int unsigned IW1 = (N_CALB1 > 1) ? $clog2(N_CALB1) : 1,
  parameter int unsigned IW2 = (N_CALB2 > 1) ? $clog2(N_CALB2) : 1,
  parameter int unsigned AW  = (W_DEPTH > 1) ? $clog2(W_DEPTH) : 1,
  parameter int unsigned PAW = (PROG_DEPTH > 1) ? $clog2(PROG_DEPTH) : 1,
  parameter int unsigned PW1 = N_CALB1 * CALB1_NLATCH + IW1 + 2 + 3 + AW + 3,
  parameter int unsigned PW2 = N_CALB2 * CALB2_NLATCH + IW2 + 2 + 3 + AW + 3
) (
  input  logic                   clk,
  input  logic                   rst,
  // CALB1 fabric
  input  logic                   c1_cfg_we,
  input  logic [IW1-1:0]         c1_cfg_idx,
  input  calb1_cfg_t             c1_cfg_wdata,
  input  logic                   c1_prog_we,
  input  logic [PAW-1:0]         c1_prog_addr,
  input  logic [PW1-1:0]         c1_prog_wdata,
  input  logic                   c1_start,
  input  data_t                  c1_in_data,
  output logic                   c1_busy,
  output logic                   c1_done,
  output data_t                  c1_out_data,
  output logic                   c1_out_valid,
  input  logic                   c1_map_we,
  input  logic [TAW-1:0]         c1_map_addr,
  input  logic [AW-1:0]          c1_map_wdata,
  output logic [ACC_W-1:0]       c1_y,
  output logic                   c1_y_valid,
  // CALB2 fabric
  input  logic                   c2_cfg_we,
  input  logic [IW2-1:0]         c2_cfg_idx,
  input  calb2_cfg_t             c2_cfg_wdata,
  input  logic                   c2_prog_we,
  input  logic [PAW-1:0]         c2_prog_addr,
  input  logic [PW2-1:0]         c2_prog_wdata,
  input  logic                   c2_start,
  input  data_t                  c2_in_data,
  output logic                   c2_busy,
  output logic                   c2_done,
  output data_t                  c2_out_data,
  output logic                   c2_out_valid,
  input  logic                   c2_map_we,
  input  logic [TAW-1:0]         c2_map_addr,
  input  logic [AW-1:0]          c2_map_wdata,
  output logic [ACC_W-1:0]       c2_y,
  output logic                   c2_y_valid
);

  pof_fabric #(
    .CALB_TYPE(1), .N_CALB(N_CALB1), .W_DEPTH(W_DEPTH), .PROG_DEPTH(PROG_DEPTH)
  ) u_fabric1 (
    .clk, .rst,
    .cfg_we     (c1_cfg_we),
    .cfg_idx    (c1_cfg_idx),
    .cfg_wdata  (c1_cfg_wdata),
    .prog_we    (c1_prog_we),
    .prog_addr  (c1_prog_addr),
    .prog_wdata (c1_prog_wdata),
    .start      (c1_start),
    .in_data    (c1_in_data),
    .busy       (c1_busy),
    .done       (c1_done),
    .out_data   (c1_out_data),
    .out_valid  (c1_out_valid)
  );

  pof_fabric #(
    .CALB_TYPE(2), .N_CALB(N_CALB2), .W_DEPTH(W_DEPTH), .PROG_DEPTH(PROG_DEPTH)
  ) u_fabric2 (
    .clk, .rst,
    .cfg_we     (c2_cfg_we),
    .cfg_idx    (c2_cfg_idx),
    .cfg_wdata  (c2_cfg_wdata),
    .prog_we    (c2_prog_we),
    .prog_addr  (c2_prog_addr),
    .prog_wdata (c2_prog_wdata),
    .start      (c2_start),
    .in_data    (c2_in_data),
    .busy       (c2_busy),
    .done       (c2_done),
    .out_data   (c2_out_data),
    .out_valid  (c2_out_valid)
  );

  tfir_chain #(.NTAPS(NTAPS), .NPROD(W_DEPTH), .ACC_W(ACC_W), .TAW(TAW), .PIW(AW)) u_chain1 (
    .clk, .rst,
    .map_we    (c1_map_we),
    .map_addr  (c1_map_addr),
    .map_wdata (c1_map_wdata),
    .w_valid   (c1_out_valid),
    .w_data    (c1_out_data),
    .w_done    (c1_done),
    .y         (c1_y),
    .y_valid   (c1_y_valid)
  );

  tfir_chain #(.NTAPS(NTAPS), .NPROD(W_DEPTH), .ACC_W(ACC_W), .TAW(TAW), .PIW(AW)) u_chain2 (
    .clk, .rst,
    .map_we    (c2_map_we),
    .map_addr  (c2_map_addr),
    .map_wdata (c2_map_wdata),
    .w_valid   (c2_out_valid),
    .w_data    (c2_out_data),
    .w_done    (c2_done),
    .y         (c2_y),
    .y_valid   (c2_y_valid)
  );

endmodule
