// calb1: Configurable Arithmetic Logic Block, the larger of the two CALBs.
//
// Four 8-bit input registers (L0..L3) take a word from the data bus when
// their load strobe is high. Behind them is a feed-forward network of
// twelve 2:1 multiplexers (C1..C12), four left shifters (S1..S4, 0..7
// places) and four adder/subtractors (X1..X4), set up by the static
// configuration word from the block's configuration memory. An 8:1 output
// multiplexer, driven by OS from the control bus, puts one of eight
// internal nodes on the block's output, which the fabric gates onto the
// data bus. With this network one block can form several shift-and-add
// products of one sample at once, e.g. 1x, 9x and 17x (two additions and
// one shift).
//
// Network (sel=1 / sel=0), as read from the CALB1 drawing:
//   SH1 = (C1 ? Q0 : Q1) << S1          SH2 = (C7 ? Q2 : Q3) << S2
//   A2  = (C3 ? Q1 : SH1)  +/- (C9 ? Q2 : SH2)          (X2)
//   A1  = (C2 ? Q0 : SH1)  +/- (C4 ? A2 : SH1)          (X1)
//   A3  = (C10 ? A2 : SH2) +/- (C8 ? Q3 : SH2)          (X3)
//   SH3 = (C6 ? A1 : A2) << S3          SH4 = (C12 ? A2 : A3) << S4
//   A4  = (C5 ? A1 : A2)   +/- (C11 ? A2 : A3)          (X4)
//   OS: 0 SH1, 1 A1, 2 SH3, 3 A4, 4 A2, 5 SH4, 6 A3, 7 SH2
// The units, their names and the numbers of bits follow the drawing. The
// 0/1 input of C4, C5, C6, C7, C10, C11 and C12, which of the two drawn
// sources a mux pick for C4/C10/C11/C12, the OS code order and the
// subtraction order (upper input minus lower input) are this design's
// reading where the drawing prints no numeral. The drawing's latches are
// built as enable flip-flops (one clock edge per bus transfer), reset to 0.
//
// Timing: loads take effect at the clock edge; dout is combinational from
// the registers, cfg and os, so a word loaded in one cycle can be read out
// in the next.
module calb1
  import pof_pkg::*;
(
  input  logic       clk,
  input  logic       rst,     // synchronous, active high
  input  data_t      din,     // data bus
  input  logic [3:0] load,    // L(0)..L(3)
  input  calb1_cfg_t cfg,     // from the configuration memory
  input  osel_t      os,      // OS(2..0), from the control bus
  output data_t      dout     // to the data-bus driver
);

  data_t q [4];

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      if (rst)          q[i] <= '0;
      else if (load[i]) q[i] <= din;
    end
  end

  data_t sh1, sh2, sh3, sh4;
  data_t a1, a2, a3, a4;

  always_comb begin
    sh1 = lshift(cfg.c[1] ? q[0] : q[1], cfg.s[1]);
    sh2 = lshift(cfg.c[7] ? q[2] : q[3], cfg.s[2]);
    a2  = addsub(cfg.c[3]  ? q[1] : sh1, cfg.c[9] ? q[2] : sh2, cfg.x[2]);
    a1  = addsub(cfg.c[2]  ? q[0] : sh1, cfg.c[4] ? a2   : sh1, cfg.x[1]);
    a3  = addsub(cfg.c[10] ? a2   : sh2, cfg.c[8] ? q[3] : sh2, cfg.x[3]);
    sh3 = lshift(cfg.c[6]  ? a1   : a2,  cfg.s[3]);
    sh4 = lshift(cfg.c[12] ? a2   : a3,  cfg.s[4]);
    a4  = addsub(cfg.c[5]  ? a1   : a2,  cfg.c[11] ? a2 : a3, cfg.x[4]);
  end

  always_comb begin
    unique case (os)
      3'd0: dout = sh1;
      3'd1: dout = a1;
      3'd2: dout = sh3;
      3'd3: dout = a4;
      3'd4: dout = a2;
      3'd5: dout = sh4;
      3'd6: dout = a3;
      default: dout = sh2;
    endcase
  end

endmodule
