// calb2: Configurable Arithmetic Logic Block, the smaller of the two CALBs.
//
// Two 8-bit input registers (L0, L1) take a word from the data bus when
// their load strobe is high. Each feeds a left shifter (S1, S2: 0..7
// places). Mux C1 picks Q0 (1) or its shifted copy (0), mux C2 picks Q1 (1)
// or its shifted copy (0), and one adder/subtractor X1 forms their sum or
// difference (upper minus lower when X1 = 1). The output multiplexer,
// driven by OS from the control bus, returns SH1 (code 0), the sum (1) or
// SH2 (2); other codes return the sum as well. One block makes one
// shift-and-add step, so a product such as 17x takes two chained blocks.
//
// The structure and the 8-bit width follow the CALB2 drawing. The OS codes,
// which mux input is 0 and which 1, the subtraction order and the use of
// enable flip-flops (reset to 0) in place of the drawn latches are this
// design's choices.
//
// Timing: loads take effect at the clock edge; dout is combinational.
module calb2
  import pof_pkg::*;
(
  input  logic       clk,
  input  logic       rst,     // synchronous, active high
  input  data_t      din,     // data bus
  input  logic [1:0] load,    // L(0), L(1)
  input  calb2_cfg_t cfg,     // from the configuration memory
  input  osel_t      os,      // OS(2..0), from the control bus
  output data_t      dout
);

  data_t q0, q1;

  always_ff @(posedge clk) begin
    if (rst) begin
      q0 <= '0;
      q1 <= '0;
    end else begin
      if (load[0]) q0 <= din;
      if (load[1]) q1 <= din;
    end
  end

  data_t sh1, sh2, sum;

  always_comb begin
    sh1 = lshift(q0, cfg.s[1]);
    sh2 = lshift(q1, cfg.s[2]);
    sum = addsub(cfg.c[1] ? q0 : sh1, cfg.c[2] ? q1 : sh2, cfg.x);
  end

  always_comb begin
    case (os)
      3'd0:    dout = sh1;
      3'd2:    dout = sh2;
      default: dout = sum;
    endcase
  end

endmodule
