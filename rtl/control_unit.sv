// control_unit: the programmable control unit of the fabric.
//
// A small microprogram sequencer. The program memory (PROG_DEPTH words,
// written through prog_we/prog_addr/prog_wdata before use) holds one control
// word per bus cycle. A start pulse while idle stores the next input sample
// in the I/O buffer (in_load) and begins the program at address 0; from the
// next cycle on, one word is issued per clock until a word with its last
// bit set (or the last address) has been issued, after which done pulses
// for one cycle and the unit is idle again. While idle it drives an idle
// control bus (no bus driver, no loads, no writes).
//
// Control word, packed MSB to LSB (see instr_t):
//   load[NLAT]  latch load strobes, CALB k latch j at bit k*NL+j
//   idx[IW]     CALB that drives the data bus when src = SRC_CALB
//   src[2]      data-bus source (bus_src_e)
//   os[3]       output-mux select OS(2..0) of the driving CALB
//   waddr[AW]   W-memory address (write, or read when src = SRC_WMEM)
//   w_we        write the bus word into the W-memory
//   out_load    copy the bus word to the output register
//   last        final word of the program
// The document says only that a programmable control unit drives the
// control bus to the CALBs and the W-memory; the sequencer, the word layout
// and the start/done handshake are this design's choices.
module control_unit
  import pof_pkg::*;
#(
  parameter int unsigned NLAT       = 32,   // latch strobes in the fabric
  parameter int unsigned IW         = 3,    // CALB index width
  parameter int unsigned AW         = 5,    // W-memory address width
  parameter int unsigned PROG_DEPTH = 128,
  parameter int unsigned PAW        = (PROG_DEPTH > 1) ? $clog2(PROG_DEPTH) : 1,
  parameter int unsigned PW         = NLAT + IW + 2 + 3 + AW + 3
) (
  input  logic            clk,
  input  logic            rst,        // synchronous, active high
  // program load port
  input  logic            prog_we,
  input  logic [PAW-1:0]  prog_addr,
  input  logic [PW-1:0]   prog_wdata,
  // sample handshake
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic            in_load,
  // control bus
  output bus_src_e        src,
  output logic [IW-1:0]   src_idx,
  output osel_t           os,
  output logic [NLAT-1:0] load,
  output logic            w_we,
  output logic [AW-1:0]   waddr,
  output logic            out_load
);

  typedef struct packed {
    logic [NLAT-1:0] load;
    logic [IW-1:0]   idx;
    bus_src_e        src;
    osel_t           os;
    logic [AW-1:0]   waddr;
    logic            w_we;
    logic            out_load;
    logic            last;
  } instr_t;

  if ($bits(instr_t) != PW) begin : g_bad_pw
    $error("control_unit: PW does not match the control word layout");
  end

  logic [PW-1:0]  prog [PROG_DEPTH];
  logic [PAW-1:0] pc;
  instr_t         ins;

  always_ff @(posedge clk) begin
    if (prog_we) prog[prog_addr] <= prog_wdata;
  end

  assign ins     = instr_t'(prog[pc]);
  assign in_load = start && !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      pc   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          pc   <= '0;
        end
      end else if (ins.last || 32'(pc) == PROG_DEPTH - 1) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        pc <= pc + 1'b1;
      end
    end
  end

  always_comb begin
    src      = SRC_NONE;
    src_idx  = '0;
    os       = '0;
    load     = '0;
    w_we     = 1'b0;
    waddr    = '0;
    out_load = 1'b0;
    if (busy) begin
      src      = ins.src;
      src_idx  = ins.idx;
      os       = ins.os;
      load     = ins.load;
      w_we     = ins.w_we;
      waddr    = ins.waddr;
      out_load = ins.out_load;
    end
  end

endmodule
