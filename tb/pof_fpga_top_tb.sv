// pof_fpga_top_tb: end-to-end test of the complete design at its default
// sizes (8 CALB1 blocks, 23 CALB2 blocks, 32-word W-memories, 128-word
// programs, 81-tap delay/add chains).
//
// Part 1, filtering: both fabrics compute the products of each sample with
// h = {1, 9, 17} (one CALB1 block, or two chained CALB2 blocks) plus a zero
// word; the chains map taps 0..2 to those products and taps 3..80 to the
// zero word. For 24 small signed samples (-7..7, so every product fits in
// 8 bits) y[n] must equal the exact convolution x[n] + 9x[n-1] + 17x[n-2].
// Part 2, random programs: every CALB of both fabrics gets a random
// configuration, both chains a random tap map, and each fabric runs random
// control programs (random bus sources, OS codes, register loads to several
// destinations, W-memory writes and reads, output strobes). A cycle-level
// model of the fabric built from the reference CALB models predicts every
// product word, and a model of the chain (direct sum over the per-tap
// product history) every y. One program has no last bit and must run to
// the final program address.
// Every mechanism is counted and must occur: each bus source, a CALB to
// CALB transfer, a word loaded into several places at once, subtraction,
// shifts, W-memory write and read, a start ignored while busy, a program
// ending at the last address, filter outputs, a product buffer overflow.
module pof_fpga_top_tb;
  import pof_pkg::*;
  import pof_tb_pkg::*;

  localparam int N1 = 8, N2 = 23, WD = 32, PD = 128;
  localparam int IW1 = 3, IW2 = 5, AW = 5, PAW = 7;
  localparam int PW1 = N1 * 4 + IW1 + 2 + 3 + AW + 3;
  localparam int PW2 = N2 * 2 + IW2 + 2 + 3 + AW + 3;
  localparam int HF [3] = '{1, 9, 17};  // filter coefficients of part 1
  localparam int NT = 81, TAW = 7, ACC_W = 16;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0;

  logic             c1_cfg_we, c1_prog_we, c1_start, c1_busy, c1_done, c1_out_valid;
  logic [IW1-1:0]   c1_cfg_idx;
  calb1_cfg_t       c1_cfg_wdata;
  logic [PAW-1:0]   c1_prog_addr;
  logic [PW1-1:0]   c1_prog_wdata;
  data_t            c1_in_data, c1_out_data;
  logic             c2_cfg_we, c2_prog_we, c2_start, c2_busy, c2_done, c2_out_valid;
  logic [IW2-1:0]   c2_cfg_idx;
  calb2_cfg_t       c2_cfg_wdata;
  logic [PAW-1:0]   c2_prog_addr;
  logic [PW2-1:0]   c2_prog_wdata;
  data_t            c2_in_data, c2_out_data;
  logic             c1_map_we, c2_map_we, c1_y_valid, c2_y_valid;
  logic [TAW-1:0]   c1_map_addr, c2_map_addr;
  logic [AW-1:0]    c1_map_wdata, c2_map_wdata;
  logic [ACC_W-1:0] c1_y, c2_y;

  pof_fpga_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- counters
  int n_src_input, n_src_calb, n_src_wmem, n_c2c, n_multi, n_wwrite, n_out;
  int n_ignored_start, n_runout, n_y, n_overflow;

  // counted from the control words the fabrics execute (see model_step)

  // ------------------------------------------------------------ output capture
  int got1 [$], got2 [$];
  int goty1 [$], goty2 [$];
  always @(posedge clk) begin
    if (!rst && c1_y_valid) goty1.push_back(int'(c1_y));
    if (!rst && c2_y_valid) goty2.push_back(int'(c2_y));
    if (!rst && c1_out_valid) got1.push_back(int'(c1_out_data));
    if (!rst && c2_out_valid) got2.push_back(int'(c2_out_data));
  end

  // ---------------------------------------------------------------- the model
  int         lat1 [N1][4];
  int         lat2 [N2][2];
  calb1_cfg_t cfg1 [N1];
  calb2_cfg_t cfg2 [N2];
  int         wm1 [WD], wm2 [WD];
  bit         wv1 [WD], wv2 [WD];   // W-memory word written at least once
  int         exp1 [$], exp2 [$];

  // chain model: product buffer, tap map, per-sample tap values
  int tm1 [NT], tm2 [NT];
  int pb1 [WD], pb2 [WD];
  int th1 [$][NT], th2 [$][NT];
  int expy1 [$], expy2 [$];

  function automatic int sx8(input int v);
    v = v & 255;
    return (v > 127) ? v - 256 : v;
  endfunction

  // one sample's products (in arrival order) through the chain model
  task automatic chain_model(input int fab, input int prods [$]);
    int tv [NT];
    int acc;
    if (prods.size() > WD) n_overflow++;
    for (int k = 0; k < prods.size() && k < WD; k++) begin
      if (fab == 1) pb1[k] = prods[k]; else pb2[k] = prods[k];
    end
    for (int i = 0; i < NT; i++) tv[i] = (fab == 1) ? pb1[tm1[i]] : pb2[tm2[i]];
    acc = 0;
    if (fab == 1) begin
      th1.push_front(tv);
      if (th1.size() > NT) void'(th1.pop_back());
      for (int i = 0; i < th1.size(); i++) acc += sx8(th1[i][i]);
      expy1.push_back(acc & ((1 << ACC_W) - 1));
    end else begin
      th2.push_front(tv);
      if (th2.size() > NT) void'(th2.pop_back());
      for (int i = 0; i < th2.size(); i++) acc += sx8(th2[i][i]);
      expy2.push_back(acc & ((1 << ACC_W) - 1));
    end
  endtask

  task automatic write_maps();
    for (int i = 0; i < NT; i++) begin
      c1_map_we = 1'b1; c1_map_addr = TAW'(i); c1_map_wdata = AW'(tm1[i]);
      c2_map_we = 1'b1; c2_map_addr = TAW'(i); c2_map_wdata = AW'(tm2[i]);
      @(posedge clk); #1;
    end
    c1_map_we = 1'b0; c2_map_we = 1'b0;
  endtask

  typedef struct {
    logic [63:0] ld;
    int          idx;
    bus_src_e    src;
    int          os;
    int          wa;
    bit          we;
    bit          ol;
    bit          last;
  } word_t;

  function automatic logic [PW1-1:0] pack1(input word_t w);
    return {w.ld[N1*4-1:0], IW1'(w.idx), w.src, 3'(w.os), AW'(w.wa), w.we, w.ol, w.last};
  endfunction
  function automatic logic [PW2-1:0] pack2(input word_t w);
    return {w.ld[N2*2-1:0], IW2'(w.idx), w.src, 3'(w.os), AW'(w.wa), w.we, w.ol, w.last};
  endfunction

  // one bus cycle of the model
  task automatic model_step(input int fab, input int x, input word_t w);
    int b;
    b = 0;
    if (w.src == SRC_INPUT) n_src_input++;
    if (w.src == SRC_CALB)  n_src_calb++;
    if (w.src == SRC_WMEM)  n_src_wmem++;
    if (w.src == SRC_CALB && w.ld != '0) n_c2c++;
    if ($countones(w.ld) + int'(w.we) > 1) n_multi++;
    if (w.we) n_wwrite++;
    case (w.src)
      SRC_INPUT: b = x;
      SRC_WMEM:  b = (fab == 1) ? wm1[w.wa] : wm2[w.wa];
      SRC_CALB:  b = (fab == 1)
                   ? ref_calb1(lat1[w.idx][0], lat1[w.idx][1], lat1[w.idx][2], lat1[w.idx][3], cfg1[w.idx], w.os)
                   : ref_calb2(lat2[w.idx][0], lat2[w.idx][1], cfg2[w.idx], w.os);
      default:   b = 0;
    endcase
    if (fab == 1) begin
      for (int k = 0; k < N1; k++) for (int j = 0; j < 4; j++) if (w.ld[k*4+j]) lat1[k][j] = b;
      if (w.we) begin wm1[w.wa] = b; wv1[w.wa] = 1'b1; end
      if (w.ol) exp1.push_back(b);
    end else begin
      for (int k = 0; k < N2; k++) for (int j = 0; j < 2; j++) if (w.ld[k*2+j]) lat2[k][j] = b;
      if (w.we) begin wm2[w.wa] = b; wv2[w.wa] = 1'b1; end
      if (w.ol) exp2.push_back(b);
    end
  endtask

  // ------------------------------------------------------------ port drivers
  word_t prog1 [PD], prog2 [PD];
  int    len1, len2;

  task automatic write_cfg1(input int k, input calb1_cfg_t c);
    c1_cfg_we = 1'b1; c1_cfg_idx = IW1'(k); c1_cfg_wdata = c; cfg1[k] = c;
    @(posedge clk); #1 c1_cfg_we = 1'b0;
  endtask
  task automatic write_cfg2(input int k, input calb2_cfg_t c);
    c2_cfg_we = 1'b1; c2_cfg_idx = IW2'(k); c2_cfg_wdata = c; cfg2[k] = c;
    @(posedge clk); #1 c2_cfg_we = 1'b0;
  endtask

  task automatic write_progs();
    for (int a = 0; a < PD; a++) begin
      c1_prog_we = (a < len1); c1_prog_addr = PAW'(a); c1_prog_wdata = pack1(prog1[a]);
      c2_prog_we = (a < len2); c2_prog_addr = PAW'(a); c2_prog_wdata = pack2(prog2[a]);
      @(posedge clk); #1;
    end
    c1_prog_we = 1'b0; c2_prog_we = 1'b0;
  endtask

  // Run both programs on one sample each; both models follow.
  task automatic run(input int x1, input int x2);
    int cyc, d1, d2, s1, s2;
    int pr [$];
    s1 = exp1.size(); s2 = exp2.size();
    for (int a = 0; a < len1; a++) model_step(1, x1, prog1[a]);
    for (int a = 0; a < len2; a++) model_step(2, x2, prog2[a]);
    pr = exp1[s1:$]; if (s1 == exp1.size()) pr.delete(); chain_model(1, pr);
    pr = exp2[s2:$]; if (s2 == exp2.size()) pr.delete(); chain_model(2, pr);
    c1_in_data = data_t'(x1); c2_in_data = data_t'(x2);
    c1_start = 1'b1; c2_start = 1'b1;
    @(posedge clk); #1;
    // a start with another sample while busy is ignored
    c1_in_data = ~data_t'(x1); c2_in_data = ~data_t'(x2);
    n_ignored_start++;
    d1 = 0; d2 = 0; cyc = 1;
    while ((d1 == 0 || d2 == 0) && cyc < 4 * PD) begin
      if (c1_done && d1 == 0) d1 = cyc;
      if (c2_done && d2 == 0) d2 = cyc;
      @(posedge clk); #1;
      c1_start = 1'b0; c2_start = 1'b0;
      cyc++;
    end
    // start to done: one cycle per program word plus one
    checks += 2;
    if (d1 != len1 + 1) begin failures++; $display("FAIL fabric1 done after %0d cycles, expected %0d", d1, len1 + 1); end
    if (d2 != len2 + 1) begin failures++; $display("FAIL fabric2 done after %0d cycles, expected %0d", d2, len2 + 1); end
  endtask

  task automatic compare_outputs(input string tag);
    checks++;
    if (got1.size() != exp1.size() || got2.size() != exp2.size()) begin
      failures++;
      $display("FAIL %s: output counts %0d/%0d and %0d/%0d", tag, got1.size(), exp1.size(), got2.size(), exp2.size());
    end else begin
      for (int i = 0; i < got1.size(); i++) begin
        checks++;
        if (got1[i] != exp1[i]) begin failures++; $display("FAIL %s fabric1 word %0d: %0d expected %0d", tag, i, got1[i], exp1[i]); end
      end
      for (int i = 0; i < got2.size(); i++) begin
        checks++;
        if (got2[i] != exp2[i]) begin failures++; $display("FAIL %s fabric2 word %0d: %0d expected %0d", tag, i, got2[i], exp2[i]); end
      end
    end
    checks++;
    if (goty1.size() != expy1.size() || goty2.size() != expy2.size()) begin
      failures++;
      $display("FAIL %s: y counts %0d/%0d and %0d/%0d", tag, goty1.size(), expy1.size(), goty2.size(), expy2.size());
    end else begin
      for (int i = 0; i < goty1.size(); i++) begin
        checks++;
        if (goty1[i] != expy1[i]) begin failures++; $display("FAIL %s chain1 y %0d: %0d expected %0d", tag, i, goty1[i], expy1[i]); end
      end
      for (int i = 0; i < goty2.size(); i++) begin
        checks++;
        if (goty2[i] != expy2[i]) begin failures++; $display("FAIL %s chain2 y %0d: %0d expected %0d", tag, i, goty2[i], expy2[i]); end
      end
    end
    n_out += got1.size() + got2.size();
    n_y += goty1.size() + goty2.size();
    got1.delete(); got2.delete(); exp1.delete(); exp2.delete();
    goty1.delete(); goty2.delete(); expy1.delete(); expy2.delete();
  endtask

  function automatic word_t wd(input logic [63:0] ld, input int idx, input bus_src_e s,
                               input int o, input int wa, input bit we, input bit ol, input bit last);
    word_t w;
    w.ld = ld; w.idx = idx; w.src = s; w.os = o; w.wa = wa; w.we = we; w.ol = ol; w.last = last;
    return w;
  endfunction

  // random program of len words for fabric fab; reads only written W words
  task automatic random_prog(input int fab, input int len, input bit with_last, ref word_t p [PD]);
    bit valid [WD];
    int nb, nl;
    nb = (fab == 1) ? N1 : N2;
    nl = (fab == 1) ? 4 : 2;
    for (int a = 0; a < WD; a++) valid[a] = (fab == 1) ? wv1[a] : wv2[a];
    for (int a = 0; a < len; a++) begin
      word_t w;
      int r;
      w.ld = '0;
      for (int b = 0; b < nb * nl; b++) w.ld[b] = ($urandom_range(0, 5) == 0);
      w.idx = $urandom_range(0, nb - 1);
      w.os = $urandom_range(0, 7);
      w.wa = $urandom_range(0, WD - 1);
      r = $urandom_range(0, 9);
      if (a == 0 || r < 2)      w.src = SRC_INPUT;
      else if (r < 8)           w.src = SRC_CALB;
      else if (valid[w.wa])     w.src = SRC_WMEM;
      else                      w.src = SRC_NONE;
      w.we = ($urandom_range(0, 2) == 0) && w.src != SRC_WMEM;
      if (w.we) valid[w.wa] = 1'b1;
      w.ol = ($urandom_range(0, 2) == 0);
      w.last = with_last && (a == len - 1);
      p[a] = w;
    end
  endtask

  // ------------------------------------------------------------------- main
  initial begin
    int xs [$];
    bit saw_sub, saw_shift;
    rst = 1'b1;
    {c1_cfg_we, c1_prog_we, c1_start, c2_cfg_we, c2_prog_we, c2_start} = '0;
    c1_cfg_idx = '0; c1_cfg_wdata = '0; c1_prog_addr = '0; c1_prog_wdata = '0; c1_in_data = '0;
    c2_cfg_idx = '0; c2_cfg_wdata = '0; c2_prog_addr = '0; c2_prog_wdata = '0; c2_in_data = '0;
    foreach (lat1[k, j]) lat1[k][j] = 0;
    foreach (lat2[k, j]) lat2[k][j] = 0;
    foreach (cfg1[k]) cfg1[k] = '0;
    foreach (cfg2[k]) cfg2[k] = '0;
    foreach (wv1[a]) begin wv1[a] = 1'b0; wv2[a] = 1'b0; wm1[a] = 0; wm2[a] = 0; end
    n_ignored_start = 0; n_runout = 0; n_out = 0; n_y = 0; n_overflow = 0;
    c1_map_we = 1'b0; c1_map_addr = '0; c1_map_wdata = '0;
    c2_map_we = 1'b0; c2_map_addr = '0; c2_map_wdata = '0;
    foreach (pb1[a]) begin pb1[a] = 0; pb2[a] = 0; end
    n_src_input = 0; n_src_calb = 0; n_src_wmem = 0; n_c2c = 0; n_multi = 0; n_wwrite = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;

    // ---- part 1: the {1, 9, 17} filter on both fabrics, highest block slots
    write_cfg1(N1 - 1, cfg_c1_1_9_17());
    write_cfg2(N2 - 2, cfg_c2_a());
    write_cfg2(N2 - 1, cfg_c2_b());
    len1 = 8;
    prog1[0] = wd(64'h5 << ((N1 - 1) * 4), 0, SRC_INPUT, 0, 0, 0, 0, 0);
    prog1[1] = wd('0, N1 - 1, SRC_CALB, 7, 0, 1, 0, 0);
    prog1[2] = wd('0, N1 - 1, SRC_CALB, 4, 1, 1, 0, 0);
    prog1[3] = wd('0, N1 - 1, SRC_CALB, 1, 2, 1, 0, 0);
    for (int i = 0; i < 3; i++) prog1[4 + i] = wd('0, 0, SRC_WMEM, 0, i, 0, 1, 0);
    prog1[7] = wd('0, 0, SRC_NONE, 0, 0, 0, 1, 1);           // zero word for unused taps
    len2 = 8;
    prog2[0] = wd(64'h3 << ((N2 - 2) * 2), 0, SRC_INPUT, 0, 0, 1, 0, 0);
    prog2[1] = wd(64'h1 << ((N2 - 1) * 2), N2 - 2, SRC_CALB, 1, 1, 1, 0, 0);
    prog2[2] = wd(64'h2 << ((N2 - 1) * 2), N2 - 2, SRC_CALB, 0, 0, 0, 0, 0);
    prog2[3] = wd('0, N2 - 1, SRC_CALB, 1, 2, 1, 0, 0);
    for (int i = 0; i < 3; i++) prog2[4 + i] = wd('0, 0, SRC_WMEM, 0, i, 0, 1, 0);
    prog2[7] = wd('0, 0, SRC_NONE, 0, 0, 0, 1, 1);
    write_progs();

    for (int i = 0; i < NT; i++) begin
      tm1[i] = (i < 3) ? i : 3;
      tm2[i] = (i < 3) ? i : 3;
    end
    write_maps();

    for (int n = 0; n < 24; n++) begin
      int x, y, yd;
      x = $urandom_range(0, 14) - 7;
      xs.push_front(x);
      run(x & 255, x & 255);
      repeat (3) @(posedge clk);
      #1;
      yd = 0;
      for (int i = 0; i < 3 && i < xs.size(); i++) yd += HF[i] * xs[i];
      checks++;
      if (goty1.size() != 1 || goty2.size() != 1) begin
        failures++;
        $display("FAIL filter: %0d and %0d outputs", goty1.size(), goty2.size());
      end else begin
        y = int'(signed'(16'(goty1[0])));
        checks += 2;
        if (y != yd) begin failures++; $display("FAIL CALB1 y[%0d] = %0d expected %0d", n, y, yd); end
        y = int'(signed'(16'(goty2[0])));
        if (y != yd) begin failures++; $display("FAIL CALB2 y[%0d] = %0d expected %0d", n, y, yd); end
      end
      compare_outputs("filter");
    end

    // ---- part 2: random configurations and programs
    for (int k = 0; k < N1; k++) write_cfg1(k, calb1_cfg_t'($urandom()));
    for (int k = 0; k < N2; k++) write_cfg2(k, calb2_cfg_t'($urandom()));
    saw_sub = 1'b0; saw_shift = 1'b0;
    for (int k = 0; k < N1; k++) begin saw_sub |= |cfg1[k].x; saw_shift |= |cfg1[k].s; end
    for (int k = 0; k < N2; k++) begin saw_sub |= cfg2[k].x; saw_shift |= |cfg2[k].s; end
    for (int i = 0; i < NT; i++) begin
      tm1[i] = $urandom_range(0, WD - 1);
      tm2[i] = $urandom_range(0, WD - 1);
    end
    write_maps();
    for (int t = 0; t < 12; t++) begin
      bit full;
      full = (t == 11);
      len1 = full ? PD : $urandom_range(8, PD);
      len2 = full ? PD : $urandom_range(8, PD);
      random_prog(1, len1, !full, prog1);
      random_prog(2, len2, !full, prog2);
      write_progs();
      for (int s = 0; s < 3; s++) run($urandom_range(0, 255), $urandom_range(0, 255));
      if (full) n_runout++;
      repeat (3) @(posedge clk);
      #1;
      compare_outputs("random");
    end

    // ---- every mechanism must have happened
    begin
      automatic string names [12] = '{"input source", "CALB source", "W-memory read", "CALB to CALB",
                            "multi-destination load", "W-memory write", "output word",
                            "ignored start", "run to last address", "subtract and shift",
                            "filter output y", "product buffer overflow"};
      int    counts [12];
      counts = '{n_src_input, n_src_calb, n_src_wmem, n_c2c, n_multi, n_wwrite, n_out,
                 n_ignored_start, n_runout, int'(saw_sub && saw_shift), n_y, n_overflow};
      for (int i = 0; i < 12; i++) begin
        $display("mechanism %-24s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", names[i]); end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
