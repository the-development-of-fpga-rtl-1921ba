// pof_tb_pkg: reference models shared by the testbenches.
//
// ref_calb1/ref_calb2 compute a CALB's output from its register contents,
// configuration and OS code with plain integer arithmetic (results reduced
// modulo 256), written node by node from the CALB network description,
// independently of the RTL's helper functions.
package pof_tb_pkg;
  import pof_pkg::*;

  function automatic int m8(input int v);
    return v & 255;
  endfunction

  function automatic int as(input int a, input int b, input bit sub);
    return m8(sub ? a - b : a + b);
  endfunction

  function automatic int ref_calb1(input int q0, input int q1, input int q2, input int q3,
                                   input calb1_cfg_t cfg, input int os);
    int n [8];  // output mux inputs in OS order
    int sh1, sh2, sh3, sh4, a1, a2, a3, a4;
    sh1 = m8((cfg.c[1] ? q0 : q1) * (1 << cfg.s[1]));
    sh2 = m8((cfg.c[7] ? q2 : q3) * (1 << cfg.s[2]));
    a2  = as(cfg.c[3] ? q1 : sh1, cfg.c[9] ? q2 : sh2, cfg.x[2]);
    a1  = as(cfg.c[2] ? q0 : sh1, cfg.c[4] ? a2 : sh1, cfg.x[1]);
    a3  = as(cfg.c[10] ? a2 : sh2, cfg.c[8] ? q3 : sh2, cfg.x[3]);
    sh3 = m8((cfg.c[6] ? a1 : a2) * (1 << cfg.s[3]));
    sh4 = m8((cfg.c[12] ? a2 : a3) * (1 << cfg.s[4]));
    a4  = as(cfg.c[5] ? a1 : a2, cfg.c[11] ? a2 : a3, cfg.x[4]);
    n = '{sh1, a1, sh3, a4, a2, sh4, a3, sh2};
    return n[os & 7];
  endfunction

  function automatic int ref_calb2(input int q0, input int q1,
                                   input calb2_cfg_t cfg, input int os);
    int sh1, sh2, sum;
    sh1 = m8(q0 * (1 << cfg.s[1]));
    sh2 = m8(q1 * (1 << cfg.s[2]));
    sum = as(cfg.c[1] ? q0 : sh1, cfg.c[2] ? q1 : sh2, cfg.x);
    if (os == 0) return sh1;
    if (os == 2) return sh2;
    return sum;
  endfunction

  // Configuration for the {1, 9, 17} example on one CALB1 (registers 0 and
  // 2 hold x): SH1 = x<<3 = 8x, A2 = SH1 + Q2 = 9x, A1 = SH1 + A2 = 17x,
  // SH2 = Q2<<0 = x.  Outputs: OS 7 -> x, OS 4 -> 9x, OS 1 -> 17x.
  function automatic calb1_cfg_t cfg_c1_1_9_17();
    calb1_cfg_t c;
    c = '0;
    c.c[1] = 1'b1; c.s[1] = 3'd3;   // SH1 = Q0 << 3
    c.c[7] = 1'b1; c.s[2] = 3'd0;   // SH2 = Q2
    c.c[3] = 1'b0; c.c[9] = 1'b1;   // A2 = SH1 + Q2
    c.c[2] = 1'b0; c.c[4] = 1'b1;   // A1 = SH1 + A2
    return c;
  endfunction

  // First CALB2 of the example: Q0 = Q1 = x, SH1 = 8x, sum = SH1 + Q1 = 9x.
  function automatic calb2_cfg_t cfg_c2_a();
    calb2_cfg_t c;
    c = '0;
    c.s[1] = 3'd3; c.c[1] = 1'b0; c.c[2] = 1'b1;
    return c;
  endfunction

  // Second CALB2: Q0 = 9x, Q1 = 8x, sum = Q0 + Q1 = 17x.
  function automatic calb2_cfg_t cfg_c2_b();
    calb2_cfg_t c;
    c = '0;
    c.c[1] = 1'b1; c.c[2] = 1'b1;
    return c;
  endfunction

endpackage
