// Reference models of the hybrid logic blocks, for the testbenches.
//
// Each function computes what a block must output straight from its
// configuration bits, written from the specification of the element
// (truth-table lookup, d[s] xor inversion cell, 50% crossbar pattern) and
// not from the RTL structure. The cluster models evaluate the BLEs in index
// order, which is exact for the acyclic configurations that the generators
// below produce: an unregistered BLE output only feeds BLEs of higher index.
package tb_ref_pkg;

  // Default geometry of the two clusters
  localparam int NF_I = 40, NF_N = 10, NF_SEL = 5, NF_REACH = 25;
  localparam int NF_BLECFG = 5 + 9 * 65;                  // 590 (1 MUX4 BLE)
  localparam int NF_CFG    = NF_BLECFG + 60 * NF_SEL;     // 890
  localparam int FR_I = 80, FR_N = 10, FR_SEL = 6, FR_REACH = 50;
  localparam int FR_BLECFG = 10 + 9 * 67;                 // 613
  localparam int FR_CFG    = FR_BLECFG + 80 * FR_SEL;     // 1093
  // Widest configuration over the mixes 1:9 .. 10:0 (the models take the
  // number of MUX4-type BLEs, m, as an argument, default 1)
  localparam int CFG_MAX   = 2048;

  function automatic bit ref_mux4(bit [3:0] d, bit [1:0] s, bit [3:0] inv);
    return d[s] ^ inv[s];
  endfunction

  // Fracturable LUT6: pins {B[2:0], A[2:0], shared[1:0]}
  function automatic bit [1:0] ref_frac(bit [7:0] in, bit [63:0] t, bit mode);
    bit [1:0] o;
    if (mode) begin
      o[0] = t[in[5:0]];
      o[1] = t[32 + int'(in[4:0])];
    end else begin
      o[0] = t[in[4:0]];
      o[1] = t[32 + int'({in[7:5], in[1:0]})];
    end
    return o;
  endfunction

  function automatic bit [1:0] ref_dual(bit [7:0] in, bit [7:0] inv);
    bit [1:0] o;
    o[0] = in[in[5:4]] ^ inv[in[5:4]];
    o[1] = in[in[7:6]] ^ inv[4 + int'(in[7:6])];
    return o;
  endfunction

  // 50% crossbar: code c of pin p selects source 2c + p%2, else 0
  function automatic bit ref_xbar(bit [127:0] src, int n_reach, int p, int code);
    if (code >= n_reach) return 1'b0;
    return src[2 * code + (p % 2)];
  endfunction

  // ---------------- non-fracturable cluster ----------------
  function automatic int nf_blecfg(int m = 1);
    return m * 5 + (NF_N - m) * 65;
  endfunction
  function automatic int nf_cfgw(int m = 1);
    return nf_blecfg(m) + 60 * NF_SEL;
  endfunction
  function automatic int nf_off(int b, int m = 1);
    return (b < m) ? b * 5 : m * 5 + (b - m) * 65;
  endfunction
  function automatic bit nf_reg(bit [CFG_MAX-1:0] cfg, int b, int m = 1);
    return (b < m) ? cfg[nf_off(b, m) + 4] : cfg[nf_off(b, m) + 64];
  endfunction
  function automatic int nf_code(bit [CFG_MAX-1:0] cfg, int p, int m = 1);
    return int'(cfg[nf_blecfg(m) + p * NF_SEL +: NF_SEL]);
  endfunction

  // out: cluster outputs now; nq: register values after the next clk edge
  function automatic void nf_eval(bit [CFG_MAX-1:0] cfg, bit [NF_I-1:0] in, bit [NF_N-1:0] q,
                                  output bit [NF_N-1:0] out, output bit [NF_N-1:0] nq, input int m = 1);
    bit [127:0] src = '0;
    bit [5:0] pins;
    bit comb;
    src[NF_I-1:0] = in;
    for (int b = 0; b < NF_N; b++) if (nf_reg(cfg, b, m)) src[NF_I + b] = q[b];
    for (int b = 0; b < NF_N; b++) begin
      for (int j = 0; j < 6; j++) pins[j] = ref_xbar(src, NF_REACH, b * 6 + j, nf_code(cfg, b * 6 + j, m));
      if (b < m) comb = ref_mux4(pins[3:0], pins[5:4], cfg[nf_off(b, m) +: 4]);
      else       comb = cfg[nf_off(b, m) + int'(pins)];
      nq[b]  = comb;
      out[b] = nf_reg(cfg, b, m) ? q[b] : comb;
      if (!nf_reg(cfg, b, m)) src[NF_I + b] = comb;
    end
  endfunction

  // Random configuration with no loop through unregistered BLEs
  function automatic bit [CFG_MAX-1:0] nf_gen(int m = 1);
    bit [CFG_MAX-1:0] cfg = '0;
    for (int i = 0; i < nf_cfgw(m); i++) cfg[i] = 1'($urandom);
    for (int p = 0; p < 60; p++) begin
      int b = p / 6;
      int code;
      bit ok;
      do begin
        code = $urandom_range(0, 27);
        ok = 1;
        if (code < NF_REACH) begin
          int s = 2 * code + (p % 2);
          if (s >= NF_I && !(nf_reg(cfg, s - NF_I, m) || (s - NF_I) < b)) ok = 0;
        end
      end while (!ok);
      cfg[nf_blecfg(m) + p * NF_SEL +: NF_SEL] = NF_SEL'(code);
    end
    return cfg;
  endfunction

  // ---------------- fracturable cluster ----------------
  function automatic int fr_blecfg(int m = 1);
    return m * 10 + (FR_N - m) * 67;
  endfunction
  function automatic int fr_cfgw(int m = 1);
    return fr_blecfg(m) + 80 * FR_SEL;
  endfunction
  function automatic int fr_off(int b, int m = 1);
    return (b < m) ? b * 10 : m * 10 + (b - m) * 67;
  endfunction
  function automatic bit fr_reg(bit [CFG_MAX-1:0] cfg, int b, int o, int m = 1);
    return (b < m) ? cfg[fr_off(b, m) + 8 + o] : cfg[fr_off(b, m) + 65 + o];
  endfunction
  function automatic bit fr_mode(bit [CFG_MAX-1:0] cfg, int b, int m = 1);
    return (b < m) ? 1'b0 : cfg[fr_off(b, m) + 64];
  endfunction
  function automatic int fr_code(bit [CFG_MAX-1:0] cfg, int p, int m = 1);
    return int'(cfg[fr_blecfg(m) + p * FR_SEL +: FR_SEL]);
  endfunction

  function automatic void fr_eval(bit [CFG_MAX-1:0] cfg, bit [FR_I-1:0] in, bit [2*FR_N-1:0] q,
                                  output bit [2*FR_N-1:0] out, output bit [2*FR_N-1:0] nq, input int m = 1);
    bit [127:0] src = '0;
    bit [7:0] pins;
    bit [1:0] comb;
    src[FR_I-1:0] = in;
    for (int k = 0; k < 2 * FR_N; k++) if (fr_reg(cfg, k / 2, k % 2, m)) src[FR_I + k] = q[k];
    for (int b = 0; b < FR_N; b++) begin
      for (int j = 0; j < 8; j++) pins[j] = ref_xbar(src, FR_REACH, b * 8 + j, fr_code(cfg, b * 8 + j, m));
      if (b < m) comb = ref_dual(pins, cfg[fr_off(b, m) +: 8]);
      else       comb = ref_frac(pins, cfg[fr_off(b, m) +: 64], cfg[fr_off(b, m) + 64]);
      for (int o = 0; o < 2; o++) begin
        nq[2*b+o]  = comb[o];
        out[2*b+o] = fr_reg(cfg, b, o, m) ? q[2*b+o] : comb[o];
        if (!fr_reg(cfg, b, o, m)) src[FR_I + 2*b + o] = comb[o];
      end
    end
  endfunction

  function automatic bit [CFG_MAX-1:0] fr_gen(int m = 1);
    bit [CFG_MAX-1:0] cfg = '0;
    for (int i = 0; i < fr_cfgw(m); i++) cfg[i] = 1'($urandom);
    for (int p = 0; p < 80; p++) begin
      int b = p / 8;
      int code;
      bit ok;
      do begin
        code = $urandom_range(0, 52);
        ok = 1;
        if (code < FR_REACH) begin
          int s = 2 * code + (p % 2);
          if (s >= FR_I && !(fr_reg(cfg, (s - FR_I) / 2, (s - FR_I) % 2, m) || (s - FR_I) / 2 < b)) ok = 0;
        end
      end while (!ok);
      cfg[fr_blecfg(m) + p * FR_SEL +: FR_SEL] = FR_SEL'(code);
    end
    return cfg;
  endfunction

endpackage
