// lutnet_rc_pkg: shared constants and elaboration-time functions of the LUTNet-RC design.
//
// The reservoir is a fixed random network. Its connections and weights are never stored in
// memory; they are worked out while the design elaborates and frozen into truth tables, in
// the way an FPGA LUT holds its contents. Every random quantity is taken from a stateless
// 32-bit hash of (seed, neuron, slot, try), so each neuron's table can be computed on its
// own without replaying a random sequence.
//
// Model (multi-bit weight reservoir, binary states):
//   x_i[t] = sum_{k<6} W'rr_{i,k} * s_{src(i,k)}[t-1] + W'ir_i * u[t]
//   s_i[t] = +1 if x_i[t] >= 0, else -1
// with W'rr uniform in [-r_rr(1-p), r_rr*p] and, for a fraction C_ir of the neurons, W'ir
// uniform in [-r_ir, r_ir]; the other neurons get no input. The defaults follow the
// published main configuration (N_r = 1500, k = 6, p = 0.665, r_rr = 4, C_ir = 0.15,
// r_ir = 20, b_i = 10, 32-bit W_ro, N_DMACC = 4).
//
// Own choices: the hash, weights quantised to WFRAC = 8 fraction bits, the input code u of
// b_i bits read as an unsigned fraction code / 2^b_i in [0, 1), the state bit 1 standing
// for s = +1 and 0 for s = -1, and the k sources of a neuron being distinct and not the
// neuron itself.
package lutnet_rc_pkg;

  // Published main configuration
  localparam int N_R_DEF     = 1500;  // reservoir neurons
  localparam int N_O_DEF     = 1;     // output neurons
  localparam int B_I_DEF     = 10;    // input bit width b_i
  localparam int K_FANIN     = 6;     // reservoir inputs per neuron (LUT6)
  localparam int WRO_W_DEF   = 32;    // W_ro bit width
  localparam int N_DMACC_DEF = 4;     // past states compared by M-DMACC
  localparam int P_MILLI     = 665;   // asymmetry p x 1000
  localparam int R_RR        = 4;     // r_rr
  localparam int R_IR        = 20;    // r_ir
  localparam int C_IR_MILLI  = 150;   // C_ir x 1000

  // Own choices
  localparam int WFRAC       = 8;     // fraction bits of the quantised weights
  localparam int unsigned SEED_DEF = 32'h1234_5678;

  // Stateless 32-bit hash (integer finaliser) of a seed and three indices.
  function automatic int unsigned rc_hash(int unsigned seed, int unsigned a,
                                          int unsigned b, int unsigned c);
    int unsigned x;
    x = seed ^ (a * 32'h9E37_79B1) ^ (b * 32'h85EB_CA77) ^ (c * 32'hC2B2_AE3D);
    x = x ^ (x >> 16);
    x = x * 32'h7FEB_352D;
    x = x ^ (x >> 15);
    x = x * 32'h846C_A68B;
    x = x ^ (x >> 16);
    return x;
  endfunction

  // Source neuron of fan-in slot k of neuron i: distinct over k, never i itself.
  function automatic int src_index(int unsigned seed, int n_r, int i, int k);
    int cand [K_FANIN];
    bit ok;
    for (int kk = 0; kk <= k; kk++) begin
      for (int t = 0; t < 1000; t++) begin
        cand[kk] = int'(rc_hash(seed, i, kk, t) % n_r);
        ok = (cand[kk] != i);
        for (int q = 0; q < kk; q++) if (cand[q] == cand[kk]) ok = 1'b0;
        if (ok) break;
      end
    end
    return cand[k];
  endfunction

  // Quantised W'rr_{i,k}, scaled by 2^WFRAC: uniform in [-r_rr(1-p), r_rr p].
  function automatic int wrr_q(int unsigned seed, int i, int k);
    longint u24, num;
    u24 = longint'(rc_hash(seed, i, k, 32'hA5A5)) & 64'h00FF_FFFF;
    num = longint'(R_RR) * (u24 * 1000 - (longint'(1000) - longint'(P_MILLI)) * (longint'(1) << 24))
          * (longint'(1) << WFRAC);
    return int'(num / (longint'(1000) * (longint'(1) << 24)));
  endfunction

  // Whether neuron i receives the input u (probability C_ir).
  function automatic bit has_input(int unsigned seed, int i);
    longint u24;
    u24 = longint'(rc_hash(seed, i, 100, 7)) & 64'h00FF_FFFF;
    return (u24 * 1000) < (longint'(C_IR_MILLI) << 24);
  endfunction

  // Quantised W'ir_i, scaled by 2^WFRAC: uniform in [-r_ir, r_ir].
  function automatic int wir_q(int unsigned seed, int i);
    longint u24;
    u24 = longint'(rc_hash(seed, i, 101, 9)) & 64'h00FF_FFFF;
    return int'((longint'(R_IR) * (2 * u24 - (longint'(1) << 24)) * (longint'(1) << WFRAC)) >>> 24);
  endfunction

  // Reservoir part of x_i (scaled by 2^WFRAC) for a pattern of the 6 source states.
  function automatic int res_sum(int unsigned seed, int i, logic [K_FANIN-1:0] pat);
    int acc;
    acc = 0;
    for (int k = 0; k < K_FANIN; k++)
      acc += pat[k] ? wrr_q(seed, i, k) : -wrr_q(seed, i, k);
    return acc;
  endfunction

  // 64-entry truth table of a neuron without input: entry p = (x >= 0).
  function automatic logic [63:0] lut6_table(int unsigned seed, int i);
    logic [63:0] t;
    for (int p = 0; p < 64; p++) t[p] = (res_sum(seed, i, 6'(p)) >= 0);
    return t;
  endfunction

  function automatic longint floor_div(longint a, longint b);  // b > 0
    longint q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  // Truth table of a neuron with input, stored in compressed exact form. For a fixed
  // pattern p of the 6 source states, x >= 0 is a monotonic function of the input code,
  // so the 2^(6+b_i)-entry table reduces, per p, to a threshold T[p] in [0, 2^b_i]:
  //   y = ({1'b0, code} >= T[p]) XOR inv,   inv = (W'ir < 0).
  // Entry p occupies bits [p*(b_i+1) +: b_i+1]; bit 64*(b_i+1) holds inv.
  function automatic logic [64*17:0] lut_in_table(int unsigned seed, int i, int b_i);
    logic [64*17:0] t;
    longint r, w, th, lim;
    t = '0;
    w = longint'(wir_q(seed, i));
    lim = longint'(1) << b_i;
    for (int p = 0; p < 64; p++) begin
      r = longint'(res_sum(seed, i, 6'(p))) << b_i;
      if (w > 0)      th = -floor_div(r, w);
      else if (w < 0) th = floor_div(r, -w) + 1;
      else            th = (r >= 0) ? 0 : lim;
      if (th < 0) th = 0;
      if (th > lim) th = lim;
      for (int b = 0; b <= b_i; b++) t[p*(b_i+1) + b] = th[b];
    end
    t[64*(b_i+1)] = (w < 0);
    return t;
  endfunction

endpackage
