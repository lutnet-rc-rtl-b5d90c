// tb_rc_ref_pkg: reference model of the LUTNet-RC reservoir and readout for testbenches.
//
// The reservoir model evaluates each neuron directly from its weights,
//   x_i = sum_k W'rr_{i,k} * s_src(i,k) * 2^b_i + W'ir_i * code,  s_i = (x_i >= 0),
// using only the weight, wiring and input-selection functions of lutnet_rc_pkg and none of
// its truth-table functions, so it checks the table construction as well as the RTL.
// The readout model computes o = b + sum_j s_j * w_j in 32-bit wrapping arithmetic.
package tb_rc_ref_pkg;
  import lutnet_rc_pkg::*;

  class rc_model;
    int          n_r, b_i;
    int unsigned seed;
    int          src[];   // n_r * 6
    int          wrr[];   // n_r * 6
    bit          hin[];
    int          wir[];
    bit          st[];

    function new(int unsigned seed_i, int n_r_i, int b_i_i);
      seed = seed_i; n_r = n_r_i; b_i = b_i_i;
      src = new[n_r * K_FANIN];
      wrr = new[n_r * K_FANIN];
      hin = new[n_r];
      wir = new[n_r];
      st  = new[n_r];
      for (int i = 0; i < n_r; i++) begin
        for (int k = 0; k < K_FANIN; k++) begin
          src[i*K_FANIN+k] = src_index(seed, n_r, i, k);
          wrr[i*K_FANIN+k] = wrr_q(seed, i, k);
        end
        hin[i] = has_input(seed, i);
        wir[i] = wir_q(seed, i);
        st[i]  = 1'b0;
      end
    endfunction

    function void reset();
      foreach (st[i]) st[i] = 1'b0;
    endfunction

    function void step(int code);
      bit nx[];
      longint x;
      nx = new[n_r];
      for (int i = 0; i < n_r; i++) begin
        x = 0;
        for (int k = 0; k < K_FANIN; k++)
          x += st[src[i*K_FANIN+k]] ? longint'(wrr[i*K_FANIN+k]) : -longint'(wrr[i*K_FANIN+k]);
        x = x <<< b_i;
        if (hin[i]) x += longint'(wir[i]) * code;
        nx[i] = (x >= 0);
      end
      st = nx;
    endfunction

    function int n_inputs();
      int c = 0;
      foreach (hin[i]) c += hin[i];
      return c;
    endfunction
  endclass

  // o = b + sum_j s_j w_j, s_j = +1 for bit 1 and -1 for bit 0
  function automatic int unsigned readout(int unsigned b, int unsigned w[], bit s[]);
    int unsigned acc = b;
    foreach (s[j]) acc = s[j] ? acc + w[j] : acc - w[j];
    return acc;
  endfunction
endpackage
