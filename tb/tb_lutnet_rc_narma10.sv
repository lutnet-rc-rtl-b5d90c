// tb_lutnet_rc_narma10: the NARMA10 benchmark run through the LUTNet-RC circuit at its full
// default size (1500 reservoir neurons), including readout training.
//
// 1. Draws u[t] uniform in [0, 0.5) (input codes 0..511) and the NARMA10 target
//    y[t+1] = 0.3 y[t] + 0.05 y[t] sum_{j=0..9} y[t-j] + 1.5 u[t] u[t-9] + 0.1.
// 2. Runs the reference reservoir model over washout (200), training (1000) and test (500)
//    samples and trains the readout by ridge regression,
//    W_ro = (X^T X + lambda I)^-1 X^T d, with the states (+-1) and a constant 1 as features,
//    as a host processor would. The weights are rounded to 32-bit fixed point with FRAC
//    fraction bits and written into the circuit through its weight port.
// 3. Streams the whole sequence through the circuit, checks every output bit-exactly
//    against the quantised readout of the reference states, and reports MSE, NMSE, RMSE and
//    NRMSE over the test samples, next to the NMSE of always predicting the test mean.
// It fails on any inexact output or if the NMSE is not below 1 (the all-zero predictor).
module tb_lutnet_rc_narma10;
  import lutnet_rc_pkg::*;
  import tb_rc_ref_pkg::*;
  localparam int N_R = N_R_DEF, B_I = B_I_DEF, W = WRO_W_DEF;
  localparam int JW = $clog2(N_R + 1), KW = 1, HW = 2, CW = $clog2(N_R + 1);
  localparam int T_WASH = 200, T_TRAIN = 1000, T_TEST = 500;
  localparam int T_ALL = T_WASH + T_TRAIN + T_TEST;
  localparam int FRAC = 20;
  localparam real LAMBDA = 100.0;
  localparam int NF = N_R + 1;

  logic clk = 0, rst_n = 0;
  logic s_axis_tvalid = 0, s_axis_tready;
  logic [B_I-1:0] s_axis_tdata = '0;
  logic m_axis_tvalid, m_axis_tready = 1;
  logic [W-1:0] m_axis_tdata;
  logic wro_wr_en = 0;
  logic [KW+JW-1:0] wro_wr_addr = '0;
  logic [W-1:0] wro_wr_data = '0;
  logic [CW-1:0] calc_n;
  logic calc_full;
  logic [HW-1:0] calc_sel;
  int checks = 0, failures = 0;

  lutnet_rc_top dut (
    .clk, .rst_n, .s_axis_tvalid, .s_axis_tready, .s_axis_tdata,
    .m_axis_tvalid, .m_axis_tready, .m_axis_tdata,
    .wro_wr_en, .wro_wr_addr, .wro_wr_data, .calc_n, .calc_full, .calc_sel);
  always #5 clk = ~clk;

  int          code [T_ALL];
  real         y [T_ALL + 1];
  int unsigned wq [];
  int unsigned bq;
  int unsigned exp_o [T_ALL];
  int          n_out = 0;
  bit          trained = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: %0d outputs", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic train();
    rc_model m;
    real A [], bv [], f [], w [];
    bit  sb [];
    m = new(SEED_DEF, N_R, B_I);
    A = new[NF * NF]; bv = new[NF]; f = new[NF]; w = new[NF];
    foreach (A[i]) A[i] = 0.0;
    foreach (bv[i]) bv[i] = 0.0;
    wq = new[N_R];
    // NARMA10 series: y[t+1] from u[0..t]; a rare diverging draw is replaced
    for (int tries = 0; tries < 20; tries++) begin
    real ymax;
    for (int t = 0; t <= T_ALL; t++) y[t] = 0.0;
    for (int t = 0; t < T_ALL; t++) begin
      real s10;
      code[t] = int'($urandom % (1 << (B_I - 1)));
      s10 = 0.0;
      for (int j = 0; j < 10; j++) if (t - j >= 0) s10 += y[t - j];
      y[t + 1] = 0.3 * y[t] + 0.05 * y[t] * s10
                 + ((t >= 9) ? 1.5 * (real'(code[t]) / 1024.0) * (real'(code[t - 9]) / 1024.0) : 0.0)
                 + 0.1;
    end
    ymax = 0.0;
    for (int t = 0; t <= T_ALL; t++) if (!(y[t] < ymax)) ymax = y[t];
    $display("NARMA10 draw %0d: max y = %0.3f", tries, ymax);
    if (ymax < 1.0) break;
    end
    // collect X^T X and X^T d over the training samples (upper triangle)
    for (int t = 0; t < T_WASH + T_TRAIN; t++) begin
      m.step(code[t]);
      if (t >= T_WASH) begin
        for (int j = 0; j < N_R; j++) f[j] = m.st[j] ? 1.0 : -1.0;
        f[N_R] = 1.0;
        for (int a = 0; a < NF; a++) begin
          bv[a] += f[a] * y[t + 1];
          if (f[a] > 0.0) for (int b = a; b < NF; b++) A[a*NF + b] += f[b];
          else            for (int b = a; b < NF; b++) A[a*NF + b] -= f[b];
        end
      end
    end
    for (int a = 0; a < NF; a++) begin
      A[a*NF + a] += LAMBDA;
      for (int b = 0; b < a; b++) A[a*NF + b] = A[b*NF + a];
    end
    // Cholesky solve of the symmetric positive definite system A w = bv
    for (int j = 0; j < NF; j++) begin
      real s;
      s = A[j*NF + j];
      for (int k = 0; k < j; k++) s -= A[j*NF + k] * A[j*NF + k];
      A[j*NF + j] = $sqrt(s);
      for (int i = j + 1; i < NF; i++) begin
        real r;
        r = A[i*NF + j];
        for (int k = 0; k < j; k++) r -= A[i*NF + k] * A[j*NF + k];
        A[i*NF + j] = r / A[j*NF + j];
      end
    end
    for (int i = 0; i < NF; i++) begin
      real s;
      s = bv[i];
      for (int k = 0; k < i; k++) s -= A[i*NF + k] * w[k];
      w[i] = s / A[i*NF + i];
    end
    for (int i = NF - 1; i >= 0; i--) begin
      real s;
      s = w[i];
      for (int k = i + 1; k < NF; k++) s -= A[k*NF + i] * w[k];
      w[i] = s / A[i*NF + i];
    end
    for (int j = 0; j < N_R; j++) wq[j] = int'(w[j] * real'(1 << FRAC));
    bq = int'(w[N_R] * real'(1 << FRAC));
    // expected circuit outputs: quantised readout of the reference states
    m.reset();
    sb = new[N_R];
    for (int t = 0; t < T_ALL; t++) begin
      m.step(code[t]);
      foreach (sb[j]) sb[j] = m.st[j];
      exp_o[t] = readout(bq, wq, sb);
    end
  endtask

  initial begin
    train();
    trained = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j <= N_R; j++) begin
      @(negedge clk);
      wro_wr_en = 1; wro_wr_addr = {KW'(0), JW'(j)};
      wro_wr_data = (j < N_R) ? wq[j] : bq;
    end
    @(negedge clk); wro_wr_en = 0;
    for (int t = 0; t < T_ALL; t++) begin
      bit fire;
      @(negedge clk);
      s_axis_tvalid = 1; s_axis_tdata = B_I'(code[t]);
      fire = 0;
      while (!fire) begin
        #2; fire = s_axis_tready;
        @(posedge clk); #1;
        if (!fire) @(negedge clk);
      end
      s_axis_tvalid = 0;
    end
  end

  initial begin
    real se, sy2, sy, sm, mean, ypred;
    se = 0; sy2 = 0; sy = 0; sm = 0;
    wait (trained && rst_n);
    forever begin
      @(negedge clk); #2;
      if (m_axis_tvalid) begin
        checks++;
        if (m_axis_tdata !== exp_o[n_out]) begin
          failures++;
          if (failures < 6) $display("sample %0d: out %h exp %h", n_out, m_axis_tdata, exp_o[n_out]);
        end
        if (n_out >= T_WASH + T_TRAIN) begin
          ypred = real'($signed(m_axis_tdata)) / real'(1 << FRAC);
          se  += (y[n_out + 1] - ypred) ** 2;
          sy2 += y[n_out + 1] ** 2;
          sy  += y[n_out + 1];
          sm  += ypred;
        end
        n_out++;
        if (n_out == T_ALL) begin
          real mse, nmse, var_y;
          mean = sy / T_TEST;
          mse = se / T_TEST;
          nmse = se / sy2;
          var_y = sy2 / T_TEST - mean * mean;
          $display("NARMA10 test (%0d samples, %0d neurons): MSE=%0.5f NMSE=%0.5f RMSE=%0.5f NRMSE=%0.5f",
                   T_TEST, N_R, mse, nmse, $sqrt(mse), $sqrt(mse) / (sm / T_TEST));
          $display("predicting the test mean would give NMSE=%0.5f", var_y * T_TEST / sy2);
          checks++;
          if (!(nmse < 1.0)) begin failures++; $display("readout did not learn"); end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
      @(posedge clk);
    end
  end
endmodule
