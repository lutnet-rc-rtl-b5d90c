// tb_lutnet_rc_memtasks: the short-term-memory (STM) and parity-check (PC) tasks run
// through the LUTNet-RC circuit with eight output neurons trained at once, at a reduced
// reservoir size (N_R = 300; other parameters at their defaults except N_O = 8).
//
// The input S_in[t] is a random bit, sent as input code 0 or 2^b_i - 1. Output k < 5 is
// trained for STM with delay k+1, y = S_in[t - d]; outputs 5..7 for PC with delay 1..3,
// y = (sum_{i=0..d} S_in[t-i]) mod 2. Ridge regression on the reference states (200
// washout, 1000 training samples) gives all eight readouts from one factorisation; they
// are rounded to 32-bit fixed point and written through the weight port. The testbench
// then streams the sequence, checks every output word bit-exactly and reports, over 500
// test samples, R^2 = Cov(y, o)^2 / (Var(y) Var(o)) per delay and their sums (the memory
// capacity scores). It fails on an inexact output or if the delay-1 STM R^2 is below 0.1,
// which would mean the readout learned nothing.
module tb_lutnet_rc_memtasks;
  import lutnet_rc_pkg::*;
  import tb_rc_ref_pkg::*;
  localparam int N_R = 300, N_O = 8, B_I = B_I_DEF, W = WRO_W_DEF;
  localparam int JW = $clog2(N_R + 1), KW = 3, HW = 2, CW = $clog2(N_R + 1);
  localparam int T_WASH = 200, T_TRAIN = 1000, T_TEST = 500;
  localparam int T_ALL = T_WASH + T_TRAIN + T_TEST;
  localparam int FRAC = 20;
  localparam real LAMBDA = 10.0;
  localparam int NF = N_R + 1;

  logic clk = 0, rst_n = 0;
  logic s_axis_tvalid = 0, s_axis_tready;
  logic [B_I-1:0] s_axis_tdata = '0;
  logic m_axis_tvalid, m_axis_tready = 1;
  logic [N_O*W-1:0] m_axis_tdata;
  logic wro_wr_en = 0;
  logic [KW+JW-1:0] wro_wr_addr = '0;
  logic [W-1:0] wro_wr_data = '0;
  logic [CW-1:0] calc_n;
  logic calc_full;
  logic [HW-1:0] calc_sel;
  int checks = 0, failures = 0;

  lutnet_rc_top #(.N_R(N_R), .N_O(N_O)) dut (
    .clk, .rst_n, .s_axis_tvalid, .s_axis_tready, .s_axis_tdata,
    .m_axis_tvalid, .m_axis_tready, .m_axis_tdata,
    .wro_wr_en, .wro_wr_addr, .wro_wr_data, .calc_n, .calc_full, .calc_sel);
  always #5 clk = ~clk;

  bit          sin [T_ALL];
  real         tgt [N_O][T_ALL];
  int unsigned wq [N_O][];
  int unsigned bq [N_O];
  int unsigned exp_o [T_ALL][N_O];
  int          n_out = 0;
  bit          trained = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: %0d outputs", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic train();
    rc_model m;
    real A [], bv [N_O][], f [], w [];
    bit  sb [];
    m = new(SEED_DEF, N_R, B_I);
    A = new[NF * NF]; f = new[NF]; w = new[NF];
    foreach (A[i]) A[i] = 0.0;
    for (int k = 0; k < N_O; k++) begin
      bv[k] = new[NF];
      foreach (bv[k][i]) bv[k][i] = 0.0;
      wq[k] = new[N_R];
    end
    for (int t = 0; t < T_ALL; t++) sin[t] = $urandom % 2;
    for (int t = 0; t < T_ALL; t++) begin
      for (int k = 0; k < 5; k++) tgt[k][t] = (t - (k + 1) >= 0) ? real'(sin[t - (k + 1)]) : 0.0;
      for (int k = 5; k < 8; k++) begin
        int par = 0;
        for (int i = 0; i <= k - 4; i++) if (t - i >= 0) par ^= sin[t - i];
        tgt[k][t] = real'(par);
      end
    end
    for (int t = 0; t < T_WASH + T_TRAIN; t++) begin
      m.step(sin[t] ? (1 << B_I) - 1 : 0);
      if (t >= T_WASH) begin
        for (int j = 0; j < N_R; j++) f[j] = m.st[j] ? 1.0 : -1.0;
        f[N_R] = 1.0;
        for (int a = 0; a < NF; a++) begin
          for (int k = 0; k < N_O; k++) bv[k][a] += f[a] * tgt[k][t];
          for (int b = a; b < NF; b++) A[a*NF + b] += f[a] * f[b];
        end
      end
    end
    for (int a = 0; a < NF; a++) begin
      A[a*NF + a] += LAMBDA;
      for (int b = 0; b < a; b++) A[a*NF + b] = A[b*NF + a];
    end
    // Cholesky factor A = L L^T (L in the lower triangle)
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
    for (int o = 0; o < N_O; o++) begin
      for (int i = 0; i < NF; i++) begin
        real s;
        s = bv[o][i];
        for (int k = 0; k < i; k++) s -= A[i*NF + k] * w[k];
        w[i] = s / A[i*NF + i];
      end
      for (int i = NF - 1; i >= 0; i--) begin
        real s;
        s = w[i];
        for (int k = i + 1; k < NF; k++) s -= A[k*NF + i] * w[k];
        w[i] = s / A[i*NF + i];
      end
      for (int j = 0; j < N_R; j++) wq[o][j] = int'(w[j] * real'(1 << FRAC));
      bq[o] = int'(w[N_R] * real'(1 << FRAC));
    end
    m.reset();
    sb = new[N_R];
    for (int t = 0; t < T_ALL; t++) begin
      m.step(sin[t] ? (1 << B_I) - 1 : 0);
      foreach (sb[j]) sb[j] = m.st[j];
      for (int o = 0; o < N_O; o++) exp_o[t][o] = readout(bq[o], wq[o], sb);
    end
  endtask

  initial begin
    train();
    trained = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o < N_O; o++)
      for (int j = 0; j <= N_R; j++) begin
        @(negedge clk);
        wro_wr_en = 1; wro_wr_addr = {KW'(o), JW'(j)};
        wro_wr_data = (j < N_R) ? wq[o][j] : bq[o];
      end
    @(negedge clk); wro_wr_en = 0;
    for (int t = 0; t < T_ALL; t++) begin
      bit fire;
      @(negedge clk);
      s_axis_tvalid = 1; s_axis_tdata = sin[t] ? B_I'((1 << B_I) - 1) : '0;
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
    real sy [N_O], so [N_O], syy [N_O], soo [N_O], syo [N_O];
    for (int k = 0; k < N_O; k++) begin sy[k] = 0; so[k] = 0; syy[k] = 0; soo[k] = 0; syo[k] = 0; end
    wait (trained && rst_n);
    forever begin
      @(negedge clk); #2;
      if (m_axis_tvalid) begin
        for (int k = 0; k < N_O; k++) begin
          logic [W-1:0] ow;
          real ov;
          ow = m_axis_tdata[k*W +: W];
          checks++;
          if (ow !== exp_o[n_out][k]) begin
            failures++;
            if (failures < 6) $display("sample %0d out %0d: %h exp %h", n_out, k, ow, exp_o[n_out][k]);
          end
          if (n_out >= T_WASH + T_TRAIN) begin
            ov = real'($signed(ow)) / real'(1 << FRAC);
            sy[k] += tgt[k][n_out]; so[k] += ov;
            syy[k] += tgt[k][n_out] ** 2; soo[k] += ov * ov; syo[k] += tgt[k][n_out] * ov;
          end
        end
        n_out++;
        if (n_out == T_ALL) begin
          real r2 [N_O], mc_stm, mc_pc;
          mc_stm = 0; mc_pc = 0;
          for (int k = 0; k < N_O; k++) begin
            real cov, vy, vo;
            cov = syo[k] / T_TEST - (sy[k] / T_TEST) * (so[k] / T_TEST);
            vy  = syy[k] / T_TEST - (sy[k] / T_TEST) ** 2;
            vo  = soo[k] / T_TEST - (so[k] / T_TEST) ** 2;
            r2[k] = (vy > 0 && vo > 0) ? cov * cov / (vy * vo) : 0.0;
            if (k < 5) mc_stm += r2[k]; else mc_pc += r2[k];
            $display("%s delay %0d: R^2 = %0.3f", (k < 5) ? "STM" : "PC ", (k < 5) ? k + 1 : k - 4, r2[k]);
          end
          $display("MC_STM (delays 1-5) = %0.3f, MC_PC (delays 1-3) = %0.3f", mc_stm, mc_pc);
          checks++;
          if (r2[0] < 0.1) begin failures++; $display("STM delay 1 not learned"); end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
      @(posedge clk);
    end
  end
endmodule
