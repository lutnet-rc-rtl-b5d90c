// tb_lutnet_rc_full: the LUTNet-RC circuit at its full default size (1500 reservoir
// neurons, b_i = 10, 32-bit W_ro, N_DMACC = 4) running a NARMA10-style input stream.
//
// NARMA10 drives the reservoir with u[t] uniform in [0, 0.5]; here that is the input code
// u * 2^b_i, uniform in [0, 512). The testbench streams N_SAMPLES such samples (1500, the
// length of the training plus test sequence) back to back with the result stream always
// ready, checks every result against the reference model with random readout weights
// (trained weights would come from ridge regression on a host and are not needed to check
// the arithmetic), and reports the pass statistics and the average number of clocks per
// sample, i.e. the throughput at a 100 MHz clock. For comparison it also counts, from the
// reference states, how many neurons a single-state DMACC (previous state only) would have
// to accumulate. It fails unless the M-DMACC passes accumulate no more neurons than that,
// and fewer clocks are spent per sample than the N_R a plain time-division pass needs.
// The number of changed neurons, and so the rate, depends on the random network drawn.
module tb_lutnet_rc_full;
  import lutnet_rc_pkg::*;
  import tb_rc_ref_pkg::*;
  localparam int N_R = N_R_DEF, B_I = B_I_DEF, W = WRO_W_DEF, N_DMACC = N_DMACC_DEF;
  localparam int JW = $clog2(N_R + 1), KW = 1, HW = 2, CW = $clog2(N_R + 1);
  localparam int N_SAMPLES = 1500;

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

  rc_model m;
  int unsigned wt [];
  int unsigned bias;
  int unsigned exp_o [$];
  int n_out = 0, n_in = 0, n_full = 0, n_older = 0;
  longint sum_n = 0, sum_s = 0, cyc = 0, cyc_first = 0;
  bit prev_st [];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: %0d in, %0d out", n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    m = new(SEED_DEF, N_R, B_I);
    wt = new[N_R];
    $display("reservoir: %0d neurons, %0d with input", N_R, m.n_inputs());
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j <= N_R; j++) begin
      @(negedge clk);
      wro_wr_en = 1; wro_wr_addr = {KW'(0), JW'(j)}; wro_wr_data = $urandom;
      if (j < N_R) wt[j] = wro_wr_data; else bias = wro_wr_data;
    end
    @(negedge clk); wro_wr_en = 0;
    while (n_in < N_SAMPLES) begin
      bit fire;
      @(negedge clk);
      if (!s_axis_tvalid) begin
        s_axis_tvalid = 1;
        s_axis_tdata = B_I'($urandom % (1 << (B_I - 1)));  // u in [0, 0.5)
      end
      #2;
      fire = s_axis_tready;
      @(posedge clk); #1;
      if (fire) begin
        bit sb [];
        n_in++;
        m.step(int'(s_axis_tdata));
        sb = new[N_R];
        foreach (sb[j]) sb[j] = m.st[j];
        if (n_in > 1) foreach (sb[j]) sum_s += (sb[j] != prev_st[j]);
        prev_st = sb;
        exp_o.push_back(readout(bias, wt, sb));
        s_axis_tvalid = 0;
      end
    end
  end

  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk); #2;
      if (m_axis_tvalid) begin
        checks++;
        if (m_axis_tdata !== exp_o[0]) begin
          failures++;
          if (failures < 6) $display("sample %0d: out %h exp %h", n_out, m_axis_tdata, exp_o[0]);
        end
        void'(exp_o.pop_front());
        if (calc_full) n_full++; else if (calc_sel != 0) n_older++;
        sum_n += calc_n;
        if (n_out == 0) cyc_first = cyc;
        n_out++;
        if (n_out == N_SAMPLES) begin
          real avg;
          avg = real'(cyc - cyc_first) / real'(N_SAMPLES - 1);
          $display("samples=%0d full_passes=%0d older_state_chosen=%0d", n_out, n_full, n_older);
          $display("average neurons per pass: M-DMACC %0.1f, previous-state-only DMACC %0.1f, plain %0d",
                   real'(sum_n - N_R) / real'(N_SAMPLES - 1), real'(sum_s) / real'(N_SAMPLES - 1), N_R);
          $display("average clocks per sample = %0.1f -> %0.2f Msps at 100 MHz", avg, 100.0 / avg);
          checks++;
          if (n_full != 1) failures++;
          checks++;
          if (sum_n - N_R > sum_s) begin failures++; $display("M-DMACC accumulated more than S-DMACC"); end
          checks++;
          if (avg >= real'(N_R)) begin failures++; $display("no speed-up over plain time division"); end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
      @(posedge clk);
    end
  end
endmodule
