// tb_lutnet_rc_top: end-to-end test of the LUTNet-RC circuit at a reduced reservoir size
// (N_R = 200; all other parameters at their defaults).
//
// Loads random readout weights and biases, streams input samples with random gaps and
// random back-pressure on the result stream, and checks every result against the
// reference model (reservoir evaluated from its weights, then o = b + sum s_j w_j). It also
// models the output layer's history to check, per sample, whether a full pass or a DMACC
// pass was made, how many neurons were accumulated and which past state was chosen.
// Halfway the weights are rewritten, which must force a new full pass. Input segments
// alternate between random and constant samples (constant input drives the reservoir into
// short cycles, where an older state is the closest). Counted mechanisms: full pass,
// DMACC from the newest state, DMACC from an older state (M-DMACC),
// input stall, output back-pressure, weight rewrite; each must occur (zero-change passes
// are counted and reported only).
module tb_lutnet_rc_top;
  import lutnet_rc_pkg::*;
  import tb_rc_ref_pkg::*;
  localparam int N_R = 200;
  localparam int N_O = N_O_DEF, B_I = B_I_DEF, W = WRO_W_DEF, N_DMACC = N_DMACC_DEF;
  localparam int JW = $clog2(N_R + 1), KW = 1, HW = 2, CW = $clog2(N_R + 1);
  localparam int N_SAMPLES = 600;

  logic clk = 0, rst_n = 0;
  logic s_axis_tvalid = 0, s_axis_tready;
  logic [B_I-1:0] s_axis_tdata = '0;
  logic m_axis_tvalid, m_axis_tready = 0;
  logic [N_O*W-1:0] m_axis_tdata;
  logic wro_wr_en = 0;
  logic [KW+JW-1:0] wro_wr_addr = '0;
  logic [W-1:0] wro_wr_data = '0;
  logic [CW-1:0] calc_n;
  logic calc_full;
  logic [HW-1:0] calc_sel;
  int checks = 0, failures = 0;

  lutnet_rc_top #(.N_R(N_R)) dut (
    .clk, .rst_n, .s_axis_tvalid, .s_axis_tready, .s_axis_tdata,
    .m_axis_tvalid, .m_axis_tready, .m_axis_tdata,
    .wro_wr_en, .wro_wr_addr, .wro_wr_data, .calc_n, .calc_full, .calc_sel);
  always #5 clk = ~clk;

  rc_model m;
  int unsigned wt [];
  int unsigned bias;
  int unsigned exp_o [$];
  logic [N_R-1:0] exp_s [$];
  logic [N_R-1:0] hq [$];
  int n_out = 0, n_in = 0;
  int n_full = 0, n_sel0 = 0, n_old = 0, n_zero = 0, n_stall = 0, n_bp = 0, n_rewrite = 0;
  bit wr_phase = 0, random_phase = 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: %0d in, %0d out", n_in, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_weights();
    for (int j = 0; j <= N_R; j++) begin
      @(negedge clk);
      wro_wr_en = 1; wro_wr_addr = {KW'(0), JW'(j)}; wro_wr_data = $urandom;
      if (j < N_R) wt[j] = wro_wr_data; else bias = wro_wr_data;
    end
    @(negedge clk); wro_wr_en = 0;
    hq.delete();
  endtask

  // input driver
  initial begin
    int code;
    bit in_fire, in_stall;
    m = new(SEED_DEF, N_R, B_I);
    wt = new[N_R];
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_weights();
    code = 0;
    while (n_in < N_SAMPLES) begin
      @(negedge clk);
      if (n_in == N_SAMPLES / 2 && !wr_phase) begin
        // drain, then rewrite the weights while the circuit is idle
        s_axis_tvalid = 0;
        wait (n_out == n_in);
        repeat (3) @(negedge clk);
        load_weights(); n_rewrite++; wr_phase = 1;
        @(negedge clk);
      end
      if ((n_in % 40) == 0) random_phase = (n_in / 40) % 2 == 0;
      if (!s_axis_tvalid || s_axis_tready) begin
        s_axis_tvalid = ($urandom % 5) != 0;
        if (random_phase) code = int'($urandom % (1 << B_I));
        else if ((n_in % 40) == 0) code = int'($urandom % (1 << B_I));
        s_axis_tdata = B_I'(code);
      end
      #2;  // sample the handshake just before the rising edge
      in_fire = s_axis_tvalid && s_axis_tready;
      in_stall = s_axis_tvalid && !s_axis_tready;
      @(posedge clk); #1;
      if (in_fire) begin
        bit sb [];
        logic [N_R-1:0] sv;
        n_in++;
        m.step(int'(s_axis_tdata));
        sb = new[N_R];
        foreach (sb[j]) begin sb[j] = m.st[j]; sv[j] = m.st[j]; end
        exp_o.push_back(readout(bias, wt, sb));
        exp_s.push_back(sv);
        s_axis_tvalid = 0;
      end else if (in_stall) n_stall++;
    end
    @(negedge clk); s_axis_tvalid = 0;
  end

  // output checker
  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      m_axis_tready = ($urandom % 4) != 0;
      #2;  // sample the handshake just before the rising edge
      if (m_axis_tvalid && !m_axis_tready) n_bp++;
      if (m_axis_tvalid && m_axis_tready) begin
        logic [N_R-1:0] sv;
        int en, es;
        bit ef;
        sv = exp_s.pop_front();
        checks++;
        if (m_axis_tdata !== exp_o[0]) begin
          failures++;
          if (failures < 6) $display("sample %0d: out %h exp %h", n_out, m_axis_tdata, exp_o[0]);
        end
        void'(exp_o.pop_front());
        ef = (hq.size() == 0); en = N_R; es = 0;
        for (int h = 0; h < hq.size(); h++)
          if (h == 0 || $countones(sv ^ hq[h]) < en) begin en = $countones(sv ^ hq[h]); es = h; end
        checks++;
        if (calc_full !== ef || int'(calc_n) != en || (!ef && int'(calc_sel) != es)) begin
          failures++;
          if (failures < 6) $display("sample %0d: full=%b n=%0d sel=%0d exp %b %0d %0d", n_out, calc_full, calc_n, calc_sel, ef, en, es);
        end
        if (ef) n_full++; else if (en == 0) n_zero++; else if (es == 0) n_sel0++; else n_old++;
        hq.push_front(sv);
        if (hq.size() > N_DMACC) void'(hq.pop_back());
        n_out++;
        if (n_out == N_SAMPLES) begin
          $display("full=%0d dmacc_newest=%0d dmacc_older=%0d zero_change=%0d stall=%0d backpressure=%0d rewrite=%0d",
                   n_full, n_sel0, n_old, n_zero, n_stall, n_bp, n_rewrite);
          checks++;
          if (n_full != 2 || n_sel0 == 0 || n_old == 0 || n_stall == 0 || n_bp == 0 || n_rewrite == 0) begin
            failures++; $display("a mechanism did not occur as expected");
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
      @(posedge clk);
    end
  end
endmodule
