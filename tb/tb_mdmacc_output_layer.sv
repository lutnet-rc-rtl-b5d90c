// tb_mdmacc_output_layer: drives the output layer (N_R = 64, N_O = 2, N_DMACC = 4) with
// state sequences built to be close to the previous, or to an older, state, plus
// unrelated states and exact repeats. Checks every output against o = b + sum s_j w_j,
// the pass statistics against a model of the history (fewest changed neurons, ties to the
// newest), and the latency: accept -> o_valid takes n + 2 clocks for n > 0 changed neurons,
// 2 for n = 0, and N_R + 2 for a full pass. Weights are rewritten mid-run, which must force
// a full pass. Counts each mechanism and fails if one never happened.
module tb_mdmacc_output_layer;
  import tb_rc_ref_pkg::*;
  localparam int N_R = 64, N_O = 2, W = 32, N_DMACC = 4;
  localparam int JW = $clog2(N_R + 1), KW = 1, HW = 2, CW = $clog2(N_R + 1);

  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_ready;
  logic [N_R-1:0] s_state = '0;
  logic wr_en = 0;
  logic [KW+JW-1:0] wr_addr = '0;
  logic [W-1:0] wr_data = '0;
  logic o_valid, o_ready = 0;
  logic [N_O-1:0][W-1:0] o_data;
  logic [CW-1:0] calc_n;
  logic calc_full;
  logic [HW-1:0] calc_sel;
  int checks = 0, failures = 0;

  mdmacc_output_layer #(.N_R(N_R), .N_O(N_O), .W(W), .N_DMACC(N_DMACC)) dut (
    .clk, .rst_n, .s_valid, .s_ready, .s_state, .wr_en, .wr_addr, .wr_data,
    .o_valid, .o_ready, .o_data, .calc_n, .calc_full, .calc_sel);
  always #5 clk = ~clk;

  int unsigned wt [N_O][];
  int unsigned bias [N_O];
  logic [N_R-1:0] hq [$];
  int n_full = 0, n_zero = 0, n_sel [N_DMACC], n_bp = 0, n_inval = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(int k, int j, int unsigned v);
    @(negedge clk);
    wr_en = 1; wr_addr = {KW'(k), JW'(j)}; wr_data = v;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic load_weights();
    for (int k = 0; k < N_O; k++) begin
      for (int j = 0; j < N_R; j++) begin
        wt[k][j] = $urandom;
        write_word(k, j, wt[k][j]);
      end
      bias[k] = $urandom;
      write_word(k, N_R, bias[k]);
    end
    hq.delete();
  endtask

  task automatic send(logic [N_R-1:0] st);
    int lat, exp_n, exp_sel, d;
    bit exp_full;
    bit sb [];
    // model of the selection
    exp_full = (hq.size() == 0);
    exp_n = N_R; exp_sel = 0;
    for (int h = 0; h < hq.size(); h++) begin
      d = $countones(st ^ hq[h]);
      if (h == 0 || d < exp_n) begin exp_n = d; exp_sel = h; end
    end
    @(negedge clk);
    while (!s_ready) @(negedge clk);
    s_valid = 1; s_state = st;
    @(posedge clk); #1;
    s_valid = 0;
    lat = 0;
    while (!o_valid) begin @(posedge clk); #1; lat++; if (lat > 4 * N_R) break; end
    checks++;
    if (calc_full !== exp_full || int'(calc_n) != exp_n || (!exp_full && int'(calc_sel) != exp_sel)) begin
      failures++;
      $display("stats full=%b n=%0d sel=%0d exp %b %0d %0d", calc_full, calc_n, calc_sel, exp_full, exp_n, exp_sel);
    end
    checks++;
    if (lat != ((exp_n > 0) ? exp_n + 2 : 2)) begin
      failures++; $display("latency %0d for n=%0d", lat, exp_n);
    end
    if (exp_full) n_full++; else if (exp_n == 0) n_zero++; else n_sel[exp_sel]++;
    sb = new[N_R];
    for (int j = 0; j < N_R; j++) sb[j] = st[j];
    for (int k = 0; k < N_O; k++) begin
      checks++;
      if (o_data[k] !== readout(bias[k], wt[k], sb)) begin
        failures++; $display("out %0d = %h exp %h", k, o_data[k], readout(bias[k], wt[k], sb));
      end
    end
    // random back-pressure on the result
    if ($urandom % 3 == 0) begin
      n_bp++;
      repeat (1 + $urandom % 4) @(negedge clk);
      checks++;
      if (!o_valid) begin failures++; $display("result dropped under back-pressure"); end
    end
    @(negedge clk); o_ready = 1;
    @(posedge clk); #1; o_ready = 0;
    hq.push_front(st);
    if (hq.size() > N_DMACC) void'(hq.pop_back());
  endtask

  initial begin
    logic [N_R-1:0] st;
    for (int k = 0; k < N_O; k++) wt[k] = new[N_R];
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_weights();
    for (int t = 0; t < 300; t++) begin
      int mode;
      mode = int'($urandom % 6);
      if (t == 150) begin load_weights(); n_inval++; end
      if (hq.size() == 0 || mode == 0) begin
        st = {$urandom, $urandom};
      end else begin
        int back;
        back = (mode == 1) ? 0 : int'($urandom % hq.size());
        st = hq[back];
        if (mode != 2) repeat ($urandom % 8) st[$urandom % N_R] ^= 1'b1;
      end
      send(st);
    end
    $display("full=%0d zero=%0d sel0=%0d sel1=%0d sel2=%0d sel3=%0d backpressure=%0d rewrite=%0d",
             n_full, n_zero, n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_bp, n_inval);
    checks++;
    if (n_full < 2 || n_zero == 0 || n_bp == 0 || n_inval == 0) failures++;
    for (int h = 0; h < N_DMACC; h++) begin
      checks++; if (n_sel[h] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
