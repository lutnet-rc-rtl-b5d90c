// tb_lut_in_neuron: checks the compressed (b_i+6)-input truth table of an input neuron
// against sgn(sum W'rr s + W'ir u) evaluated directly from the weights, for a neuron with
// positive and one with negative input weight, over all 64 source patterns and many
// input codes (edge codes included), and checks that the register holds without valid.
module tb_lut_in_neuron;
  import lutnet_rc_pkg::*;
  localparam int B_I = 10;
  localparam int unsigned SEED = SEED_DEF;

  function automatic int find_neuron(bit want_neg);
    for (int i = 0; i < 5000; i++)
      if (has_input(SEED, i) && ((wir_q(SEED, i) < 0) == want_neg) && (wir_q(SEED, i) != 0))
        return i;
    return 0;
  endfunction
  localparam int IP = find_neuron(1'b0);
  localparam int IN = find_neuron(1'b1);
  localparam logic [64*17:0] TP = lut_in_table(SEED, IP, B_I);
  localparam logic [64*17:0] TN = lut_in_table(SEED, IN, B_I);

  logic clk = 0, rst_n = 0, valid = 0;
  logic [5:0] x = '0;
  logic [B_I-1:0] u = '0;
  logic sp, sn;
  int checks = 0, failures = 0;

  lut_in_neuron #(.B_I(B_I), .TABLE(TP[64*(B_I+1):0])) dut_p (.clk, .rst_n, .valid, .x, .u, .s(sp));
  lut_in_neuron #(.B_I(B_I), .TABLE(TN[64*(B_I+1):0])) dut_n (.clk, .rst_n, .valid, .x, .u, .s(sn));
  always #5 clk = ~clk;

  function automatic bit ref_out(int i, int p, int code);
    longint acc = 0;
    for (int k = 0; k < K_FANIN; k++) acc += p[k] ? wrr_q(SEED, i, k) : -wrr_q(SEED, i, k);
    acc = (acc <<< B_I) + longint'(wir_q(SEED, i)) * code;
    return acc >= 0;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ep, en;
    int ones_p = 0, ones_n = 0;
    repeat (2) @(posedge clk);
    #1; checks++; if (sp !== 0 || sn !== 0) failures++;
    rst_n = 1; ep = 0; en = 0;
    for (int p = 0; p < 64; p++)
      for (int c = 0; c < 40; c++) begin
        int code;
        code = (c == 0) ? 0 : (c == 1) ? (1 << B_I) - 1 : int'($urandom % (1 << B_I));
        @(negedge clk);
        x = 6'(p); u = B_I'(code);
        valid = (c % 7) != 3;
        @(posedge clk); #1;
        if (valid) begin ep = ref_out(IP, p, code); en = ref_out(IN, p, code); end
        checks += 2;
        ones_p += sp; ones_n += sn;
        if (sp !== ep) begin failures++; $display("pos p=%0d u=%0d s=%b exp=%b", p, code, sp, ep); end
        if (sn !== en) begin failures++; $display("neg p=%0d u=%0d s=%b exp=%b", p, code, sn, en); end
      end
    // both output values must occur, or the test says little
    checks++;
    if (ones_p == 0 || ones_n == 0 || ones_p == 64*40 || ones_n == 64*40) begin
      failures++; $display("degenerate outputs %0d %0d", ones_p, ones_n);
    end
    $display("neurons %0d (W'ir=%0d) and %0d (W'ir=%0d)", IP, wir_q(SEED, IP), IN, wir_q(SEED, IN));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
