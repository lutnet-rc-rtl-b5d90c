// tb_lut_reservoir: runs a reduced reservoir (N_R = 96) for 300 input samples, with valid
// gaps, and compares the whole state vector after every clock with the reference model
// evaluated from the weights. Also checks that each step takes one clock and that the
// states keep changing (the reservoir is not stuck).
module tb_lut_reservoir;
  import lutnet_rc_pkg::*;
  import tb_rc_ref_pkg::*;
  localparam int N_R = 96;
  localparam int B_I = 10;
  localparam int unsigned SEED = SEED_DEF;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [B_I-1:0] u_in = '0;
  logic [N_R-1:0] state;
  int checks = 0, failures = 0;

  lut_reservoir #(.N_R(N_R), .B_I(B_I), .SEED(SEED)) dut (.clk, .rst_n, .in_valid, .u_in, .state);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rc_model m;
    int changes = 0, bad;
    logic [N_R-1:0] prev;
    m = new(SEED, N_R, B_I);
    $display("input neurons: %0d of %0d", m.n_inputs(), N_R);
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = state;
    for (int t = 0; t < 400; t++) begin
      int code;
      @(negedge clk);
      code = int'($urandom % (1 << B_I));
      in_valid = (t % 4) != 1;
      u_in = B_I'(code);
      @(posedge clk); #1;
      if (in_valid) m.step(code);
      bad = 0;
      for (int i = 0; i < N_R; i++) if (state[i] !== m.st[i]) bad++;
      checks++;
      if (bad != 0) begin failures++; if (failures < 5) $display("t=%0d %0d neurons differ", t, bad); end
      if (state != prev) changes++;
      prev = state;
    end
    checks++;
    if (changes < 100) begin failures++; $display("only %0d state changes", changes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
