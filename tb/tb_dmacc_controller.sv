// tb_dmacc_controller: loads random masks (including empty and all-ones) and checks that
// the controller issues exactly the set indices, in increasing order, one per clock, so a
// mask with n bits takes n clocks; all-ones must count tau = 0, 1, 2, ...
module tb_dmacc_controller;
  localparam int N_R = 150, AW = $clog2(N_R);
  logic clk = 0, rst_n = 0, load = 0;
  logic [N_R-1:0] mask = '0;
  logic tau_valid, empty;
  logic [AW-1:0] tau;
  int checks = 0, failures = 0;

  dmacc_controller #(.N_R(N_R)) dut (.clk, .rst_n, .load, .mask, .tau_valid, .tau, .empty);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [N_R-1:0] m, seen;
      int cyc, last;
      for (int j = 0; j < N_R; j++) m[j] = ($urandom % 8) == 0;
      if (t == 0) m = '0;
      if (t == 1) m = '1;
      @(negedge clk); load = 1; mask = m;
      @(negedge clk); load = 0;
      seen = '0; cyc = 0; last = -1;
      while (!empty) begin
        checks++;
        if (!tau_valid || int'(tau) <= last || !m[tau]) begin
          failures++; if (failures < 5) $display("t=%0d bad tau %0d", t, tau);
        end
        if (t == 1 && int'(tau) != cyc) failures++;
        seen[tau] = 1'b1; last = int'(tau); cyc++;
        @(negedge clk);
        if (cyc > N_R + 2) break;
      end
      checks++;
      if (seen !== m || cyc != $countones(m)) begin
        failures++; $display("t=%0d issued %0d of %0d", t, cyc, $countones(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
