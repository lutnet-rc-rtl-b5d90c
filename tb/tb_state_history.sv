// tb_state_history: pushes random states and outputs, with idle clocks and occasional
// clears, and checks order (entry h = state of h+1 pushes ago), outputs and valid flags
// against a queue model.
module tb_state_history;
  localparam int N_R = 40, N_H = 4, N_O = 2, W = 32;
  logic clk = 0, rst_n = 0, clear = 0, push = 0;
  logic [N_R-1:0] push_state = '0;
  logic [N_O-1:0][W-1:0] push_z = '0;
  logic [N_H-1:0][N_R-1:0] hist_state;
  logic [N_H-1:0][N_O-1:0][W-1:0] hist_z;
  logic [N_H-1:0] hist_valid;
  int checks = 0, failures = 0;

  state_history #(.N_R(N_R), .N_H(N_H), .N_O(N_O), .W(W)) dut (
    .clk, .rst_n, .clear, .push, .push_state, .push_z, .hist_state, .hist_z, .hist_valid);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_R-1:0] qs [$];
    logic [N_O-1:0][W-1:0] qz [$];
    int nclear = 0;
    repeat (2) @(posedge clk); #1;
    checks++; if (hist_valid !== '0) failures++;
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      clear = ($urandom % 60) == 0;
      push  = ($urandom % 3) != 0;
      push_state = {$urandom, $urandom};
      push_z = {$urandom, $urandom};
      @(posedge clk); #1;
      if (clear) begin qs.delete(); qz.delete(); nclear++; end
      else if (push) begin
        qs.push_front(push_state); qz.push_front(push_z);
        if (qs.size() > N_H) begin void'(qs.pop_back()); void'(qz.pop_back()); end
      end
      for (int h = 0; h < N_H; h++) begin
        checks++;
        if (hist_valid[h] !== (h < qs.size())) begin failures++; $display("t=%0d valid[%0d]", t, h); end
        else if (h < qs.size() && (hist_state[h] !== qs[h] || hist_z[h] !== qz[h])) begin
          failures++; $display("t=%0d entry %0d differs", t, h);
        end
      end
    end
    checks++; if (nclear == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
