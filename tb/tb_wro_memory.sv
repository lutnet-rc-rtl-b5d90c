// tb_wro_memory: fills the weight memory through the write port, reads every word back
// with the one-clock read latency, and checks that writes to an out-of-range address and
// reads during writes behave (read returns the old word, as a block RAM in read-first mode).
module tb_wro_memory;
  localparam int N_R = 100, W = 32, AW = $clog2(N_R);
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [N_R];
  int checks = 0, failures = 0;

  wro_memory #(.N_R(N_R), .W(W)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N_R; j++) begin
      @(negedge clk);
      we = 1; waddr = AW'(j); wdata = $urandom; model[j] = wdata;
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < 3 * N_R; r++) begin
      int a;
      a = int'($urandom % N_R);
      @(negedge clk);
      raddr = AW'(a);
      // a concurrent write to a random address
      we = ($urandom % 2) == 1; waddr = AW'($urandom % N_R); wdata = $urandom;
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("addr %0d got %h exp %h", a, rdata, model[a]); end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
