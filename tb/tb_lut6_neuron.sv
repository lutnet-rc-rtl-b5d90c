// tb_lut6_neuron: checks that the LUT6 neuron registers TABLE[x] on valid and holds
// otherwise, over all 64 input patterns, and that reset gives -1.
module tb_lut6_neuron;
  localparam logic [63:0] T = 64'hC3A5_0F96_7E18_D24B;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [5:0] x = '0;
  logic s;
  int checks = 0, failures = 0;

  lut6_neuron #(.TABLE(T)) dut (.clk, .rst_n, .valid, .x, .s);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_s;
    repeat (2) @(posedge clk);
    #1; checks++; if (s !== 1'b0) begin failures++; $display("reset value %b", s); end
    rst_n = 1;
    exp_s = 1'b0;
    for (int r = 0; r < 3; r++)
      for (int p = 0; p < 64; p++) begin
        @(negedge clk);
        x = 6'(p);
        valid = ($urandom % 4) != 0;
        @(posedge clk); #1;
        if (valid) exp_s = T[p];
        checks++;
        if (s !== exp_s) begin
          failures++;
          $display("p=%0d valid=%b s=%b exp=%b", p, valid, s, exp_s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
