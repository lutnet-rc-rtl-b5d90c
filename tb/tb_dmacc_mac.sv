// tb_dmacc_mac: random load / accumulate sequences against a wrapping 32-bit model of
// acc += (neg ? -1 : 1) * (dbl ? 2 : 1) * w; includes idle clocks and full-scale values.
module tb_dmacc_mac;
  localparam int W = 32;
  logic clk = 0, load = 0, en = 0, neg = 0, dbl = 0;
  logic signed [W-1:0] base = '0, w = '0, acc;
  int checks = 0, failures = 0;

  dmacc_mac #(.W(W)) dut (.clk, .load, .base, .en, .neg, .dbl, .w, .acc);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned m = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      load = (t % 50) == 0;
      en   = !load && (($urandom % 5) != 0);
      neg  = $urandom % 2; dbl = $urandom % 2;
      base = $urandom;
      w    = (t % 97 == 5) ? 32'h8000_0000 : $urandom;
      @(posedge clk); #1;
      if (load) m = base;
      else if (en) begin
        int unsigned term;
        term = dbl ? (w << 1) : w;
        m = neg ? m - term : m + term;
      end
      checks++;
      if (acc !== m) begin failures++; if (failures < 5) $display("t=%0d acc=%h exp=%h", t, acc, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
