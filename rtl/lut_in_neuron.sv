// lut_in_neuron: reservoir neuron with input from the input layer.
//
// Logically a (b_i+6)-input, 1-output look-up table plus a register: the output is
// sgn(sum_k W'rr_k * s_k + W'ir * u). A literal table would have 2^(b_i+6) entries
// (65536 for b_i = 10), so it is held in an exact compressed form: for each of the 64
// patterns of the six source states the output is monotonic in the input code u, and the
// table row reduces to one threshold T[p] (b_i+1 bits) and a common polarity bit:
//   y = ({1'b0, u} >= T[x]) ^ INV.
// This gives the same truth table bit for bit (the logic optimiser of an FPGA flow reduces
// the large LUT to similar logic); the compressed form is this design's choice.
//
// Interface: x = source states (1 = +1), u = input code (unsigned, u/2^B_I in [0,1)).
// The register loads on a clock edge with valid high; synchronous active-low reset to -1.
module lut_in_neuron #(
  parameter int B_I = 10,
  parameter logic [64*(B_I+1):0] TABLE = '0   // 64 thresholds, then INV at the top bit
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           valid,
  input  logic [5:0]     x,
  input  logic [B_I-1:0] u,
  output logic           s
);
  logic [B_I:0] thr;
  logic         y;

  always_comb begin
    thr = TABLE[x*(B_I+1) +: (B_I+1)];
    y   = ({1'b0, u} >= thr) ^ TABLE[64*(B_I+1)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     s <= 1'b0;
    else if (valid) s <= y;
  end
endmodule
