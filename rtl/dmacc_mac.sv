// dmacc_mac: multiply-accumulate circuit of an output neuron.
//
// Because reservoir states are +-1 and their differences +-2, every product s_j * w or
// d_j * w is the weight, its negation, or twice either, so the "multiplier" is a shift and
// a conditional negation. load sets the accumulator to base (the bias b for a full pass,
// or the stored output of a past state for a DMACC pass); each clock with en high adds
//   (neg ? -1 : +1) * (dbl ? 2 : 1) * w.
// Arithmetic is W-bit two's complement and wraps; since every step is exact modulo 2^W,
// the final value is exact whenever the true output fits in W bits (own choice: the
// accumulator is as wide as W_ro, 32 bits).
module dmacc_mac #(
  parameter int W = 32
) (
  input  logic                clk,
  input  logic                load,
  input  logic signed [W-1:0] base,
  input  logic                en,
  input  logic                neg,
  input  logic                dbl,
  input  logic signed [W-1:0] w,
  output logic signed [W-1:0] acc
);
  logic signed [W-1:0] term;
  always_comb begin
    term = dbl ? (w <<< 1) : w;
    if (neg) term = -term;
  end

  always_ff @(posedge clk) begin
    if (load)    acc <= base;
    else if (en) acc <= acc + term;
  end
endmodule
