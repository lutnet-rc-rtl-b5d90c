// lut6_neuron: reservoir neuron without input from the input layer.
//
// The neuron is a 6-input, 1-output look-up table followed by a register. The table holds
// the neuron's whole input-output relation sgn(sum_k W'rr_k * s_k), worked out once from
// its fixed weights (see lutnet_rc_pkg::lut6_table), so the weights' bit precision costs
// no logic: on an FPGA the table maps onto one LUT6 and the register onto one flip-flop.
//
// Interface: x[5:0] are the current states of the neuron's six source neurons (1 = +1,
// 0 = -1). The register loads the table output on a clock edge where valid is high and
// holds otherwise, so the reservoir advances one time step per valid input sample.
// Reset (active-low, synchronous) clears the state to -1; reset value is a design choice.
module lut6_neuron #(
  parameter logic [63:0] TABLE = 64'h0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [5:0] x,
  output logic       s
);
  logic y;
  assign y = TABLE[x];

  always_ff @(posedge clk) begin
    if (!rst_n)     s <= 1'b0;
    else if (valid) s <= y;
  end
endmodule
