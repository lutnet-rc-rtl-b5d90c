// lut_reservoir: the LUT-based reservoir layer of LUTNet-RC.
//
// N_R binary neurons, each a look-up table over the states of K = 6 other neurons (and,
// for about a fraction C_ir of them, also over the b_i-bit input sample), each with its own
// state register. All neurons update together in the one clock edge at which in_valid is
// high, so one reservoir time step takes one clock:
//   s[t] = LUT(s[t-1], u[t]).
// Wiring and truth tables are generated at elaboration from SEED by lutnet_rc_pkg, as a
// fixed random network; the original LUTNet-RC design draws them the same way from its
// hyperparameters, but with its own random numbers, so the exact network here is not the
// original one.
//
// Interface: in_valid/u_in present one input sample; state is the register vector
// (bit i = 1 means s_i = +1), valid from the edge after in_valid. Synchronous reset to all -1.
module lut_reservoir
  import lutnet_rc_pkg::*;
#(
  parameter int          N_R  = N_R_DEF,
  parameter int          B_I  = B_I_DEF,
  parameter int unsigned SEED = SEED_DEF
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [B_I-1:0] u_in,
  output logic [N_R-1:0] state
);
  for (genvar i = 0; i < N_R; i++) begin : g_neuron
    localparam int S0 = src_index(SEED, N_R, i, 0);
    localparam int S1 = src_index(SEED, N_R, i, 1);
    localparam int S2 = src_index(SEED, N_R, i, 2);
    localparam int S3 = src_index(SEED, N_R, i, 3);
    localparam int S4 = src_index(SEED, N_R, i, 4);
    localparam int S5 = src_index(SEED, N_R, i, 5);
    logic [5:0] x;
    assign x = {state[S5], state[S4], state[S3], state[S2], state[S1], state[S0]};

    if (has_input(SEED, i)) begin : g_in
      localparam logic [64*17:0] FULL = lut_in_table(SEED, i, B_I);
      lut_in_neuron #(.B_I(B_I), .TABLE(FULL[64*(B_I+1):0])) u_n (
        .clk, .rst_n, .valid(in_valid), .x, .u(u_in), .s(state[i]));
    end else begin : g_noin
      lut6_neuron #(.TABLE(lut6_table(SEED, i))) u_n (
        .clk, .rst_n, .valid(in_valid), .x, .s(state[i]));
    end
  end
endmodule
