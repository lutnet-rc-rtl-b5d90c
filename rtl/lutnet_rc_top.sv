// lutnet_rc_top: the LUTNet-RC circuit.
//
// A reservoir computer in two layers. The LUT-based reservoir layer (lut_reservoir) holds
// N_R binary neurons whose fixed random weights are frozen into look-up tables; it takes
// one input sample u[t] and computes the next state s[t] in one clock. The output layer
// (mdmacc_output_layer) computes the trained linear readout o[t] = b + W_ro s[t] by
// time-division, accumulating only the neurons whose state differs from the closest of
// the last N_DMACC states (M-DMACC), so a sample usually costs tens of clocks, not N_R.
//
// Interface (plain signals standing in for the system's AXI-stream and BRAM-write links):
//   s_axis_*      input samples; tdata[B_I-1:0] is the code u (unsigned fraction).
//   m_axis_*      results; one beat per sample carrying all N_O outputs, output k in
//                 tdata[k*W +: W] (two's complement).
//   wro_wr_*      weight port of the output layer: address {k, j}, j == N_R is the bias.
// Timing: a sample is taken when s_axis_tready is high; the reservoir updates on that
// edge and hands s[t] to the output layer on the next. The reservoir may take the next
// sample while the output layer is still busy (one state in flight), so throughput is set
// by the output layer. The 2-stage overlap and the port widths are this design's choices.
module lutnet_rc_top
  import lutnet_rc_pkg::*;
#(
  parameter int          N_R     = N_R_DEF,
  parameter int          N_O     = N_O_DEF,
  parameter int          B_I     = B_I_DEF,
  parameter int          W       = WRO_W_DEF,
  parameter int          N_DMACC = N_DMACC_DEF,
  parameter int unsigned SEED    = SEED_DEF,
  parameter int          JW      = $clog2(N_R + 1),
  parameter int          KW      = (N_O > 1) ? $clog2(N_O) : 1,
  parameter int          HW      = (N_DMACC > 1) ? $clog2(N_DMACC) : 1,
  parameter int          CW      = $clog2(N_R + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input sample stream
  input  logic                 s_axis_tvalid,
  output logic                 s_axis_tready,
  input  logic [B_I-1:0]       s_axis_tdata,
  // output stream
  output logic                 m_axis_tvalid,
  input  logic                 m_axis_tready,
  output logic [N_O*W-1:0]     m_axis_tdata,
  // W_ro / bias write port
  input  logic                 wro_wr_en,
  input  logic [KW+JW-1:0]     wro_wr_addr,
  input  logic [W-1:0]         wro_wr_data,
  // pass statistics of the output layer
  output logic [CW-1:0]        calc_n,
  output logic                 calc_full,
  output logic [HW-1:0]        calc_sel
);
  logic [N_R-1:0] res_state;
  logic           take, pend, s_ready;
  logic [N_O-1:0][W-1:0] o_data;

  assign s_axis_tready = !pend;
  assign take          = s_axis_tvalid && s_axis_tready;

  // one reservoir state waiting for the output layer
  always_ff @(posedge clk) begin
    if (!rst_n)                pend <= 1'b0;
    else if (take)             pend <= 1'b1;
    else if (pend && s_ready)  pend <= 1'b0;
  end

  lut_reservoir #(.N_R(N_R), .B_I(B_I), .SEED(SEED)) u_res (
    .clk, .rst_n, .in_valid(take), .u_in(s_axis_tdata), .state(res_state));

  mdmacc_output_layer #(.N_R(N_R), .N_O(N_O), .W(W), .N_DMACC(N_DMACC),
                        .JW(JW), .KW(KW), .HW(HW), .CW(CW)) u_out (
    .clk, .rst_n,
    .s_valid(pend), .s_ready, .s_state(res_state),
    .wr_en(wro_wr_en), .wr_addr(wro_wr_addr), .wr_data(wro_wr_data),
    .o_valid(m_axis_tvalid), .o_ready(m_axis_tready), .o_data,
    .calc_n, .calc_full, .calc_sel);

  assign m_axis_tdata = o_data;

  // A state handed to the output layer stays put until it is taken.
  a_state_held: assert property (@(posedge clk) disable iff (!rst_n)
    pend && !s_ready |=> pend && $stable(res_state));
endmodule
