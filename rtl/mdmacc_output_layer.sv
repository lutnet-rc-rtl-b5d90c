// mdmacc_output_layer: output layer of LUTNet-RC with multi-DMACC (M-DMACC).
//
// Computes, for each output neuron k, o_k[t] = b_k + sum_j s_j[t] * W_ro[k][j] with
// s_j in {-1,+1}, by time-division: one weight per clock through a shared address tau.
// Instead of all N_R terms it reuses a past result. The current state rS_t is compared
// (XOR + count) with the last N_DMACC states; the past state with the fewest changed
// neurons is chosen, and only those neurons are accumulated onto its stored output:
//   o[t] = o[t-m] + sum_{changed j} d_j * W_ro[j],  d_j = +2 (-1 -> +1) or -2 (+1 -> -1).
// With no valid past state (after reset or a weight write) a full pass over all N_R
// neurons is made from the bias (d_j = s_j = +-1). After the result is taken, rS_t and
// its outputs enter the history. N_DMACC = 1 gives the single-state S-DMACC.
//
// Interface:
//   s_valid/s_ready/s_state : new reservoir state, taken when both are high (only idle).
//   wr_en/wr_addr/wr_data   : weight write port; wr_addr = {k, j}, j < N_R selects
//                             W_ro[k][j], j == N_R the bias b_k. A write empties the history.
//   o_valid/o_ready/o_data  : result, held until taken.
//   calc_n/calc_full/calc_sel : for the pass in progress or last made, the number of
//                             neurons accumulated, whether it was a full pass, and the
//                             history entry used.
// Timing: accept (1 clk) -> select (1) -> n accumulate clocks -> 1 drain -> result, so a
// sample with n > 0 changed neurons occupies the layer for n + 4 clocks (4 when n = 0)
// when o_ready is high.
// Weights must be written while the layer is idle (checked by an assertion). Structure (history registers, XOR,
// selector, controller, W_ro memory, MAC) follows the original design; the pipeline timing,
// write-port address map and invalidation on write are this design's choices.
module mdmacc_output_layer
  import lutnet_rc_pkg::*;
#(
  parameter int N_R     = N_R_DEF,
  parameter int N_O     = N_O_DEF,
  parameter int W       = WRO_W_DEF,
  parameter int N_DMACC = N_DMACC_DEF,
  parameter int JW      = $clog2(N_R + 1),
  parameter int KW      = (N_O > 1) ? $clog2(N_O) : 1,
  parameter int HW      = (N_DMACC > 1) ? $clog2(N_DMACC) : 1,
  parameter int CW      = $clog2(N_R + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // reservoir state in
  input  logic                    s_valid,
  output logic                    s_ready,
  input  logic [N_R-1:0]          s_state,
  // weight / bias write port
  input  logic                    wr_en,
  input  logic [KW+JW-1:0]        wr_addr,
  input  logic [W-1:0]            wr_data,
  // result out
  output logic                    o_valid,
  input  logic                    o_ready,
  output logic [N_O-1:0][W-1:0]   o_data,
  // pass statistics
  output logic [CW-1:0]           calc_n,
  output logic                    calc_full,
  output logic [HW-1:0]           calc_sel
);
  localparam int AW = $clog2(N_R);

  typedef enum logic [1:0] {S_IDLE, S_SEL, S_RUN, S_DONE} state_e;
  state_e st;

  logic [N_R-1:0] cur;   // rS_t

  // history
  logic [N_DMACC-1:0][N_R-1:0]        hist_state;
  logic [N_DMACC-1:0][N_O-1:0][W-1:0] hist_z;
  logic [N_DMACC-1:0]                 hist_valid;
  logic                               push;

  // selector
  logic           found;
  logic [HW-1:0]  sel;
  logic [CW-1:0]  sel_count;
  logic [N_R-1:0] sel_diff;

  // controller
  logic          ctl_load, tau_valid, ctl_empty;
  logic [AW-1:0] tau;

  // accumulate pipeline (memory read latency 1)
  logic mac_en_q, mac_neg_q, full_q;

  logic [JW-1:0] wr_j;
  logic [KW-1:0] wr_k;
  assign wr_j = wr_addr[JW-1:0];
  assign wr_k = wr_addr[KW+JW-1:JW];

  logic [N_O-1:0][W-1:0] bias;

  assign s_ready  = (st == S_IDLE);
  assign o_valid  = (st == S_DONE);
  assign push     = (st == S_DONE) && o_ready;
  assign ctl_load = (st == S_SEL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      mac_en_q  <= 1'b0;
      mac_neg_q <= 1'b0;
      full_q    <= 1'b0;
      calc_n    <= '0;
      calc_full <= 1'b0;
      calc_sel  <= '0;
    end else begin
      mac_en_q  <= tau_valid && (st == S_RUN);
      mac_neg_q <= !cur[tau];
      case (st)
        S_IDLE: if (s_valid) begin
          cur <= s_state;
          st  <= S_SEL;
        end
        S_SEL: begin
          full_q    <= !found;
          calc_full <= !found;
          calc_n    <= found ? sel_count : CW'(N_R);
          calc_sel  <= sel;
          st        <= S_RUN;
        end
        S_RUN: if (ctl_empty) st <= S_DONE;  // last accumulate, if any, lands now
        S_DONE: if (o_ready) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && (int'(wr_j) == N_R) && (int'(wr_k) < N_O)) bias[wr_k] <= wr_data;
  end

  state_history #(.N_R(N_R), .N_H(N_DMACC), .N_O(N_O), .W(W)) u_hist (
    .clk, .rst_n, .clear(wr_en), .push, .push_state(cur), .push_z(o_data),
    .hist_state, .hist_z, .hist_valid);

  diff_selector #(.N_R(N_R), .N_H(N_DMACC), .HW(HW), .CW(CW)) u_sel (
    .cur, .hist_state, .hist_valid, .found, .sel, .sel_count, .sel_diff);

  dmacc_controller #(.N_R(N_R), .AW(AW)) u_ctl (
    .clk, .rst_n, .load(ctl_load), .mask(found ? sel_diff : '1),
    .tau_valid, .tau, .empty(ctl_empty));

  for (genvar k = 0; k < N_O; k++) begin : g_out
    logic [W-1:0] w_rd;
    wro_memory #(.N_R(N_R), .W(W), .AW(AW)) u_mem (
      .clk,
      .we(wr_en && (int'(wr_j) < N_R) && (int'(wr_k) == k)),
      .waddr(AW'(wr_j)), .wdata(wr_data),
      .raddr(tau), .rdata(w_rd));

    dmacc_mac #(.W(W)) u_mac (
      .clk,
      .load(ctl_load), .base(found ? hist_z[sel][k] : bias[k]),
      .en(mac_en_q), .neg(mac_neg_q), .dbl(!full_q), .w(w_rd),
      .acc(o_data[k]));
  end

  // Handshake rules: a result is held until taken, and weights change only while idle.
  a_result_held: assert property (@(posedge clk) disable iff (!rst_n)
    o_valid && !o_ready |=> o_valid && $stable(o_data));
  a_write_idle: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> st == S_IDLE);
endmodule
