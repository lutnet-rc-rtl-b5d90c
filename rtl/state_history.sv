// state_history: the past network states rS_{t-1} .. rS_{t-N_H} of M-DMACC.
//
// A shift register of N_H entries. Each entry holds a complete reservoir state (N_R bits),
// the output values that the output layer computed for it (N_O words), and a valid flag.
// push (on the clock edge) shifts the entries one place older and writes the newest state
// and its outputs into entry 0, so entry h is the state of h+1 samples ago. clear drops
// every entry (used when W_ro or the bias changes, since the stored outputs are then
// stale; this invalidation is this design's choice) and wins over push. Synchronous
// active-low reset also empties the history.
module state_history #(
  parameter int N_R = 1500,
  parameter int N_H = 4,
  parameter int N_O = 1,
  parameter int W   = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          push,
  input  logic [N_R-1:0]                push_state,
  input  logic [N_O-1:0][W-1:0]         push_z,
  output logic [N_H-1:0][N_R-1:0]       hist_state,
  output logic [N_H-1:0][N_O-1:0][W-1:0] hist_z,
  output logic [N_H-1:0]                hist_valid
);
  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      hist_valid <= '0;
    end else if (push) begin
      for (int h = N_H - 1; h > 0; h--) hist_valid[h] <= hist_valid[h-1];
      hist_valid[0] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      for (int h = N_H - 1; h > 0; h--) begin
        hist_state[h] <= hist_state[h-1];
        hist_z[h]     <= hist_z[h-1];
      end
      hist_state[0] <= push_state;
      hist_z[0]     <= push_z;
    end
  end
endmodule
