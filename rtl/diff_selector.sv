// diff_selector: XOR comparison and selector of M-DMACC.
//
// Compares the current network state with every valid past state: the XOR of the two
// marks the neurons that changed, and a population count gives their number N_changed.
// The selector picks the past state with the smallest N_changed (on a tie, the most recent
// one, the lowest index) and passes on its index, its count and its change mask. found is
// low when no past state is valid; the caller then falls back to a full pass.
// Purely combinational; the output layer registers what it needs.
module diff_selector #(
  parameter int N_R = 1500,
  parameter int N_H = 4,
  parameter int HW  = (N_H > 1) ? $clog2(N_H) : 1,
  parameter int CW  = $clog2(N_R + 1)
) (
  input  logic [N_R-1:0]          cur,
  input  logic [N_H-1:0][N_R-1:0] hist_state,
  input  logic [N_H-1:0]          hist_valid,
  output logic                    found,
  output logic [HW-1:0]           sel,
  output logic [CW-1:0]           sel_count,
  output logic [N_R-1:0]          sel_diff
);
  logic [N_H-1:0][N_R-1:0] diff;
  logic [N_H-1:0][CW-1:0]  cnt;

  // one XOR and population count per past state
  for (genvar h = 0; h < N_H; h++) begin : g_cmp
    always_comb begin
      diff[h] = cur ^ hist_state[h];
      cnt[h]  = '0;
      for (int j = 0; j < N_R; j++) cnt[h] = cnt[h] + CW'(diff[h][j]);
    end
  end

  // selector: fewest changes among the valid entries
  always_comb begin
    found     = 1'b0;
    sel       = '0;
    sel_count = '0;
    for (int h = 0; h < N_H; h++) begin
      if (hist_valid[h] && (!found || cnt[h] < sel_count)) begin
        found     = 1'b1;
        sel       = HW'(h);
        sel_count = cnt[h];
      end
    end
    sel_diff = diff[sel];
  end
endmodule
