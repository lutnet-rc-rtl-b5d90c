// dmacc_controller: address generator tau of the output layer.
//
// load captures a mask of the reservoir neurons that must be accumulated: the change mask
// of the selected past state for a DMACC pass, or all ones for a full pass (then tau simply
// counts up from 0, as in plain time-division calculation). On every following clock with
// the mask non-zero, the controller issues the lowest set index as tau (tau_valid high)
// and clears that bit, so a pass over n neurons takes n clocks. empty is high once the mask
// is used up. The priority encoder that finds the next index is this design's choice; the
// original LUTNet-RC design says only that the controller calculates the address tau.
module dmacc_controller #(
  parameter int N_R = 1500,
  parameter int AW  = $clog2(N_R)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [N_R-1:0] mask,
  output logic           tau_valid,
  output logic [AW-1:0]  tau,
  output logic           empty
);
  logic [N_R-1:0] rem;

  always_comb begin
    tau = '0;
    for (int j = N_R - 1; j >= 0; j--) if (rem[j]) tau = AW'(j);
    empty     = (rem == '0);
    tau_valid = !empty;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         rem <= '0;
    else if (load)      rem <= mask;
    else if (tau_valid) rem[tau] <= 1'b0;
  end
endmodule
