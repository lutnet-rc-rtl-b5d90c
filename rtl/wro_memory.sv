// wro_memory: readout weight memory W_ro of one output neuron.
//
// A simple dual-port RAM of N_R words of W bits, one word per reservoir neuron, meant to
// map onto block RAM. The write port is the plain valid/address/value port through which
// the host loads trained weights; the read port is addressed by the DMACC controller with
// the neuron index tau. Reads are synchronous: rdata holds mem[raddr] from the clock edge
// after raddr is presented (one cycle of latency, as in a block RAM). Contents are not
// reset and must be written before use.
module wro_memory #(
  parameter int N_R = 1500,
  parameter int W   = 32,
  parameter int AW  = $clog2(N_R)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [N_R];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < N_R)) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
