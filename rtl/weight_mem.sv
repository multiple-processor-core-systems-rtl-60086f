// weight_mem: synaptic weight memory of one soma.
//
// Every word holds N_LANE unsigned weights of W_W bits, lane i belonging to the same
// input as lane i of the impulse memory word at the same address. The memory is
// single-ported: during the beta phase the control unit reads every word once per
// timestep, during the learning pass the learning unit reads a word and writes the
// updated word back, and while the layer is idle the host loads or reads weights
// through the same port (the multiplexing is done in the top level).
//
// Synchronous read-first RAM: rdata is valid one clock after en; a write (en and we)
// stores wdata and returns the word that was there before.
module weight_mem #(
  parameter int N_ADDR = snn_pkg::N_ADDR,
  parameter int N_LANE = snn_pkg::N_LANE,
  parameter int W_W    = snn_pkg::W_W,
  localparam int AW    = $clog2(N_ADDR)
) (
  input  logic                          clk,
  input  logic                          en,
  input  logic                          we,
  input  logic [AW-1:0]                 addr,
  input  logic [N_LANE-1:0][W_W-1:0]    wdata,
  output logic [N_LANE-1:0][W_W-1:0]    rdata
);

  logic [N_LANE*W_W-1:0] mem [N_ADDR];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end

endmodule
