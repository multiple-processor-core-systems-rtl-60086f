// impulse_mem: memory of input firing times ("impulses"), shared by all somas.
//
// Every word holds the firing timestep of N_LANE input synapses (one per pixel colour
// component), T_W bits each; the code T_NONE marks an input that stays silent in the
// frame. The input encoder (software on the host processor) fills the memory through
// the write port; the control unit reads it once per timestep during the beta phase
// and the learning unit reads it again during the learning pass.
//
// Simple dual-port RAM: one synchronous write port and one synchronous read port,
// read data valid one clock after rd_en. Writing and reading the same address in one
// cycle returns the old word. The memory's size follows from the synapse count of the
// source design; the port arrangement is this implementation's choice.
module impulse_mem #(
  parameter int N_ADDR = snn_pkg::N_ADDR,
  parameter int N_LANE = snn_pkg::N_LANE,
  parameter int T_W    = snn_pkg::T_W,
  localparam int AW    = $clog2(N_ADDR)
) (
  input  logic                          clk,
  input  logic                          wr_en,
  input  logic [AW-1:0]                 wr_addr,
  input  logic [N_LANE-1:0][T_W-1:0]    wr_data,
  input  logic                          rd_en,
  input  logic [AW-1:0]                 rd_addr,
  output logic [N_LANE-1:0][T_W-1:0]    rd_data
);

  logic [N_LANE*T_W-1:0] mem [N_ADDR];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
