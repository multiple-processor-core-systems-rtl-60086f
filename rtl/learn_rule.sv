// learn_rule: weight change of the supervised Hebbian rule for one memory word.
//
// For each of the N_LANE synapses the offset d = t_syn - moment between the synapse's
// firing time and the soma's firing time decides the change:
//   -WIN <= d <= 0 : weight decreased by DW - |d|*DW/(WIN+1)
//    1 <= d <= WIN : weight increased by DW -  d *DW/(WIN+1)
//   otherwise, or a silent input: weight kept
// so the full DW goes to a synapse that fired in the same timestep as the soma and
// the change falls by DW/6 per timestep of distance (WIN = 5). Results are clamped to
// 0 and to the largest weight. hit marks the lanes that change. The window, the
// direction of the change on each side and the DW/6 steps follow the source design;
// DW = 12 (so DW/6 = 2) and the clamping are choices of this implementation.
//
// Purely combinational.
module learn_rule #(
  parameter int N_LANE = snn_pkg::N_LANE,
  parameter int W_W    = snn_pkg::W_W,
  parameter int T_W    = snn_pkg::T_W,
  parameter int WIN    = snn_pkg::WIN,
  parameter int DW     = snn_pkg::DW
) (
  input  logic [N_LANE-1:0][T_W-1:0]  imp_word,
  input  logic [N_LANE-1:0][W_W-1:0]  w_word,
  input  logic [T_W-1:0]              moment,
  output logic [N_LANE-1:0]           hit,
  output logic [N_LANE-1:0][W_W-1:0]  w_new
);

  localparam int WMAX = (1 << W_W) - 1;

  always_comb begin
    for (int i = 0; i < N_LANE; i++) begin
      int d, mag, w;
      d   = int'(imp_word[i]) - int'(moment);
      w   = int'(w_word[i]);
      mag = 0;
      hit[i]   = 1'b0;
      w_new[i] = w_word[i];
      if (imp_word[i] != snn_pkg::T_NONE && d >= -WIN && d <= WIN) begin
        hit[i] = 1'b1;
        if (d <= 0) begin
          mag = (DW * (WIN + 1 + d)) / (WIN + 1);
          w   = (w > mag) ? w - mag : 0;
        end else begin
          mag = (DW * (WIN + 1 - d)) / (WIN + 1);
          w   = (w + mag < WMAX) ? w + mag : WMAX;
        end
        w_new[i] = W_W'(w);
      end
    end
  end

endmodule
