// synapse_unit: the synapses of one soma, activated for one timestep.
//
// A synapse weights the pre-synaptic pulse it receives: when the input it is connected
// to fires in the current timestep t_now, the synapse passes its weight on as the
// post-synaptic value, otherwise it contributes nothing. The unit handles the N_LANE
// synapses of one memory word per clock: it compares each lane's firing time from the
// impulse memory with t_now, adds the weights of the matching lanes, and accumulates
// these partial sums over the whole memory sweep of the beta phase. At the end of the
// sweep psp_sum is the total post-synaptic input of the soma for this timestep.
//
// Timing: clr (one clock) empties the accumulator; every clock with valid adds one
// word. psp_sum and n_active change one clock after the word is presented.
// Weighting a pulse by the synapse's weight follows the source design; reducing the
// post-synaptic response to the bare weight within one timestep (no response kernel
// or delay) and the word-serial sweep are this implementation's choices.
module synapse_unit #(
  parameter int N_LANE = snn_pkg::N_LANE,
  parameter int W_W    = snn_pkg::W_W,
  parameter int T_W    = snn_pkg::T_W,
  parameter int ACC_W  = 24
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clr,
  input  logic                          valid,
  input  logic [T_W-1:0]                t_now,
  input  logic [N_LANE-1:0][T_W-1:0]    imp_word,
  input  logic [N_LANE-1:0][W_W-1:0]    w_word,
  output logic [ACC_W-1:0]              psp_sum,
  output logic [ACC_W-1:0]              n_active
);

  localparam int LW = $clog2(N_LANE + 1);

  logic [W_W+LW-1:0] word_sum;
  logic [LW-1:0]     word_cnt;

  always_comb begin
    word_sum = '0;
    word_cnt = '0;
    for (int i = 0; i < N_LANE; i++) begin
      if (imp_word[i] == t_now) begin
        word_sum = word_sum + (W_W+LW)'(w_word[i]);
        word_cnt = word_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psp_sum  <= '0;
      n_active <= '0;
    end else if (clr) begin
      psp_sum  <= '0;
      n_active <= '0;
    end else if (valid) begin
      psp_sum  <= psp_sum + ACC_W'(word_sum);
      n_active <= n_active + ACC_W'(word_cnt);
    end
  end

endmodule
