// soma: cell body of one output neuron.
//
// The soma adds the post-synaptic input of each timestep to its membrane potential
// (MP) and emits an axonal spike when the MP exceeds the threshold. It fires at most
// once per frame: the timestep of that spike is kept in fire_time for the learning
// unit and the read-out, further input is ignored until the next frame, and the MP
// is cleared when the spike is emitted.
//
// Timing: frame_start (one clock) clears MP and the fired flag. upd (one clock, the
// gamma phase) adds psp to the MP; if the sum is greater than threshold, spike is
// high for the following clock and fired / fire_time are set at the same edge.
// Accumulation and threshold firing follow the source design; the absence of a leak,
// the single spike per frame and the reset of the MP to zero are choices of this
// implementation.
module soma #(
  parameter int ACC_W = 24,
  parameter int T_W   = snn_pkg::T_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic              upd,
  input  logic [ACC_W-1:0]  psp,
  input  logic [T_W-1:0]    t_now,
  input  logic [ACC_W-1:0]  threshold,
  output logic              spike,
  output logic              fired,
  output logic [T_W-1:0]    fire_time,
  output logic [ACC_W-1:0]  mp
);

  logic [ACC_W:0] mp_next;   // one extra bit: the sum cannot wrap
  assign mp_next = {1'b0, mp} + {1'b0, psp};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mp        <= '0;
      fired     <= 1'b0;
      fire_time <= snn_pkg::T_NONE;
      spike     <= 1'b0;
    end else begin
      spike <= 1'b0;
      if (frame_start) begin
        mp        <= '0;
        fired     <= 1'b0;
        fire_time <= snn_pkg::T_NONE;
      end else if (upd && !fired) begin
        if (mp_next > {1'b0, threshold}) begin
          mp        <= '0;
          fired     <= 1'b1;
          fire_time <= t_now;
          spike     <= 1'b1;
        end else begin
          mp <= mp_next[ACC_W-1:0];
        end
      end
    end
  end

endmodule
