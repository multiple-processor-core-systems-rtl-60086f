// snn_control: control unit that runs one frame of the spiking network.
//
// A frame consists of N_STEP timesteps, and every timestep of three phases:
//   alpha - the input values are encoded. The encoding runs on the host processor;
//           the unit waits here until the host signals enc_valid.
//   beta  - the synapses are activated: the unit reads the N_ADDR words of the impulse
//           and weight memories, one per clock, while the synapse units sum the
//           weights of the inputs that fire in this timestep.
//   gamma - the soma algorithm: for one clock every soma adds its sum to its membrane
//           potential and may fire.
// After the last timestep, and only if train was set at start, the unit starts the
// learning unit and waits for its done. frame_done pulses at the end of the frame.
//
// Timing: a timestep takes 3 + N_ADDR clocks when enc_valid is already high
// (1 alpha, N_ADDR beta reads, 1 beta drain for the read latency, 1 gamma). The phase
// structure and the 37-timestep frame follow the source design; the enc_valid
// handshake and the clock-level schedule are choices of this implementation.
module snn_control #(
  parameter int N_ADDR = snn_pkg::N_ADDR,
  parameter int N_STEP = snn_pkg::N_STEP,
  parameter int T_W    = snn_pkg::T_W,
  localparam int AW    = $clog2(N_ADDR)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              train,
  input  logic              enc_valid,
  input  logic              learn_done,
  output snn_pkg::phase_t   phase,
  output logic [T_W-1:0]    t_now,
  output logic [AW-1:0]     addr,
  output logic              rd_en,
  output logic              acc_clr,
  output logic              acc_valid,
  output logic              frame_start,
  output logic              soma_upd,
  output logic              learn_en,
  output logic              busy,
  output logic              frame_done
);
  import snn_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_ALPHA, S_BETA, S_DRAIN, S_GAMMA, S_LEARN, S_WAIT} cstate_t;

  cstate_t state;
  logic    train_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      t_now      <= '0;
      addr       <= '0;
      train_q    <= 1'b0;
      acc_valid  <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      acc_valid  <= rd_en;          // memory data arrives one clock after the read
      frame_done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          t_now   <= '0;
          train_q <= train;
          state   <= S_ALPHA;
        end
        S_ALPHA: if (enc_valid) begin
          addr  <= '0;
          state <= S_BETA;
        end
        S_BETA: begin
          addr <= addr + 1'b1;
          if (addr == AW'(N_ADDR - 1)) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_GAMMA;
        S_GAMMA: begin
          if (t_now == T_W'(N_STEP - 1)) begin
            if (train_q) begin
              state <= S_LEARN;
            end else begin
              state      <= S_IDLE;
              frame_done <= 1'b1;
            end
          end else begin
            t_now <= t_now + 1'b1;
            state <= S_ALPHA;
          end
        end
        S_LEARN: state <= S_WAIT;
        S_WAIT: if (learn_done) begin
          state      <= S_IDLE;
          frame_done <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rd_en       = (state == S_BETA);
    acc_clr     = (state == S_ALPHA) && enc_valid;
    frame_start = (state == S_IDLE) && start;
    soma_upd    = (state == S_GAMMA);
    learn_en    = (state == S_LEARN);
    busy        = (state != S_IDLE);
    unique case (state)
      S_ALPHA:         phase = PH_ALPHA;
      S_BETA, S_DRAIN: phase = PH_BETA;
      S_GAMMA:         phase = PH_GAMMA;
      S_LEARN, S_WAIT: phase = PH_LEARN;
      default:         phase = PH_IDLE;
    endcase
  end

endmodule
