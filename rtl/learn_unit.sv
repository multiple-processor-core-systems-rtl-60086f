// learn_unit: the LEARN finite-state machine that trains the synapses after a frame.
//
// Started with en in L_IDLE, it visits the somas one after the other (soma_counter).
// In L_POSITION it takes the current soma's firing moment; a soma that is selected
// by learn_mask and has fired gets a sweep over all N_ADDR words of the synapse
// memories, any other soma is passed over. For each address the unit reads the
// impulse word (L_READ_IMP), advances addr_counter (L_ADDR_INC) and compares the
// synapses' firing times with the moment (L_COMP). Only if some synapse of the word
// lies in the learning window does it read the weight word (L_READ_WEIGHT), apply the
// rule of learn_rule (L_ADD_SUB) and write the word back (L_WRITE_WEIGHT). When
// addr_counter reaches N_ADDR the unit returns to L_POSITION and L_CHECK_OUT moves to
// the next soma; after the last one it goes back to L_IDLE and pulses done.
//
// The state names and the counters soma_counter / addr_counter with their bounds
// follow the source design's state diagram. The extra sweep flag, the learn_mask
// input (how the supervisor picks the soma to train) and the exact use of the
// "moment" test in L_POSITION are choices of this implementation.
//
// Cost in clocks from en to done: 2 + sum over somas of (2 for a soma passed over,
// or 4 + 3*N_ADDR + 3*H for a trained soma whose sweep changes H words).
// Memory timing: reads are synchronous with one clock latency; w_sel selects the
// weight memory of the current soma.
module learn_unit #(
  parameter int N_SOMA = snn_pkg::N_SOMA,
  parameter int N_ADDR = snn_pkg::N_ADDR,
  parameter int N_LANE = snn_pkg::N_LANE,
  parameter int W_W    = snn_pkg::W_W,
  parameter int T_W    = snn_pkg::T_W,
  parameter int WIN    = snn_pkg::WIN,
  parameter int DW     = snn_pkg::DW,
  localparam int AW    = $clog2(N_ADDR),
  localparam int SW    = (N_SOMA > 1) ? $clog2(N_SOMA) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic [N_SOMA-1:0]             learn_mask,
  input  logic [N_SOMA-1:0]             fired,
  input  logic [N_SOMA-1:0][T_W-1:0]    fire_time,
  // memory side
  output logic [AW-1:0]                 addr,
  output logic                          imp_rd_en,
  input  logic [N_LANE-1:0][T_W-1:0]    imp_rd_data,
  output logic [SW-1:0]                 w_sel,
  output logic                          w_en,
  output logic                          w_we,
  output logic [N_LANE-1:0][W_W-1:0]    w_wdata,
  input  logic [N_LANE-1:0][W_W-1:0]    w_rdata,
  // status
  output snn_pkg::lstate_t              state,
  output logic                          busy,
  output logic                          done,
  output logic [31:0]                   n_words_updated
);
  import snn_pkg::*;

  logic [SW:0]                  soma_counter;
  logic [AW:0]                  addr_counter;
  logic [AW-1:0]                cur_addr;
  logic [T_W-1:0]               moment;
  logic                         swept;
  logic [N_LANE-1:0][T_W-1:0]   imp_q;
  logic [N_LANE-1:0][W_W-1:0]   w_new_q;

  logic [N_LANE-1:0]            hit;
  logic [N_LANE-1:0][W_W-1:0]   w_new;
  logic                         soma_learns;

  learn_rule #(.N_LANE(N_LANE), .W_W(W_W), .T_W(T_W), .WIN(WIN), .DW(DW)) u_rule (
    .imp_word (imp_q),
    .w_word   (w_rdata),
    .moment   (moment),
    .hit      (hit),
    .w_new    (w_new)
  );

  assign soma_learns = (soma_counter < (SW+1)'(N_SOMA)) &&
                       fired[soma_counter[SW-1:0]] && learn_mask[soma_counter[SW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= L_IDLE;
      soma_counter    <= '0;
      addr_counter    <= '0;
      cur_addr        <= '0;
      moment          <= '0;
      swept           <= 1'b0;
      imp_q           <= '0;
      w_new_q         <= '0;
      done            <= 1'b0;
      n_words_updated <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        L_IDLE: if (en) begin
          soma_counter <= '0;
          state        <= L_CHECK_OUT;
        end
        L_CHECK_OUT: begin
          addr_counter <= '0;
          swept        <= 1'b0;
          if (soma_counter < (SW+1)'(N_SOMA)) begin
            state <= L_POSITION;
          end else begin
            state <= L_IDLE;
            done  <= 1'b1;
          end
        end
        L_POSITION: begin
          moment <= fire_time[soma_counter[SW-1:0]];
          if (!swept && soma_learns) begin
            state <= L_READ_IMP;
          end else begin
            soma_counter <= soma_counter + 1'b1;
            state        <= L_CHECK_OUT;
          end
        end
        L_READ_IMP: begin
          if (addr_counter < (AW+1)'(N_ADDR)) begin
            state <= L_ADDR_INC;
          end else begin
            swept <= 1'b1;
            state <= L_POSITION;
          end
        end
        L_ADDR_INC: begin
          imp_q        <= imp_rd_data;
          cur_addr     <= addr_counter[AW-1:0];
          addr_counter <= addr_counter + 1'b1;
          state        <= L_COMP;
        end
        L_COMP: state <= (|hit) ? L_READ_WEIGHT : L_READ_IMP;
        L_READ_WEIGHT: state <= L_ADD_SUB;
        L_ADD_SUB: begin
          w_new_q <= w_new;
          state   <= L_WRITE_WEIGHT;
        end
        L_WRITE_WEIGHT: begin
          n_words_updated <= n_words_updated + 1;
          state           <= L_READ_IMP;
        end
        default: state <= L_IDLE;
      endcase
    end
  end

  // Memory requests. The comparison in L_COMP looks at imp_q only, so hit is only
  // used in that state; learn_rule's weight input is the memory output, valid in
  // L_ADD_SUB.
  always_comb begin
    imp_rd_en = (state == L_READ_IMP) && (addr_counter < (AW+1)'(N_ADDR));
    w_en      = (state == L_READ_WEIGHT) || (state == L_WRITE_WEIGHT);
    w_we      = (state == L_WRITE_WEIGHT);
    addr      = (state == L_READ_IMP) ? addr_counter[AW-1:0] : cur_addr;
    w_wdata   = w_new_q;
    w_sel     = (soma_counter < (SW+1)'(N_SOMA)) ? soma_counter[SW-1:0] : '0;
    busy      = (state != L_IDLE);
  end

  // A weight write is always part of an access, and the impulse and weight memories
  // are never requested in the same clock (they share the address).
  a_we_in_access: assert property (@(posedge clk) disable iff (!rst_n) w_we |-> w_en);
  a_one_request:  assert property (@(posedge clk) disable iff (!rst_n) !(imp_rd_en && w_en));

endmodule
