// snn_top: output layer of a spiking neural network with on-chip supervised learning.
//
// Three somas, one per class, each with its own weight memory and synapse unit, share
// one impulse memory that holds the firing time of every input (pixel colour
// component) within the frame. The control unit runs the 37 timesteps of a frame:
// in each timestep all synapse units sweep their memories in parallel and sum the
// weights of the inputs firing now, then every soma integrates its sum and may fire.
// After a training frame the learning unit sweeps the memories once more per trained
// soma and adjusts the weights of the synapses that fired near the soma's spike.
// The earliest soma to fire gives the class.
//
// Host interface (used while busy is low): h_imp_* writes input firing times (the
// output of the input encoder, which runs on the host); h_w_* reads or writes weight
// words of the soma selected by h_w_sel, with read data on h_w_rdata one clock later.
// A frame starts with start (train and learn_mask are sampled with it; learn_mask
// picks the somas to be trained). enc_valid is the host's end of the alpha phase of
// each timestep. frame_done pulses when the frame, and its learning pass, is over;
// fired / fire_time / class_id then hold the result until the next start.
//
// The split into encoder, synapses, somas, learning unit and control unit follows the
// source design; the memory organisation, the host interface and the earliest-spike
// read-out are choices of this implementation.
module snn_top #(
  parameter int N_SOMA = snn_pkg::N_SOMA,
  parameter int N_ADDR = snn_pkg::N_ADDR,
  parameter int N_LANE = snn_pkg::N_LANE,
  parameter int N_STEP = snn_pkg::N_STEP,
  parameter int W_W    = snn_pkg::W_W,
  parameter int T_W    = snn_pkg::T_W,
  parameter int WIN    = snn_pkg::WIN,
  parameter int DW     = snn_pkg::DW,
  localparam int AW    = $clog2(N_ADDR),
  localparam int SW    = (N_SOMA > 1) ? $clog2(N_SOMA) : 1,
  localparam int ACC_W = W_W + $clog2(N_ADDR * N_LANE)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host: input firing times
  input  logic                          h_imp_wr_en,
  input  logic [AW-1:0]                 h_imp_addr,
  input  logic [N_LANE-1:0][T_W-1:0]    h_imp_data,
  // host: weights
  input  logic                          h_w_en,
  input  logic                          h_w_we,
  input  logic [SW-1:0]                 h_w_sel,
  input  logic [AW-1:0]                 h_w_addr,
  input  logic [N_LANE-1:0][W_W-1:0]    h_w_wdata,
  output logic [N_LANE-1:0][W_W-1:0]    h_w_rdata,
  // frame control
  input  logic [ACC_W-1:0]              threshold,
  input  logic                          start,
  input  logic                          train,
  input  logic [N_SOMA-1:0]             learn_mask,
  input  logic                          enc_valid,
  output snn_pkg::phase_t               phase,
  output logic [T_W-1:0]                t_now,
  output logic                          busy,
  output logic                          frame_done,
  // results
  output logic [N_SOMA-1:0]             spike,
  output logic [N_SOMA-1:0]             fired,
  output logic [N_SOMA-1:0][T_W-1:0]    fire_time,
  output logic [N_SOMA-1:0][ACC_W-1:0]  mp,
  output logic [SW-1:0]                 class_id,
  output logic                          class_valid,
  output logic [31:0]                   n_learn_updates
);

  // control unit
  logic [AW-1:0] c_addr;
  logic          c_rd_en, acc_clr, acc_valid, frame_start, soma_upd, learn_en, learn_done;
  logic          c_busy;
  logic [N_SOMA-1:0] learn_mask_q;

  snn_control #(.N_ADDR(N_ADDR), .N_STEP(N_STEP), .T_W(T_W)) u_ctrl (
    .clk, .rst_n, .start, .train, .enc_valid,
    .learn_done,
    .phase, .t_now,
    .addr        (c_addr),
    .rd_en       (c_rd_en),
    .acc_clr, .acc_valid, .frame_start, .soma_upd, .learn_en,
    .busy        (c_busy),
    .frame_done
  );
  assign busy = c_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           learn_mask_q <= '0;
    else if (frame_start) learn_mask_q <= learn_mask;
  end

  // learning unit
  logic [AW-1:0]                l_addr;
  logic                         l_imp_rd_en, l_w_en, l_w_we;
  logic [SW-1:0]                l_w_sel;
  logic [N_LANE-1:0][W_W-1:0]   l_w_wdata;
  logic [N_LANE-1:0][T_W-1:0]   imp_rd_data;
  logic [N_LANE-1:0][W_W-1:0]   w_rdata [N_SOMA];
  logic                         l_busy;

  learn_unit #(.N_SOMA(N_SOMA), .N_ADDR(N_ADDR), .N_LANE(N_LANE), .W_W(W_W), .T_W(T_W),
               .WIN(WIN), .DW(DW)) u_learn (
    .clk, .rst_n,
    .en          (learn_en),
    .learn_mask  (learn_mask_q),
    .fired, .fire_time,
    .addr        (l_addr),
    .imp_rd_en   (l_imp_rd_en),
    .imp_rd_data (imp_rd_data),
    .w_sel       (l_w_sel),
    .w_en        (l_w_en),
    .w_we        (l_w_we),
    .w_wdata     (l_w_wdata),
    .w_rdata     (w_rdata[l_w_sel]),
    .state       (),
    .busy        (l_busy),
    .done        (learn_done),
    .n_words_updated (n_learn_updates)
  );

  // impulse memory: host writes, control unit or learning unit reads
  impulse_mem #(.N_ADDR(N_ADDR), .N_LANE(N_LANE), .T_W(T_W)) u_imp (
    .clk,
    .wr_en   (h_imp_wr_en && !c_busy),
    .wr_addr (h_imp_addr),
    .wr_data (h_imp_data),
    .rd_en   (c_rd_en || l_imp_rd_en),
    .rd_addr (l_busy ? l_addr : c_addr),
    .rd_data (imp_rd_data)
  );

  // per soma: weight memory, synapse unit, soma
  logic [N_SOMA-1:0][ACC_W-1:0] psp_sum;
  logic [SW-1:0]                h_sel_q;

  for (genvar s = 0; s < N_SOMA; s++) begin : g_soma
    logic                        m_en, m_we;
    logic [AW-1:0]               m_addr;
    logic [N_LANE-1:0][W_W-1:0]  m_wdata;
    logic                        l_mine, h_mine;

    assign l_mine = l_busy && (l_w_sel == SW'(s));
    assign h_mine = !c_busy && h_w_en && (h_w_sel == SW'(s));

    always_comb begin
      if (l_busy) begin
        m_en    = l_mine && l_w_en;
        m_we    = l_w_we;
        m_addr  = l_addr;
        m_wdata = l_w_wdata;
      end else if (c_busy) begin
        m_en    = c_rd_en;
        m_we    = 1'b0;
        m_addr  = c_addr;
        m_wdata = '0;
      end else begin
        m_en    = h_mine;
        m_we    = h_w_we;
        m_addr  = h_w_addr;
        m_wdata = h_w_wdata;
      end
    end

    weight_mem #(.N_ADDR(N_ADDR), .N_LANE(N_LANE), .W_W(W_W)) u_wmem (
      .clk, .en (m_en), .we (m_we), .addr (m_addr), .wdata (m_wdata), .rdata (w_rdata[s])
    );

    synapse_unit #(.N_LANE(N_LANE), .W_W(W_W), .T_W(T_W), .ACC_W(ACC_W)) u_syn (
      .clk, .rst_n,
      .clr      (acc_clr),
      .valid    (acc_valid),
      .t_now,
      .imp_word (imp_rd_data),
      .w_word   (w_rdata[s]),
      .psp_sum  (psp_sum[s]),
      .n_active ()
    );

    soma #(.ACC_W(ACC_W), .T_W(T_W)) u_soma (
      .clk, .rst_n,
      .frame_start,
      .upd       (soma_upd),
      .psp       (psp_sum[s]),
      .t_now,
      .threshold,
      .spike     (spike[s]),
      .fired     (fired[s]),
      .fire_time (fire_time[s]),
      .mp        (mp[s])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     h_sel_q <= '0;
    else if (h_w_en) h_sel_q <= h_w_sel;
  end
  assign h_w_rdata = w_rdata[h_sel_q];

  // Read-out: the soma that fired first; ties go to the lowest index.
  always_comb begin
    class_id    = '0;
    class_valid = 1'b0;
    for (int s = N_SOMA - 1; s >= 0; s--) begin
      if (fired[s] && (!class_valid || fire_time[s] <= fire_time[class_id])) begin
        class_id    = SW'(s);
        class_valid = 1'b1;
      end
    end
  end

  // The host may only touch the memories while no frame is running.
  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                !(c_busy && (h_imp_wr_en || h_w_en)))
    else $error("host memory access while a frame is running");

endmodule
