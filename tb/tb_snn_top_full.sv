// tb_snn_top_full: end-to-end self-checking test of the spiking network output layer at the
// default sizes (4096 words of 12 synapses per soma): two training frames and one
// inference frame.
//
// The host side is modelled in the testbench: it loads random weights, writes a new
// random set of input firing times before every frame, runs the frame while holding
// enc_valid low at random in the alpha phase, and reads all weights back after a
// training frame. A reference model in the testbench integrates the membrane
// potentials timestep by timestep, finds each soma's firing time and the earliest-spike
// class, and applies the learning rule (offsets -5..0 lower a weight by 12 - 2|d|,
// offsets 1..5 raise it by 12 - 2d, clamped to 0..255) to the somas that fired and are
// selected by learn_mask. The frame's clock count is checked against
//   1 + N_STEP*(3 + N_ADDR) + alpha waits [+ 1 + learning pass]
// with the learning pass 2 + sum(2 per soma passed over, 4 + 3*N_ADDR + 3*H per trained
// soma changing H words). Every mechanism is counted and must occur at least once:
// alpha-phase stall, soma spike, soma silent for a frame, training and inference
// frames, a soma passed over by the mask, weight decrease, increase and clamping.
module tb_snn_top_full;
  import snn_pkg::*;
  localparam int NA     = N_ADDR;
  localparam int NF     = 3;
  localparam int AW     = $clog2(NA);
  localparam int SW     = $clog2(N_SOMA);
  localparam int ACC_W  = W_W + $clog2(NA * N_LANE);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                        rst_n = 1'b0;
  logic                        h_imp_wr_en = 1'b0;
  logic [AW-1:0]               h_imp_addr = '0;
  logic [N_LANE-1:0][T_W-1:0]  h_imp_data = '0;
  logic                        h_w_en = 1'b0, h_w_we = 1'b0;
  logic [SW-1:0]               h_w_sel = '0;
  logic [AW-1:0]               h_w_addr = '0;
  logic [N_LANE-1:0][W_W-1:0]  h_w_wdata = '0, h_w_rdata;
  logic [ACC_W-1:0]            threshold = '0;
  logic                        start = 1'b0, train = 1'b0, enc_valid = 1'b0;
  logic [N_SOMA-1:0]           learn_mask = '0;
  phase_t                      phase;
  logic [T_W-1:0]              t_now;
  logic                        busy, frame_done, class_valid;
  logic [N_SOMA-1:0]           spike, fired;
  logic [N_SOMA-1:0][T_W-1:0]  fire_time;
  logic [N_SOMA-1:0][ACC_W-1:0] mp;
  logic [SW-1:0]               class_id;
  logic [31:0]                 n_learn_updates;

  snn_top dut (.*);

  // reference state
  logic [N_LANE-1:0][T_W-1:0]  imp [NA];
  logic [N_LANE-1:0][W_W-1:0]  wm  [N_SOMA][NA];

  int checks = 0, failures = 0;
  int n_stall = 0, n_spike = 0, n_silent = 0, n_train = 0, n_infer = 0, n_masked = 0;
  int n_dec = 0, n_inc = 0, n_sat = 0;
  bit in_alpha;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) enc_valid <= ($urandom_range(3) != 0);

  function automatic int delta(int d);
    if (d >= -5 && d <= 0) return -(12 - 2 * (-d));
    if (d >= 1 && d <= 5)  return 12 - 2 * d;
    return 0;
  endfunction

  task automatic load_weights();
    for (int s = 0; s < N_SOMA; s++)
      for (int a = 0; a < NA; a++) begin
        for (int i = 0; i < N_LANE; i++)
          case ($urandom_range(7))
            0: wm[s][a][i] = W_W'($urandom_range(8));
            1: wm[s][a][i] = W_W'(255 - $urandom_range(8));
            default: wm[s][a][i] = W_W'($urandom_range(30 + 30 * s, 150 + 30 * s));
          endcase
        h_w_en = 1'b1; h_w_we = 1'b1; h_w_sel = SW'(s); h_w_addr = AW'(a); h_w_wdata = wm[s][a];
        @(negedge clk);
      end
    h_w_en = 1'b0; h_w_we = 1'b0;
  endtask

  task automatic load_image();
    for (int a = 0; a < NA; a++) begin
      for (int i = 0; i < N_LANE; i++)
        imp[a][i] = ($urandom_range(4) == 0) ? T_NONE : T_W'($urandom_range(N_STEP - 1));
      h_imp_wr_en = 1'b1; h_imp_addr = AW'(a); h_imp_data = imp[a];
      @(negedge clk);
    end
    h_imp_wr_en = 1'b0;
  endtask

  task automatic check_weights(int f);
    int bad;
    bad = 0;
    for (int s = 0; s < N_SOMA; s++)
      for (int a = 0; a < NA; a++) begin
        h_w_en = 1'b1; h_w_we = 1'b0; h_w_sel = SW'(s); h_w_addr = AW'(a);
        @(negedge clk);
        h_w_en = 1'b0;
        checks++;
        if (h_w_rdata !== wm[s][a]) begin
          failures++;
          bad++;
          if (bad < 4) $display("frame %0d: soma %0d addr %0d weights differ", f, s, a);
        end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_weights();
    for (int f = 0; f < NF; f++) begin
      longint m [N_SOMA];
      bit     efired [N_SOMA];
      int     etime  [N_SOMA];
      int     eclass, exp_clocks, clocks, waits, learn_cost, h;
      bit     tr;
      logic [N_SOMA-1:0] mask;

      load_image();
      tr   = (f % 3 != 2);
      mask = (f % 4 == 3) ? N_SOMA'(1 << (f % N_SOMA)) : '1;
      // threshold: fraction of the expected total input, so that somas fire at
      // different times and some not at all
      threshold = ACC_W'((NA * N_LANE * 3 / 4) * 130 * $urandom_range(20, 150) / 100);

      // reference: integrate the frame
      for (int s = 0; s < N_SOMA; s++) begin m[s] = 0; efired[s] = 0; etime[s] = T_NONE; end
      for (int t = 0; t < N_STEP; t++)
        for (int s = 0; s < N_SOMA; s++) begin
          longint p;
          p = 0;
          for (int a = 0; a < NA; a++)
            for (int i = 0; i < N_LANE; i++)
              if (imp[a][i] == T_W'(t)) p += wm[s][a][i];
          if (!efired[s]) begin
            if (m[s] + p > threshold) begin m[s] = 0; efired[s] = 1; etime[s] = t; end
            else m[s] += p;
          end
        end
      eclass = -1;
      for (int s = 0; s < N_SOMA; s++)
        if (efired[s] && (eclass < 0 || etime[s] < etime[eclass])) eclass = s;

      // run the frame
      train = tr; learn_mask = mask; start = 1'b1;
      @(negedge clk);
      start = 1'b0; train = 1'b0;
      clocks = 1; waits = 0;
      while (!frame_done) begin
        if (phase == PH_ALPHA && !enc_valid) begin waits++; n_stall++; end
        for (int s = 0; s < N_SOMA; s++)
          if (spike[s]) begin
            n_spike++;
            checks++;
            // the spike appears in the clock after the gamma phase of its timestep
            if (!efired[s] || int'(fire_time[s]) != etime[s]) failures++;
          end
        @(negedge clk);
        clocks++;
      end

      for (int s = 0; s < N_SOMA; s++) begin
        checks++;
        if (fired[s] != efired[s] || (efired[s] && int'(fire_time[s]) != etime[s])) begin
          failures++;
          $display("frame %0d soma %0d: fired %0b at %0d, expected %0b at %0d", f, s,
                   fired[s], fire_time[s], efired[s], etime[s]);
        end
        if (!efired[s]) n_silent++;
      end
      checks++;
      if (class_valid != (eclass >= 0) || (eclass >= 0 && int'(class_id) != eclass)) begin
        failures++;
        $display("frame %0d: class %0d valid %0b, expected %0d", f, class_id, class_valid, eclass);
      end

      // reference: learning
      learn_cost = 2;
      if (tr) begin
        n_train++;
        for (int s = 0; s < N_SOMA; s++) begin
          if (!(efired[s] && mask[s])) begin
            learn_cost += 2;
            if (efired[s]) n_masked++;
            continue;
          end
          h = 0;
          for (int a = 0; a < NA; a++) begin
            bit any;
            any = 0;
            for (int i = 0; i < N_LANE; i++) begin
              int d, e;
              if (imp[a][i] == T_NONE) continue;
              d = int'(imp[a][i]) - etime[s];
              if (d < -5 || d > 5) continue;
              any = 1;
              e = int'(wm[s][a][i]) + delta(d);
              if (d <= 0) n_dec++; else n_inc++;
              if (e < 0)   begin e = 0;   n_sat++; end
              if (e > 255) begin e = 255; n_sat++; end
              wm[s][a][i] = W_W'(e);
            end
            if (any) h++;
          end
          learn_cost += 4 + 3 * NA + 3 * h;
        end
      end else begin
        n_infer++;
      end
      exp_clocks = 1 + N_STEP * (3 + NA) + waits + (tr ? 1 + learn_cost : 0);
      checks++;
      if (clocks != exp_clocks) begin
        failures++;
        $display("frame %0d: %0d clocks, expected %0d", f, clocks, exp_clocks);
      end
      $display("frame %0d: train %0b mask %b fired %b class %0d clocks %0d", f, tr, mask,
               fired, class_valid ? int'(class_id) : -1, clocks);
      check_weights(f);
    end

    $display("stalls %0d spikes %0d silent %0d train %0d infer %0d masked %0d dec %0d inc %0d clamp %0d",
             n_stall, n_spike, n_silent, n_train, n_infer, n_masked, n_dec, n_inc, n_sat);
    checks++; if (n_stall  == 0) begin failures++; $display("no alpha stall"); end
    checks++; if (n_spike  == 0) begin failures++; $display("no spike"); end
    checks++; if (n_silent == 0) begin failures++; $display("no silent soma"); end
    checks++; if (n_train  == 0) begin failures++; $display("no training frame"); end
    checks++; if (n_infer  == 0) begin failures++; $display("no inference frame"); end
    checks++; if (n_masked == 0 && NF > 3) begin failures++; $display("no masked soma"); end
    checks++; if (n_dec    == 0) begin failures++; $display("no weight decrease"); end
    checks++; if (n_inc    == 0) begin failures++; $display("no weight increase"); end
    checks++; if (n_sat    == 0) begin failures++; $display("no clamping"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
