// tb_snn_control: self-checking test of the frame sequencer.
// Runs frames with and without learning, holding enc_valid low for random stretches
// in the alpha phase, and checks: the phase order alpha, beta, gamma in every
// timestep; N_ADDR reads 0..N_ADDR-1 per beta phase; acc_valid one clock after each
// read; one soma update per timestep with t_now counting 0..N_STEP-1; the learning
// start only in training frames; and the clock count of 3 + N_ADDR per timestep plus
// the alpha-phase waits.
module tb_snn_control;
  import snn_pkg::*;
  localparam int NA = 32;
  localparam int AW = $clog2(NA);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n = 1'b0, start = 1'b0, train = 1'b0, enc_valid = 1'b0, learn_done = 1'b0;
  phase_t        phase;
  logic [T_W-1:0] t_now;
  logic [AW-1:0] addr;
  logic          rd_en, acc_clr, acc_valid, frame_start, soma_upd, learn_en, busy, frame_done;
  int checks = 0, failures = 0, n_stall = 0, n_learn = 0;

  snn_control #(.N_ADDR(NA)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // enc_valid: random waits in the alpha phase
  always @(posedge clk) enc_valid <= ($urandom_range(2) == 0);

  // learning unit stand-in: done some clocks after learn_en
  initial begin
    forever begin
      @(negedge clk iff learn_en);
      repeat ($urandom_range(1, 20)) @(posedge clk);
      learn_done <= 1'b1;
      @(posedge clk);
      learn_done <= 1'b0;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < 6; f++) begin
      int cycles, alpha_wait, reads, upds, learns, exp_t;
      bit tr, last_rd;
      phase_t last_ph;
      tr = f[0];
      train = tr; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 0; alpha_wait = 0; reads = 0; upds = 0; learns = 0; exp_t = 0; last_rd = 0;
      last_ph = PH_IDLE;
      while (!frame_done) begin
        if (phase == PH_LEARN) begin
          if (learn_en) learns++;
        end else begin
          cycles++;
          // acc_valid follows the read by one clock
          checks++;
          if (acc_valid != last_rd) failures++;
          last_rd = rd_en;
          if (phase == PH_ALPHA && !enc_valid) begin alpha_wait++; n_stall++; end
          if (rd_en) begin
            checks++;
            if (addr != AW'(reads % NA) || phase != PH_BETA) failures++;
            reads++;
          end
          if (soma_upd) begin
            checks++;
            if (t_now != T_W'(exp_t) || phase != PH_GAMMA || reads != NA * (exp_t + 1)) begin
              failures++;
              $display("frame %0d: update at t %0d after %0d reads", f, t_now, reads);
            end
            exp_t++; upds++;
          end
          // legal phase order
          if (phase != last_ph) begin
            checks++;
            if (!((last_ph == PH_IDLE  && phase == PH_ALPHA) ||
                  (last_ph == PH_ALPHA && phase == PH_BETA)  ||
                  (last_ph == PH_BETA  && phase == PH_GAMMA) ||
                  (last_ph == PH_GAMMA && phase == PH_ALPHA))) begin
              failures++;
              $display("phase %s after %s", phase.name(), last_ph.name());
            end
            last_ph = phase;
          end
        end
        @(negedge clk);
      end
      n_learn += learns;
      checks++;
      if (upds != N_STEP || reads != N_STEP * NA || learns != (tr ? 1 : 0)) begin
        failures++;
        $display("frame %0d: %0d updates, %0d reads, %0d learn starts", f, upds, reads, learns);
      end
      // clocks spent in alpha/beta/gamma: (3 + NA) per timestep plus the waits
      checks++;
      if (cycles != N_STEP * (3 + NA) + alpha_wait) begin
        failures++;
        $display("frame %0d: %0d clocks, expected %0d", f, cycles,
                 N_STEP * (3 + NA) + alpha_wait);
      end
      checks++;
      if (busy) failures++;
      @(negedge clk);
    end
    checks++;
    if (n_stall == 0 || n_learn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
