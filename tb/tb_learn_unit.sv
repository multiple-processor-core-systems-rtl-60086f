// tb_learn_unit: self-checking test of the LEARN state machine.
// The unit runs against memory models in the testbench (one impulse memory, one
// weight memory per soma, synchronous reads). After each learning pass every weight
// is compared with weights updated by the rule in the testbench, and the number of
// clocks from en to done with 2 + sum(2 per soma passed over, 4 + 3*N_ADDR + 3*H per
// trained soma with H changed words). Passes cover somas that did not fire, somas
// masked out, and several trained somas in one pass.
module tb_learn_unit;
  import snn_pkg::*;
  localparam int NA = 64;
  localparam int AW = $clog2(NA);
  localparam int SW = $clog2(N_SOMA);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       rst_n = 1'b0, en = 1'b0;
  logic [N_SOMA-1:0]          learn_mask = '0, fired = '0;
  logic [N_SOMA-1:0][T_W-1:0] fire_time = '0;
  logic [AW-1:0]              addr;
  logic                       imp_rd_en, w_en, w_we, busy, done;
  logic [N_LANE-1:0][T_W-1:0] imp_rd_data = '0;
  logic [SW-1:0]              w_sel;
  logic [N_LANE-1:0][W_W-1:0] w_wdata, w_rdata = '0;
  lstate_t                    state;
  logic [31:0]                n_words_updated;

  logic [N_LANE-1:0][T_W-1:0] imp   [NA];
  logic [N_LANE-1:0][W_W-1:0] wm    [N_SOMA][NA];
  logic [N_LANE-1:0][W_W-1:0] wexp  [N_SOMA][NA];
  int checks = 0, failures = 0, n_skip = 0, n_trained = 0;

  learn_unit #(.N_ADDR(NA)) dut (.*);

  always_ff @(posedge clk) begin
    if (imp_rd_en) imp_rd_data <= imp[addr];
    if (w_en) begin
      w_rdata <= wm[w_sel][addr];
      if (w_we) wm[w_sel][addr] <= w_wdata;
    end
  end

  function automatic int delta(int d);
    if (d >= -5 && d <= 0) return -(12 - 2 * (-d));
    if (d >= 1 && d <= 5)  return 12 - 2 * d;
    return 0;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 12; pass++) begin
      int exp_cycles, cycles, exp_upd;
      logic [31:0] upd0;
      // fresh memory contents
      for (int a = 0; a < NA; a++)
        for (int i = 0; i < N_LANE; i++) begin
          int r;
          r = $urandom_range(3);
          imp[a][i] = (r == 0) ? T_NONE : T_W'($urandom_range(N_STEP - 1));
          for (int s = 0; s < N_SOMA; s++) wm[s][a][i] = W_W'($urandom());
        end
      for (int s = 0; s < N_SOMA; s++) begin
        fired[s]      = (pass == 0) ? 1'b0 : ($urandom_range(3) != 0);
        learn_mask[s] = (pass == 1) ? 1'b0 : ($urandom_range(3) != 0);
        fire_time[s]  = fired[s] ? T_W'($urandom_range(N_STEP - 1)) : T_NONE;
      end
      if (pass == 2) begin fired = '1; learn_mask = '1; end
      // reference
      exp_cycles = 2; exp_upd = 0;
      for (int s = 0; s < N_SOMA; s++) begin
        for (int a = 0; a < NA; a++) wexp[s][a] = wm[s][a];
        if (fired[s] && learn_mask[s]) begin
          int h;
          h = 0;
          n_trained++;
          for (int a = 0; a < NA; a++) begin
            bit any;
            any = 0;
            for (int i = 0; i < N_LANE; i++) begin
              int d, e;
              if (imp[a][i] == T_NONE) continue;
              d = int'(imp[a][i]) - int'(fire_time[s]);
              if (d < -5 || d > 5) continue;
              any = 1;
              e = int'(wm[s][a][i]) + delta(d);
              if (e < 0) e = 0;
              if (e > 255) e = 255;
              wexp[s][a][i] = W_W'(e);
            end
            if (any) h++;
          end
          exp_cycles += 4 + 3 * NA + 3 * h;
          exp_upd    += h;
        end else begin
          n_skip++;
          exp_cycles += 2;
        end
      end
      upd0 = n_words_updated;
      en = 1'b1;
      cycles = 0;
      @(negedge clk);
      en = 1'b0;
      cycles = 1;
      while (!done) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != exp_cycles) begin
        failures++;
        $display("pass %0d: %0d clocks, expected %0d", pass, cycles, exp_cycles);
      end
      checks++;
      if (n_words_updated - upd0 != exp_upd) failures++;
      for (int s = 0; s < N_SOMA; s++)
        for (int a = 0; a < NA; a++) begin
          checks++;
          if (wm[s][a] !== wexp[s][a]) begin
            failures++;
            if (failures < 10) $display("pass %0d soma %0d addr %0d wrong weights", pass, s, a);
          end
        end
      checks++;
      if (state != L_IDLE || busy) failures++;
      repeat (3) @(negedge clk);
    end
    checks++;
    if (n_skip == 0 || n_trained == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
