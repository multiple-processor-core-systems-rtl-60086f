// tb_synapse_unit: self-checking test of the per-soma synapse unit.
// Presents sweeps of random words (with many silent and many matching lanes) and
// compares the accumulated post-synaptic sum and active-synapse count with sums
// computed in the testbench.
module tb_synapse_unit;
  import snn_pkg::*;
  localparam int ACC_W = 24;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       rst_n = 1'b0, clr = 1'b0, valid = 1'b0;
  logic [T_W-1:0]             t_now = '0;
  logic [N_LANE-1:0][T_W-1:0] imp_word = '0;
  logic [N_LANE-1:0][W_W-1:0] w_word = '0;
  logic [ACC_W-1:0]           psp_sum, n_active;
  int checks = 0, failures = 0;

  synapse_unit #(.ACC_W(ACC_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (psp_sum != 0 || n_active != 0) failures++;
    for (int sweep = 0; sweep < 60; sweep++) begin
      longint exp_sum, exp_cnt;
      int len;
      exp_sum = 0; exp_cnt = 0;
      len   = $urandom_range(1, 300);
      t_now = T_W'($urandom_range(N_STEP - 1));
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      checks++;
      if (psp_sum != 0 || n_active != 0) failures++;
      for (int k = 0; k < len; k++) begin
        for (int i = 0; i < N_LANE; i++) begin
          int r;
          r = $urandom_range(3);
          imp_word[i] = (r == 0) ? t_now : (r == 1) ? T_NONE : T_W'($urandom_range(N_STEP - 1));
          w_word[i]   = (sweep == 0) ? '1 : W_W'($urandom());
          if (imp_word[i] == t_now) begin
            exp_sum += w_word[i];
            exp_cnt++;
          end
        end
        valid = ($urandom_range(4) != 0);
        if (!valid) begin   // an idle clock must not be counted
          for (int i = 0; i < N_LANE; i++)
            if (imp_word[i] == t_now) begin exp_sum -= w_word[i]; exp_cnt--; end
        end
        @(negedge clk);
        valid = 1'b0;
      end
      checks++;
      if (psp_sum != ACC_W'(exp_sum) || n_active != ACC_W'(exp_cnt)) begin
        failures++;
        $display("sweep %0d: sum %0d exp %0d, count %0d exp %0d", sweep, psp_sum, exp_sum,
                 n_active, exp_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
