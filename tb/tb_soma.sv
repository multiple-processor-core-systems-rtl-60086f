// tb_soma: self-checking test of the soma.
// Runs frames of random post-synaptic inputs against a membrane-potential model:
// accumulation, firing only when the potential exceeds the threshold (equality does
// not fire), reset of the potential on the spike, one spike per frame, and the
// recorded firing timestep.
module tb_soma;
  import snn_pkg::*;
  localparam int ACC_W = 24;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst_n = 1'b0, frame_start = 1'b0, upd = 1'b0;
  logic [ACC_W-1:0] psp = '0, threshold = '0, mp;
  logic [T_W-1:0]   t_now = '0, fire_time;
  logic             spike, fired;
  int checks = 0, failures = 0, n_spikes = 0, n_equal = 0;

  soma #(.ACC_W(ACC_W)) dut (.*);

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
    if (fired || mp != 0 || fire_time != T_NONE) failures++;
    for (int f = 0; f < 200; f++) begin
      longint m;
      bit     fd;
      int     ft;
      m = 0; fd = 0; ft = T_NONE;
      threshold = ACC_W'($urandom_range(50, 2000));
      frame_start = 1'b1;
      @(negedge clk);
      frame_start = 1'b0;
      checks++;
      if (fired || mp != 0) failures++;
      for (int t = 0; t < N_STEP; t++) begin
        bit exp_spike;
        t_now = T_W'(t);
        // every so often an input that lands exactly on the threshold
        if (!fd && $urandom_range(7) == 0 && m < threshold) psp = threshold - ACC_W'(m);
        else psp = ACC_W'($urandom_range(120));
        upd = 1'b1;
        exp_spike = 0;
        if (!fd) begin
          if (m + psp > threshold) begin
            m = 0; fd = 1; ft = t; exp_spike = 1;
          end else begin
            if (m + psp == threshold) n_equal++;
            m = m + psp;
          end
        end
        @(negedge clk);
        upd = 1'b0;
        checks++;
        if (spike != exp_spike || fired != fd || mp != ACC_W'(m) ||
            (fd && fire_time != T_W'(ft))) begin
          failures++;
          $display("frame %0d t %0d: spike %0b/%0b mp %0d/%0d", f, t, spike, exp_spike, mp, m);
        end
        if (spike) n_spikes++;
        // a clock without upd changes nothing and drops the spike
        @(negedge clk);
        checks++;
        if (spike || mp != ACC_W'(m)) failures++;
      end
    end
    checks++;
    if (n_spikes == 0 || n_equal == 0) begin
      failures++;
      $display("coverage: %0d spikes, %0d inputs on the threshold", n_spikes, n_equal);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
