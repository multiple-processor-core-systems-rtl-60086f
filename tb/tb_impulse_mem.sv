// tb_impulse_mem: self-checking test of the impulse (input firing time) memory.
// Fills every address with a pseudo-random word, reads them back in random order and
// checks the one-clock read latency and that a read in the same clock as a write to
// the same address returns the old word.
module tb_impulse_mem;
  import snn_pkg::*;
  localparam int AW = $clog2(N_ADDR);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       wr_en = 1'b0, rd_en = 1'b0;
  logic [AW-1:0]              wr_addr = '0, rd_addr = '0;
  logic [N_LANE-1:0][T_W-1:0] wr_data = '0, rd_data;
  logic [N_LANE*T_W-1:0]      model [N_ADDR];
  int checks = 0, failures = 0;

  impulse_mem dut (.*);

  function automatic logic [N_LANE*T_W-1:0] rnd_word();
    logic [N_LANE*T_W-1:0] w;
    for (int i = 0; i < N_LANE*T_W; i += 32) w[i +: 32] = $urandom();
    return w;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int a = 0; a < N_ADDR; a++) begin
      model[a] = rnd_word();
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = model[a];
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = $urandom_range(N_ADDR - 1);
      rd_en = 1'b1; rd_addr = AW'(a);
      @(negedge clk);
      rd_en = 1'b0;
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        $display("read mismatch at %0d", a);
      end
      // rd_en low: output must hold
      @(negedge clk);
      checks++;
      if (rd_data !== model[a]) failures++;
    end
    // read and write of one address in the same clock returns the old word
    begin
      logic [N_LANE*T_W-1:0] nw;
      nw = rnd_word();
      rd_en = 1'b1; rd_addr = 5; wr_en = 1'b1; wr_addr = 5; wr_data = nw;
      @(negedge clk);
      checks++;
      if (rd_data !== model[5]) failures++;
      wr_en = 1'b0;
      @(negedge clk);
      checks++;
      if (rd_data !== nw) failures++;
      rd_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
