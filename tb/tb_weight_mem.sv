// tb_weight_mem: self-checking test of one soma's weight memory.
// Writes every address, reads back at random, checks the one-clock latency, the
// read-first behaviour of a write and that nothing changes while en is low.
module tb_weight_mem;
  import snn_pkg::*;
  localparam int AW = $clog2(N_ADDR);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                       en = 1'b0, we = 1'b0;
  logic [AW-1:0]              addr = '0;
  logic [N_LANE-1:0][W_W-1:0] wdata = '0, rdata;
  logic [N_LANE*W_W-1:0]      model [N_ADDR];
  int checks = 0, failures = 0;

  weight_mem dut (.*);

  function automatic logic [N_LANE*W_W-1:0] rnd_word();
    logic [N_LANE*W_W-1:0] w;
    for (int i = 0; i < N_LANE*W_W; i += 32) w[i +: 32] = $urandom();
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
      en = 1'b1; we = 1'b1; addr = AW'(a); wdata = model[a];
      @(negedge clk);
    end
    we = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      int a, op;
      a  = $urandom_range(N_ADDR - 1);
      op = $urandom_range(2);
      if (op == 0) begin            // read-modify-write as the learning unit does
        logic [N_LANE*W_W-1:0] nw;
        nw = rnd_word();
        en = 1'b1; we = 1'b1; addr = AW'(a); wdata = nw;
        @(negedge clk);
        checks++;
        if (rdata !== model[a]) failures++;   // read-first
        model[a] = nw;
      end else if (op == 1) begin
        en = 1'b1; we = 1'b0; addr = AW'(a);
        @(negedge clk);
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("read mismatch at %0d", a);
        end
      end else begin                // en low: a write request is ignored
        en = 1'b0; we = 1'b1; addr = AW'(a); wdata = ~model[a];
        @(negedge clk);
      end
      en = 1'b0; we = 1'b0;
    end
    for (int a = 0; a < N_ADDR; a++) begin
      en = 1'b1; addr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
