// tb_learn_rule: self-checking test of the weight-change rule.
// The expected change is taken from a table of the rule (DW = 12, DW/6 = 2):
// offsets -5..0 decrease the weight by 2,4,6,8,10,12; offsets +1..+5 increase it by
// 10,8,6,4,2; all other offsets and silent inputs leave it unchanged. Every offset
// from -12 to +12 is tried with random weights, including the clamping limits.
module tb_learn_rule;
  import snn_pkg::*;

  logic [N_LANE-1:0][T_W-1:0] imp_word;
  logic [N_LANE-1:0][W_W-1:0] w_word;
  logic [T_W-1:0]             moment;
  logic [N_LANE-1:0]          hit;
  logic [N_LANE-1:0][W_W-1:0] w_new;
  int checks = 0, failures = 0, n_dec = 0, n_inc = 0, n_keep = 0, n_sat = 0;

  learn_rule dut (.*);

  // change for offset d = t_syn - t_soma
  function automatic int delta(int d);
    case (d)
      -5: return -2;  -4: return -4;  -3: return -6;
      -2: return -8;  -1: return -10;  0: return -12;
       1: return 10;   2: return 8;    3: return 6;
       4: return 4;    5: return 2;
      default: return 0;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int ti [N_LANE];
      moment = T_W'($urandom_range(N_STEP - 1));
      for (int i = 0; i < N_LANE; i++) begin
        int r;
        r = $urandom_range(9);
        if (r == 0) ti[i] = T_NONE;
        else if (r < 7) ti[i] = int'(moment) + $urandom_range(12) - 6;
        else ti[i] = $urandom_range(N_STEP - 1);
        if (ti[i] < 0 || ti[i] > N_STEP - 1) ti[i] = T_NONE;
        imp_word[i] = T_W'(ti[i]);
        case ($urandom_range(5))
          0: w_word[i] = W_W'($urandom_range(11));
          1: w_word[i] = W_W'(255 - $urandom_range(11));
          default: w_word[i] = W_W'($urandom());
        endcase
      end
      #1;
      for (int i = 0; i < N_LANE; i++) begin
        int d, ch, e;
        bit eh;
        d  = ti[i] - int'(moment);
        ch = (ti[i] == int'(T_NONE)) ? 0 : delta(d);
        eh = (ti[i] != int'(T_NONE)) && d >= -5 && d <= 5;
        e  = int'(w_word[i]) + ch;
        if (e < 0)   begin e = 0;   n_sat++; end
        if (e > 255) begin e = 255; n_sat++; end
        if (!eh) n_keep++; else if (ch < 0) n_dec++; else n_inc++;
        checks++;
        if (hit[i] != eh || w_new[i] != W_W'(e)) begin
          failures++;
          $display("t_syn %0d moment %0d w %0d: got %0d hit %0b, expected %0d hit %0b",
                   ti[i], moment, w_word[i], w_new[i], hit[i], e, eh);
        end
      end
    end
    checks++;
    if (n_dec == 0 || n_inc == 0 || n_keep == 0 || n_sat == 0) failures++;
    $display("decreases %0d increases %0d kept %0d clamped %0d", n_dec, n_inc, n_keep, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
