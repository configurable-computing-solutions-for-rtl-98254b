// threshold_select_tb: random shapesums, on-pixel counts and correlation
// pairs; the chosen index must be the highest i whose threshold 8 + 16*i
// half the mean bright pixel value (shapesum / n_on / 2) reaches (0 if
// none), and the outputs must be pair i. Includes the exact boundary
// shapesum = 2*n_on*T_i and one below it.
module threshold_select_tb;
  logic [13:0] shapesum;
  logic [6:0]  n_on;
  logic [6:0]  corr_b [8], corr_s [8];
  logic [2:0]  sel;
  logic [6:0]  b_out, s_out;
  int checks = 0, failures = 0;
  int hits [8];

  threshold_select dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_sel;
    for (int n = 0; n < 4000; n++) begin
      n_on = 7'($urandom_range(1, 64));
      case (n % 3)
        0: shapesum = 14'($urandom_range(0, int'(n_on) * 255));
        1: shapesum = 14'(2 * int'(n_on) * (8 + 16 * $urandom_range(0, 7)));
        default: shapesum = 14'(2 * int'(n_on) * (8 + 16 * $urandom_range(0, 7)) - 1);
      endcase
      for (int i = 0; i < 8; i++) begin
        corr_b[i] = 7'($urandom_range(0, 64));
        corr_s[i] = 7'($urandom_range(0, 64));
      end
      #1;
      exp_sel = 0;
      for (int i = 7; i >= 1; i--)
        if (int'(shapesum) >= 2 * int'(n_on) * (8 + 16 * i)) begin exp_sel = i; break; end
      hits[exp_sel]++;
      checks += 3;
      if (int'(sel) != exp_sel) begin
        failures++;
        $display("shapesum=%0d n_on=%0d sel=%0d expected %0d", shapesum, n_on, sel, exp_sel);
      end
      if (b_out !== corr_b[exp_sel]) failures++;
      if (s_out !== corr_s[exp_sel]) failures++;
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("index %0d never selected", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
