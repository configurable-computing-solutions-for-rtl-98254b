// shared_term_tree_tb: drives the ten term counts with random, all-zero and
// all-maximum values and compares each template output with the plain sum
// of its term list, written here from the term table independently of the
// shared-term structure.
module shared_term_tree_tb;
  localparam int unsigned TCW = 7;
  localparam int unsigned OW  = TCW + 3;

  logic [TCW-1:0] term [1:10];
  logic [OW-1:0]  tpl  [5];
  int checks = 0, failures = 0;

  shared_term_tree #(.TCW(TCW)) dut (.term(term), .tpl(tpl));

  // Term lists of templates A..E, as bit sets over terms 1..10.
  localparam logic [10:1] USES [5] = '{
    10'b01_0111_0011,  // A: 1 2 5 6 7 9
    10'b10_0111_1000,  // B: 4 5 6 7 10
    10'b00_0011_0111,  // C: 1 2 3 5 6
    10'b00_0001_0001,  // D: 1 5
    10'b00_1111_1000   // E: 4 5 6 7 8
  };

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 1; i <= 10; i++)
        term[i] = (n == 0) ? '0 : (n == 1) ? '1 : (n < 12) ? TCW'(i == n - 1) * 7'd64
                                                           : TCW'($urandom_range(0, 64));
      #1;
      for (int t = 0; t < 5; t++) begin
        automatic int exp_sum = 0;
        for (int i = 1; i <= 10; i++)
          if (USES[t][i]) exp_sum += int'(term[i]);
        checks++;
        if (int'(tpl[t]) != exp_sum) begin
          failures++;
          if (failures < 10)
            $display("template %0d: got %0d expected %0d", t, tpl[t], exp_sum);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
