// peak_detector_tb: feeds random groups of results with gaps and a clear in
// the middle, and compares best_* with a software peak search that visits
// results in arrival order and lanes in order, keeping the first strictly
// higher bright-minus-surround score.
module peak_detector_tb;
  localparam int unsigned NP = 4, CW = 7, XW = 7, YW = 7, GW = 2, TIW = 4;
  logic clk = 0, rst_n = 0;
  logic clear = 0, in_valid = 0;
  logic [GW-1:0] group = '0;
  logic [XW-1:0] x = '0;
  logic [YW-1:0] y = '0;
  logic [CW-1:0] b [NP], s [NP];
  logic best_valid, improved;
  logic signed [CW:0] best_score;
  logic [TIW-1:0] best_tpl;
  logic [XW-1:0] best_x;
  logic [YW-1:0] best_y;
  int checks = 0, failures = 0;

  peak_detector #(.NP(NP), .CW(CW), .XW(XW), .YW(YW), .GW(GW), .TIW(TIW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m_valid;
    int m_score, m_tpl, m_x, m_y, sc, n_impr, m_impr;
    for (int t = 0; t < NP; t++) begin b[t] = '0; s[t] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      clear <= 1;
      @(posedge clk);
      clear <= 0;
      m_valid = 0; m_score = 0; m_tpl = 0; m_x = 0; m_y = 0; n_impr = 0; m_impr = 0;
      for (int n = 0; n < 3000; n++) begin
        in_valid <= ($urandom_range(0, 3) != 0);
        group <= GW'(n / 750);
        x <= XW'($urandom); y <= YW'($urandom);
        for (int t = 0; t < NP; t++) begin
          // narrow score range so that ties occur
          b[t] <= CW'($urandom_range(10, 20 + n / 100));
          s[t] <= CW'($urandom_range(0, 15));
        end
        @(posedge clk); #1;
        if (in_valid) begin
          for (int t = 0; t < NP; t++) begin
            sc = int'(b[t]) - int'(s[t]);
            if (!m_valid || sc > m_score) begin
              m_valid = 1; m_score = sc; m_tpl = int'(group) * NP + t;
              m_x = int'(x); m_y = int'(y); m_impr = 1;
            end
          end
        end
        checks++;
        if (improved !== 1'(m_impr)) begin failures++; $display("improved flag wrong"); end
        if (m_impr) n_impr++;
        m_impr = 0;
        checks++;
        if (best_valid !== m_valid || (m_valid && (int'(best_score) != m_score ||
            int'(best_tpl) != m_tpl || int'(best_x) != m_x || int'(best_y) != m_y))) begin
          failures++;
          if (failures < 10)
            $display("n=%0d peak %0d tpl %0d (%0d,%0d), expected %0d tpl %0d (%0d,%0d)",
                     n, best_score, best_tpl, best_x, best_y, m_score, m_tpl, m_x, m_y);
        end
      end
      in_valid <= 0;
      checks++;
      if (n_impr < 3) begin failures++; $display("peak moved only %0d times", n_impr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
