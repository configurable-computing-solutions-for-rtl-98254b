// peak_detector: finds the best-matching template and offset of a chip.
//
// Every correlate-mode result carries, for NP templates, the bright and
// surround correlation of the threshold chosen for that position. A good
// match has many thresholded-bright chip pixels under the bright template and
// few under the surround (radar shadow) template, so the score used here is
// bright - surround (signed); the document says only that the peak detector
// identifies the template and offset of the peak correlation. The detector
// keeps the highest score seen since clear, with its template number
// (group*NP + lane) and offset. Ties keep the earlier result (lower lane in
// the same cycle). Updated one clock after in_valid; clear has priority.
module peak_detector #(
  parameter int unsigned NP  = 4,
  parameter int unsigned CW  = 7,
  parameter int unsigned XW  = 7,
  parameter int unsigned YW  = 7,
  parameter int unsigned GW  = 2,
  parameter int unsigned TIW = GW + ((NP > 1) ? $clog2(NP) : 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  in_valid,
  input  logic [GW-1:0]         group,
  input  logic [XW-1:0]         x,
  input  logic [YW-1:0]         y,
  input  logic [CW-1:0]         b [NP],
  input  logic [CW-1:0]         s [NP],
  output logic                  best_valid,
  output logic signed [CW:0]    best_score,
  output logic [TIW-1:0]        best_tpl,
  output logic [XW-1:0]         best_x,
  output logic [YW-1:0]         best_y,
  output logic                  improved   // pulses when the peak moved
);

  localparam int unsigned LW = (NP > 1) ? $clog2(NP) : 1;

  logic signed [CW:0] cand_score;
  logic [LW-1:0]      cand_lane;
  logic               take;

  always_comb begin
    cand_score = $signed({1'b0, b[0]}) - $signed({1'b0, s[0]});
    cand_lane  = '0;
    for (int t = 1; t < NP; t++) begin
      if ($signed({1'b0, b[t]}) - $signed({1'b0, s[t]}) > cand_score) begin
        cand_score = $signed({1'b0, b[t]}) - $signed({1'b0, s[t]});
        cand_lane  = LW'(t);
      end
    end
    take = in_valid && (!best_valid || cand_score > best_score);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_valid <= 1'b0;
      best_score <= '0;
      best_tpl   <= '0;
      best_x     <= '0;
      best_y     <= '0;
      improved   <= 1'b0;
    end else if (clear) begin
      best_valid <= 1'b0;
      best_score <= '0;
      best_tpl   <= '0;
      best_x     <= '0;
      best_y     <= '0;
      improved   <= 1'b0;
    end else begin
      improved <= take;
      if (take) begin
        best_valid <= 1'b1;
        best_score <= cand_score;
        best_tpl   <= TIW'(group) * TIW'(NP) + TIW'(cand_lane);
        best_x     <= x;
        best_y     <= y;
      end
    end
  end

endmodule
