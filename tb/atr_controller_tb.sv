// atr_controller_tb: runs the controller for a small chip (8 x 4 pixels,
// 3-bit pixels, 2 groups) against a loader model that answers each load
// after a random delay. Checks the order of bitstream bases (shapesum and
// correlate per group), the plane and first_pass of every pass, that every
// pass reads addresses 0..W*H-1 back to back, that pix_valid follows the
// read by one clock, that no pixel streams during a load, the per-pass
// length W*H+1+DRAIN, and a single done.
module atr_controller_tb;
  localparam int unsigned W = 8, H = 4, PW = 3, NG = 2, CFG_LEN = 5, CAW = 6;
  localparam int unsigned DRAIN = 5, AW = 5, BW = 2, GW = 1;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, ld_start, ld_done = 0;
  logic [CAW-1:0] ld_base;
  logic img_rd_en, frame_start, first_pass, pix_valid, pk_clear;
  logic [AW-1:0] img_rd_addr;
  logic [BW-1:0] plane;
  logic [GW-1:0] group;
  int checks = 0, failures = 0;

  atr_controller #(.W(W), .H(H), .PW(PW), .NG(NG), .CFG_LEN(CFG_LEN), .CAW(CAW),
                   .DRAIN(DRAIN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // loader model
  int ld_pending = 0;
  bit loading = 0;
  always @(posedge clk) begin
    ld_done <= 0;
    if (ld_start) begin ld_pending <= $urandom_range(3, 9); loading <= 1; end
    else if (ld_pending > 1) ld_pending <= ld_pending - 1;
    else if (ld_pending == 1) begin ld_pending <= 0; ld_done <= 1; loading <= 0; end
  end

  // expected sequence
  int exp_loads [$];
  int n_loads = 0, n_frames = 0, n_done = 0, n_clear = 0;
  int exp_plane, exp_group, pass_addr, pass_len;
  bit in_pass = 0, rd_d = 0;

  always @(posedge clk) if (rst_n) begin
    rd_d <= img_rd_en;
    checks++;
    if (pix_valid !== rd_d) begin failures++; $display("pix_valid does not follow the read"); end
    if (pk_clear) n_clear++;
    if (ld_start) begin
      checks++;
      if (n_loads >= exp_loads.size() || int'(ld_base) != exp_loads[n_loads]) begin
        failures++; $display("load %0d base %0d", n_loads, ld_base);
      end
      n_loads++;
    end
    if (img_rd_en) begin
      checks++;
      if (loading) begin failures++; $display("pixels stream during a load"); end
      checks++;
      if (int'(img_rd_addr) != pass_addr) begin failures++; $display("address %0d expected %0d", img_rd_addr, pass_addr); end
      pass_addr++;
    end
    if (in_pass) pass_len++;
    if (frame_start) begin
      if (in_pass) begin
        checks++;
        if (pass_len != W * H + 1 + DRAIN) begin failures++; $display("pass took %0d clocks", pass_len); end
      end
      // pass n_frames: group n_frames/(PW+1), plane n_frames%(PW+1) (PW = correlate)
      exp_group = n_frames / (PW + 1);
      exp_plane = n_frames % (PW + 1);
      checks++;
      if (int'(group) != exp_group) begin failures++; $display("pass %0d group %0d", n_frames, group); end
      if (exp_plane < PW) begin
        checks += 2;
        if (int'(plane) != exp_plane) begin failures++; $display("pass %0d plane %0d", n_frames, plane); end
        if (first_pass !== (exp_plane == 0)) begin failures++; $display("first_pass wrong"); end
      end
      n_frames++;
      pass_addr = 0;
      pass_len = 0;
      in_pass = 1;
    end
    if (ld_start) in_pass = 0;
    if (done) n_done++;
  end

  initial begin
    for (int g = 0; g < NG; g++) begin
      exp_loads.push_back((2 * g) * CFG_LEN);
      exp_loads.push_back((2 * g + 1) * CFG_LEN);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (done);
    @(posedge clk);
    repeat (5) @(posedge clk);
    checks += 5;
    if (n_loads != 2 * NG) begin failures++; $display("%0d loads", n_loads); end
    if (n_frames != NG * (PW + 1)) begin failures++; $display("%0d passes", n_frames); end
    if (n_done != 1) begin failures++; $display("%0d done pulses", n_done); end
    if (n_clear != 1) begin failures++; $display("%0d peak clears", n_clear); end
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
