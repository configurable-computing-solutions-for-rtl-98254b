// wrap_fifo_tb: checks the wraparound delay line against a software queue.
// Random data is pushed with random idle clocks; after every step the
// registered output must equal the word pushed DEPTH steps earlier, and it
// must hold while en is low.
module wrap_fifo_tb;
  localparam int unsigned WIDTH = 12;
  localparam int unsigned DEPTH = 6;

  logic clk = 0, rst_n = 0, en = 0;
  logic [WIDTH-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [$];

  wrap_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] held;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++;
    if (dout !== '0) begin failures++; $display("dout not cleared by reset"); end
    for (int n = 0; n < 2000; n++) begin
      en  <= ($urandom_range(0, 3) != 0);
      din <= WIDTH'($urandom);
      @(posedge clk);
      #1;
      if (en) begin
        hist.push_back(din);
        if (hist.size() > DEPTH) begin
          checks++;
          if (dout !== hist[hist.size()-1-DEPTH]) begin
            failures++;
            $display("step %0d: dout=%h expected %h", hist.size(), dout, hist[hist.size()-1-DEPTH]);
          end
        end
        held = dout;
      end else if (hist.size() > DEPTH) begin
        checks++;
        if (dout !== held) begin failures++; $display("dout changed while en=0"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
