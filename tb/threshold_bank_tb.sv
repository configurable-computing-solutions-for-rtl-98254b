// threshold_bank_tb: exhaustive over all 256 pixel values; bit i must be 1
// exactly when the pixel is at or above 8 + 16*i.
module threshold_bank_tb;
  logic [7:0] pix;
  logic [7:0] bin;
  int checks = 0, failures = 0;

  threshold_bank dut (.pix, .bin);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 256; p++) begin
      pix = 8'(p);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (bin[i] !== (p >= 8 + 16 * i)) begin
          failures++;
          $display("pix=%0d bit %0d = %b", p, i, bin[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
