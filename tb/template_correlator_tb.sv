// template_correlator_tb: compares the adder tree with a bit count of
// bits & mask, for a 64-bit (8 x 8) and a 25-bit (5 x 5) template, on
// random, all-ones and all-zero inputs.
module template_correlator_tb;
  logic [63:0] bits64, mask64;
  logic [6:0]  sum64;
  logic [24:0] bits25, mask25;
  logic [4:0]  sum25;
  int checks = 0, failures = 0;

  template_correlator #(.N(64)) dut64 (.bits(bits64), .mask(mask64), .sum(sum64));
  template_correlator #(.N(25)) dut25 (.bits(bits25), .mask(mask25), .sum(sum25));

  function automatic int count_on(logic [63:0] v);
    int c = 0;
    for (int i = 0; i < 64; i++) c += int'(v[i]);
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: begin bits64 = '1; mask64 = '1; bits25 = '1; mask25 = '1; end
        1: begin bits64 = '0; mask64 = '1; bits25 = '1; mask25 = '0; end
        default: begin
          bits64 = {$urandom, $urandom}; mask64 = {$urandom, $urandom} & {$urandom, $urandom};
          bits25 = 25'($urandom); mask25 = 25'($urandom);
        end
      endcase
      #1;
      checks += 2;
      if (int'(sum64) != count_on(bits64 & mask64)) begin
        failures++;
        $display("N=64: sum=%0d expected %0d", sum64, count_on(bits64 & mask64));
      end
      if (int'(sum25) != count_on(64'(bits25 & mask25))) begin
        failures++;
        $display("N=25: sum=%0d expected %0d", sum25, count_on(64'(bits25 & mask25)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
