// Exhaustive test of popcount8: all 256 inputs against a bit-serial count.
module tb_popcount8;
  logic [7:0] bits;
  logic [3:0] count;
  int checks = 0, failures = 0;

  popcount8 dut (.bits(bits), .count(count));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int exp;
      bits = 8'(v);
      exp = 0;
      for (int i = 0; i < 8; i++) if ((v >> i) & 1) exp++;
      #1;
      checks++;
      if (count != 4'(exp)) begin
        failures++;
        $display("popcount(%b) = %0d, expected %0d", bits, count, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
