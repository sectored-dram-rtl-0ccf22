// Exhaustive test of the VBL encoder: for every sector pattern and beat,
// the index must be the beat-th set bit, and valid must be high exactly for
// beats below the number of set bits.
module tb_vbl_encoder;
  logic [7:0] sb;
  logic [2:0] beat, idx;
  logic       valid;
  int checks = 0, failures = 0;

  vbl_encoder dut (.sb(sb), .beat(beat), .idx(idx), .valid(valid));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int list[$];
      list = {};
      for (int i = 0; i < 8; i++) if ((v >> i) & 1) list.push_back(i);
      for (int b = 0; b < 8; b++) begin
        sb = 8'(v);
        beat = 3'(b);
        #1;
        checks++;
        if (b < list.size()) begin
          if (!valid || idx != 3'(list[b])) begin
            failures++;
            $display("sb=%b beat=%0d: idx=%0d valid=%b, expected %0d", sb, b, idx, valid, list[b]);
          end
        end else if (valid) begin
          failures++;
          $display("sb=%b beat=%0d: valid past end of burst", sb, b);
        end
      end
    end
    // Example of the document: sectors 0, 3 and 7 enabled -> three beats.
    sb = 8'b1000_1001;
    beat = 3'd1; #1; checks++; if (idx != 3'd3) failures++;
    beat = 3'd2; #1; checks++; if (idx != 3'd7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
