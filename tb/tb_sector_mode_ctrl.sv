// Test of the dynamic on/off control: epochs with a constant or random read
// queue occupancy; the decision at each epoch end must equal
// (sum of occupancy over the epoch) > THRESH*EPOCH, epochs must be EPOCH
// cycles long, and with dynamic_en low the output must stay on.
module tb_sector_mode_ctrl;
  localparam int EPOCH = 1000, THRESH = 30;
  logic clk = 0, rst_n = 0;
  logic dynamic_en, sectored_on, epoch_end;
  logic [6:0] rd_occupancy;
  int checks = 0, failures = 0;

  sector_mode_ctrl #(.EPOCH(EPOCH), .THRESH(THRESH), .OCC_W(7)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int levels[10] = '{31, 30, 10, 64, 29, 0, -1, -1, 45, -2};
    dynamic_en = 1; rd_occupancy = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    checks++; if (!sectored_on) failures++;   // on after reset
    for (int e = 0; e < 10; e++) begin
      int sum;
      sum = 0;
      for (int c = 0; c < EPOCH; c++) begin
        int occ;
        occ = (levels[e] >= 0) ? levels[e] : (levels[e] == -1 ? $urandom_range(0, 60) : (c < 500 ? 61 : 0));
        rd_occupancy = 7'(occ);
        sum += occ;
        checks++;
        if (epoch_end != (c == EPOCH-1)) begin failures++; $display("epoch %0d cycle %0d: epoch_end=%b", e, c, epoch_end); end
        @(negedge clk);
      end
      checks++;
      if (sectored_on != (sum > THRESH*EPOCH)) begin
        failures++;
        $display("epoch %0d: average %0d/1000 -> on=%b", e, sum, sectored_on);
      end
    end
    dynamic_en = 0;
    rd_occupancy = 0;
    repeat (EPOCH + 5) begin
      @(negedge clk);
      checks++; if (!sectored_on) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
