// tb_ones_count16: exhaustive check of the 16-bit ones counter.
// Every one of the 65536 input words is applied and the count compared with
// a bit-by-bit sum computed here.
module tb_ones_count16;
  logic        clk = 1'b0;
  logic [15:0] bits;
  logic [4:0]  count;
  int          checks = 0, failures = 0;

  ones_count16 dut (.bits(bits), .count(count));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 65536; w++) begin
      int ref_count;
      bits = 16'(w);
      ref_count = 0;
      for (int b = 0; b < 16; b++) ref_count += (w >> b) & 1;
      @(posedge clk);
      checks++;
      if (int'(count) != ref_count) begin
        failures++;
        if (failures < 10) $display("FAIL bits=%h count=%0d expected=%0d", bits, count, ref_count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
