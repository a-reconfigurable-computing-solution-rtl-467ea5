// tb_dp_ram: dual-port RAM with two unrelated clocks. Port A writes random
// words and reads them back (one-cycle latency, read-first on a write to the
// same address); port B, on its own clock, reads random addresses. All
// reads are compared with a model array kept here.
module tb_dp_ram;
  localparam int unsigned W = 40, D = 48, AW = 6;
  logic          clk_a = 1'b0, clk_b = 1'b0;
  logic          we_a;
  logic [AW-1:0] addr_a, addr_b;
  logic [W-1:0]  din_a, dout_a, dout_b;
  logic [W-1:0]  model [D];
  int            checks = 0, failures = 0;

  dp_ram #(.WIDTH(W), .DEPTH(D)) dut (
    .clk_a(clk_a), .we_a(we_a), .addr_a(addr_a), .din_a(din_a), .dout_a(dout_a),
    .clk_b(clk_b), .addr_b(addr_b), .dout_b(dout_b));

  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;

  initial begin : watchdog
    repeat (20000) @(posedge clk_a);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h expected=%h", what, got, exp);
    end
  endtask

  initial begin
    we_a = 0; addr_a = 0; addr_b = 0; din_a = 0;
    // fill every word through port A
    for (int i = 0; i < D; i++) begin
      @(negedge clk_a);
      we_a = 1; addr_a = AW'(i); din_a = {8'($urandom), $urandom};
      model[i] = din_a;
    end
    @(negedge clk_a); we_a = 0;
    // port A: read-back, and read-first when writing the same word
    for (int t = 0; t < 2000; t++) begin
      logic [W-1:0] old;
      int a;
      @(negedge clk_a);
      a = $urandom_range(0, D-1);
      addr_a = AW'(a);
      we_a = ($urandom_range(0, 2) == 0);
      din_a = {8'($urandom), $urandom};
      old = model[a];
      if (we_a) model[a] = din_a;
      @(posedge clk_a); #1;
      check("port A", dout_a, old);
    end
    @(negedge clk_a); we_a = 0;
    // port B on its own clock
    for (int t = 0; t < 1000; t++) begin
      int a;
      @(negedge clk_b);
      a = $urandom_range(0, D-1);
      addr_b = AW'(a);
      @(posedge clk_b); #1;
      check("port B", dout_b, model[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
