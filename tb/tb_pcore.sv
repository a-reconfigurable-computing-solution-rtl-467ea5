// tb_pcore: drives the core's host strobes directly (write/addr/din on clk,
// core clock at half rate). For random graphs of up to 12 vertices on a
// 64-vertex core it writes every matrix chunk (address in din[11:0], chunk
// in din[63:32]), starts the engine with a write to 0xFF, polls the status
// word, reads the cover words and compares with an exhaustive minimum-cover
// reference, then clears with a write to 0xFE and checks that the status
// word and word 1 return to zero. Reads must return data one clock after
// the address.
module tb_pcore;
  localparam int unsigned N = 64, CH = N / 32, WORDS = N / 64, STATUS = WORDS + 1;
  logic          clk = 1'b0, clk_core = 1'b0, rst = 1'b1;
  logic          write = 1'b0;
  logic [13:0]   addr = '0;
  logic [63:0]   din = '0, dout;
  logic [N-1:0]  adj [N+1];
  int            checks = 0, failures = 0, n_yes = 0, n_no = 0;

  pcore #(.N(N)) dut (.clk(clk), .clk_core(clk_core), .rst(rst), .write(write),
                      .addr(addr), .din(din), .dout(dout));

  always #5  clk = ~clk;
  always #10 clk_core = ~clk_core;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0h expected=%0h", what, got, exp);
    end
  endtask

  task automatic host_write(logic [13:0] a, logic [63:0] d);
    @(negedge clk); write = 1; addr = a; din = d;
    @(negedge clk); write = 0;
  endtask

  task automatic host_read(logic [13:0] a, output logic [63:0] d);
    @(negedge clk); addr = a;
    @(posedge clk); #1 d = dout;
  endtask

  function automatic bit is_cover(int n, logic [N-1:0] c);
    for (int v = 0; v < n; v++)
      if (!c[v] && ((adj[v+1] & ~c) != '0)) return 0;
    return 1;
  endfunction

  function automatic int min_cover(int n);
    int best;
    best = n;
    for (int s = 0; s < (1 << n); s++) begin
      logic [N-1:0] c;
      c = N'(s);
      if ($countones(c) < best && is_cover(n, c)) best = $countones(c);
    end
    return best;
  endfunction

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 30; t++) begin
      int n, k, mvc, polls;
      logic [63:0] st, w;
      logic [N-1:0] cov;
      n = $urandom_range(2, 12);
      for (int i = 0; i <= N; i++) adj[i] = '0;
      for (int i = 0; i < n; i++)
        for (int j = i + 1; j < n; j++)
          if ($urandom_range(0, 99) < 35) begin adj[i+1][j] = 1; adj[j+1][i] = 1; end
      mvc = min_cover(n);
      k = (t % 2 == 0) ? mvc : ((mvc > 0) ? mvc - 1 : 0);
      adj[0][5:0] = 6'(k);
      adj[0][11:6] = 6'(n);
      for (int r = 0; r <= N; r++)
        for (int c = 0; c < CH; c++)
          host_write(14'h10, {adj[r][32*c +: 32], 20'd0, 12'(r * CH + c)});
      host_write(14'h0FF, 64'd0);
      polls = 0;
      do begin
        host_read(14'(STATUS), st);
        polls++;
      end while (!st[0] && polls < 100000);
      for (int wi = 1; wi <= WORDS; wi++) begin
        host_read(14'(wi), w);
        cov[64*(wi-1) +: 64] = w;
      end
      check("found", longint'(st[1]), longint'(mvc <= k));
      if (st[1]) begin
        n_yes++;
        check("valid cover", longint'(is_cover(n, cov)), 1);
        check("cover size", longint'(st[16 +: 7]), $countones(cov));
        check("within k", longint'($countones(cov) <= k), 1);
      end else begin
        n_no++;
        check("all-ones mask", longint'(cov == '1), 1);
      end
      // read timing: the address of one cycle gives data after the next edge
      @(negedge clk); addr = 14'(STATUS);
      @(posedge clk); #1 check("read latency", longint'(dout), longint'(st));
      host_write(14'h0FE, 64'd0);
      polls = 0;
      do begin
        host_read(14'(STATUS), st);
        polls++;
      end while (st != 0 && polls < 1000);
      check("status cleared", longint'(st), 0);
      host_read(14'd1, w);
      check("word 1 cleared", longint'(w), 0);
    end
    check("yes and no answers seen", longint'(n_yes > 0 && n_no > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
