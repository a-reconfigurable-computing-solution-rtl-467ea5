// tb_edgeless_check: random graphs and covers, some of them complete covers,
// in a RAM model here. The reference decides whether any edge has both ends
// outside the cover and finds the first vertex with such an edge; the cycle
// count from start to done must be 3*graph_size+3 for an edgeless result and
// 3*v+4 when the scan stops at vertex v.
module tb_edgeless_check;
  localparam int unsigned N = 64, VW = 6, AW = 7;
  logic          clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [VW:0]   graph_size;
  logic [N-1:0]  cover_vec, row_data;
  logic [AW-1:0] row_addr;
  logic          busy, done, edgeless;
  logic [N-1:0]  adj [N+1];
  int            checks = 0, failures = 0, n_yes = 0, n_no = 0;

  edgeless_check #(.N(N)) dut (
    .clk(clk), .rst(rst), .start(start), .graph_size(graph_size), .cover_vec(cover_vec),
    .row_addr(row_addr), .row_data(row_data), .busy(busy), .done(done), .edgeless(edgeless));

  always #5 clk = ~clk;
  always_ff @(posedge clk) row_data <= adj[row_addr];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d expected=%0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i <= N; i++) adj[i] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 300; t++) begin
      int n, dens, first_bad, cycles;
      n = (t < 4) ? N : $urandom_range(1, N - 1);
      dens = $urandom_range(0, 30);
      for (int i = 0; i <= N; i++) adj[i] = '0;
      for (int i = 0; i < n; i++)
        for (int j = i + 1; j < n; j++)
          if ($urandom_range(0, 99) < dens) begin
            adj[i+1][j] = 1'b1;
            adj[j+1][i] = 1'b1;
          end
      cover_vec = '0;
      for (int i = 0; i < n; i++) cover_vec[i] = ($urandom_range(0, 1) == 0);
      if (t % 2 == 0)  // complete the cover: add one end of each open edge
        for (int i = 0; i < n; i++)
          for (int j = i + 1; j < n; j++)
            if (adj[i+1][j] && !cover_vec[i] && !cover_vec[j]) cover_vec[j] = 1'b1;
      graph_size = (VW+1)'(n);
      first_bad = -1;
      for (int v = n - 1; v >= 0; v--)
        if (!cover_vec[v] && ((adj[v+1] & ~cover_vec) != '0)) first_bad = v;
      if (first_bad < 0) n_yes++; else n_no++;
      @(negedge clk); start = 1;
      @(posedge clk); #1 start = 0;
      cycles = 0;
      while (!done) begin @(posedge clk); #1; cycles++; end
      check("edgeless", int'(edgeless), int'(first_bad < 0));
      check("cycles", cycles, (first_bad < 0) ? 3 * n + 3 : 3 * first_bad + 4);
    end
    check("both outcomes seen", int'(n_yes > 0 && n_no > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
