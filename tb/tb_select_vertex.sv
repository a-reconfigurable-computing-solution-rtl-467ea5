// tb_select_vertex: runs the highest-degree selection at the default size
// (256-bit rows, four adder stages) on random graphs and random covers held
// in a RAM model here. The reference is the largest count of uncovered
// neighbours over the vertices outside the cover, lowest index first on a
// tie. The number of cycles from start to done must be
// graph_size*(4+2)+1: six cycles per vertex.
module tb_select_vertex;
  localparam int unsigned N = 256, VW = 8, CW = 9, AW = 9, LEVELS = 4;
  logic          clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [VW:0]   graph_size;
  logic [N-1:0]  cover_vec, row_data;
  logic [AW-1:0] row_addr;
  logic          busy, done;
  logic [VW-1:0] vertex;
  logic [CW-1:0] degree;
  logic [N-1:0]  adj [N+1];
  int            checks = 0, failures = 0;

  select_vertex #(.N(N)) dut (
    .clk(clk), .rst(rst), .start(start), .graph_size(graph_size), .cover_vec(cover_vec),
    .row_addr(row_addr), .row_data(row_data), .busy(busy), .done(done),
    .vertex(vertex), .degree(degree));

  always #5 clk = ~clk;
  always_ff @(posedge clk) row_data <= adj[row_addr];

  initial begin : watchdog
    repeat (500000) @(posedge clk);
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
    for (int t = 0; t < 60; t++) begin
      int n, dens, best_v, best_d, cycles;
      n = (t < 3) ? 256 - t : $urandom_range(1, 120);
      dens = $urandom_range(1, 60);
      for (int i = 0; i <= N; i++) adj[i] = '0;
      for (int i = 0; i < n; i++)
        for (int j = i + 1; j < n; j++)
          if ($urandom_range(0, 99) < dens) begin
            adj[i+1][j] = 1'b1;
            adj[j+1][i] = 1'b1;
          end
      cover_vec = '0;
      for (int i = 0; i < n; i++) cover_vec[i] = ($urandom_range(0, 3) == 0);
      if (t % 7 == 0) cover_vec = '1;   // no edges left: vertex 0, degree 0
      graph_size = (VW+1)'(n);
      best_v = 0; best_d = 0;
      for (int v = 0; v < n; v++) begin
        int d;
        d = 0;
        if (!cover_vec[v]) for (int j = 0; j < N; j++) d += int'(adj[v+1][j] && !cover_vec[j]);
        if (d > best_d) begin best_d = d; best_v = v; end
      end
      @(negedge clk); start = 1;
      @(posedge clk); #1 start = 0;
      cycles = 0;
      while (!done) begin @(posedge clk); #1; cycles++; end
      check("vertex", int'(vertex), best_v);
      check("degree", int'(degree), best_d);
      check("cycles", cycles, n * (LEVELS + 2) + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
