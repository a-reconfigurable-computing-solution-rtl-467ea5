// tb_branch_ctrl: the search engine on random small graphs (up to 13
// vertices, 64-bit rows) against an exhaustive reference. For each graph
// and parameter k the reference finds the minimum vertex cover by trying
// every vertex subset. The engine must report found exactly when that
// minimum is at most k; a reported cover must cover every edge, hold at most
// k vertices, match cover_size and use no vertex outside the graph; a
// "no" answer must come with an all-ones mask. Every search mechanism
// (greedy dive, backtrack to a neighbour branch, pruning on the parameter
// check, both answers) must occur at least once.
module tb_branch_ctrl;
  localparam int unsigned N = 64, VW = 6, AW = 7;
  logic          clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [AW-1:0] adj_addr;
  logic [N-1:0]  adj_data, mask;
  logic          done, found;
  logic [VW:0]   cover_size;
  logic          ev_dive, ev_backtrack, ev_neighbour, ev_prune;
  logic [N-1:0]  adj [N+1];
  int            checks = 0, failures = 0;
  int            n_dive = 0, n_backtrack = 0, n_neigh = 0, n_prune = 0, n_yes = 0, n_no = 0;

  branch_ctrl #(.N(N)) dut (
    .clk(clk), .rst(rst), .start(start), .adj_addr(adj_addr), .adj_data(adj_data),
    .done(done), .found(found), .mask(mask), .cover_size(cover_size),
    .ev_dive(ev_dive), .ev_backtrack(ev_backtrack), .ev_neighbour(ev_neighbour),
    .ev_prune(ev_prune));

  always #5 clk = ~clk;
  always_ff @(posedge clk) adj_data <= adj[adj_addr];
  always_ff @(posedge clk) begin
    n_dive      <= n_dive + int'(ev_dive);
    n_backtrack <= n_backtrack + int'(ev_backtrack);
    n_neigh     <= n_neigh + int'(ev_neighbour);
    n_prune     <= n_prune + int'(ev_prune);
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
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
    for (int i = 0; i <= N; i++) adj[i] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 400; t++) begin
      int n, dens, k, mvc;
      n = $urandom_range(1, 13);
      dens = $urandom_range(10, 70);
      for (int i = 0; i <= N; i++) adj[i] = '0;
      if (t % 10 == 0) begin
        // a star on all vertices plus one extra edge: the centre's
        // neighbour branch overflows any small k and must be pruned
        for (int j = 1; j < n; j++) begin
          adj[1][j] = 1'b1; adj[j+1][0] = 1'b1;
        end
        if (n > 3) begin adj[2][2] = 1'b1; adj[3][1] = 1'b1; end
      end else begin
        for (int i = 0; i < n; i++)
          for (int j = i + 1; j < n; j++)
            if ($urandom_range(0, 99) < dens) begin
              adj[i+1][j] = 1'b1;
              adj[j+1][i] = 1'b1;
            end
      end
      mvc = min_cover(n);
      k = $urandom_range((mvc > 2) ? mvc - 2 : 0, mvc + 1);
      if (k > n) k = n;
      adj[0] = '0;
      adj[0][VW-1:0]    = VW'(k);
      adj[0][2*VW-1:VW] = VW'(n);
      @(negedge clk); start = 1;
      @(posedge clk); #1 start = 0;
      while (!done) begin @(posedge clk); #1; end
      check("found", int'(found), int'(mvc <= k));
      if (found) begin
        n_yes++;
        check("valid cover", int'(is_cover(n, mask)), 1);
        check("cover within k", int'($countones(mask) <= k), 1);
        check("cover_size", int'(cover_size), $countones(mask));
        check("no vertex outside graph", int'((mask >> n) == '0), 1);
      end else begin
        n_no++;
        check("no-solution mask", int'(mask == '1), 1);
      end
    end
    @(posedge clk); #1;
    $display("dives=%0d backtracks=%0d neighbour_branches=%0d prunes=%0d yes=%0d no=%0d",
             n_dive, n_backtrack, n_neigh, n_prune, n_yes, n_no);
    check("dive seen", int'(n_dive > 0), 1);
    check("backtrack seen", int'(n_backtrack > 0), 1);
    check("neighbour branch seen", int'(n_neigh > 0), 1);
    check("prune seen", int'(n_prune > 0), 1);
    check("yes answers seen", int'(n_yes > 0), 1);
    check("no answers seen", int'(n_no > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
