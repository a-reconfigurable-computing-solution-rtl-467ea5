// tb_workload_random256: the accelerator at its default size (N = 256),
// driven through the DIMM-slot pins like tb_pilchard_vc_full, on 256-vertex
// instances of the kinds the original engine was measured on: dense random
// graphs searched with cover sizes just above their minimum, a sparse graph
// with a small cover, and a "no" instance.
//   * dense: every pair joined with probability 1/2, except inside a hidden
//     independent set of 12 vertices, so a 244-vertex cover exists; run at
//     k = 248, 247, 246 and 245 (each must be found; smaller k means more
//     backtracking);
//   * sparse: a planted cover of 25, every other vertex joined to two of its
//     vertices; k = 25 must be found;
//   * stars: 25 disjoint stars of nine leaves; k = 25 is found (the
//     centres) and k = 24 has no cover, which the engine must prove by
//     exhausting the pruned search tree.
// Every run loads all 257 rows with the vertex-count field 0 (= 256),
// starts, polls the status word, checks the cover (every edge covered, at
// most k vertices, size field right) or the all-ones mask, and clears.
// The clk-cycle count from start to the status poll that saw done is
// printed; the core runs at half that rate. About half a minute of
// simulation in all.
module tb_workload_random256;
  localparam int unsigned N = 256, CH = N / 32, WORDS = N / 64, STATUS = WORDS + 1;
  logic          clk = 1'b0, clk_div = 1'b0, rst = 1'b1;
  logic          dimm_s = 1'b1, dimm_ras = 1'b1, dimm_cas = 1'b1, dimm_we = 1'b1;
  logic [13:0]   dimm_a = '0;
  logic [63:0]   dimm_d_in = '0, dimm_d_out;
  logic          dimm_d_oe;
  logic [N-1:0]  adj [N+1];
  int            checks = 0, failures = 0, n_back = 0, n_prune = 0;

  pilchard_vc_top dut (
    .clk(clk), .clk_div(clk_div), .rst(rst), .dimm_s(dimm_s), .dimm_ras(dimm_ras),
    .dimm_cas(dimm_cas), .dimm_we(dimm_we), .dimm_a(dimm_a), .dimm_d_in(dimm_d_in),
    .dimm_d_out(dimm_d_out), .dimm_d_oe(dimm_d_oe));

  always #5  clk = ~clk;
  always #10 clk_div = ~clk_div;

  always @(posedge clk_div) begin
    if (dut.u_pcore.u_branch.ev_neighbour) n_back++;
    if (dut.u_pcore.u_branch.ev_prune) n_prune++;
  end

  initial begin : watchdog
    repeat (400000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d expected=%0d", what, got, exp);
    end
  endtask

  task automatic dimm_write(logic [13:0] a, logic [63:0] d);
    @(negedge clk);
    dimm_s = 0; dimm_ras = 1; dimm_cas = 0; dimm_we = 0; dimm_a = a; dimm_d_in = d;
    @(negedge clk);
    dimm_s = 1; dimm_cas = 1; dimm_we = 1;
  endtask

  task automatic dimm_read(logic [13:0] a, output logic [63:0] d);
    @(negedge clk);
    dimm_s = 0; dimm_ras = 1; dimm_cas = 0; dimm_we = 1; dimm_a = a;
    @(negedge clk);
    dimm_s = 1; dimm_cas = 1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    d = dimm_d_out;
    @(posedge clk); #1;
  endtask

  function automatic bit is_cover(int n, logic [N-1:0] c);
    for (int v = 0; v < n; v++)
      if (!c[v] && ((adj[v+1] & ~c) != '0)) return 0;
    return 1;
  endfunction

  task automatic add_edge(int a, int b);
    adj[a+1][b] = 1'b1;
    adj[b+1][a] = 1'b1;
  endtask

  task automatic run_graph(string name, int n, int k, bit expect_found);
    int polls;
    longint t0;
    logic [63:0] st, w;
    logic [N-1:0] cov;
    adj[0] = '0;
    adj[0][7:0]  = 8'(k);
    adj[0][15:8] = 8'(n);           // 256 wraps to 0, read back as N
    for (int r = 0; r <= N; r++)
      for (int c = 0; c < CH; c++)
        dimm_write(14'h40, {adj[r][32*c +: 32], 20'd0, 12'(r * CH + c)});
    t0 = longint'($time);
    dimm_write(14'h0FF, 64'd0);
    polls = 0;
    do begin
      repeat (200) @(posedge clk);
      dimm_read(14'(STATUS), st);
      polls++;
    end while (!st[0] && polls < 2000000);
    for (int wi = 1; wi <= WORDS; wi++) begin
      dimm_read(14'(wi), w);
      cov[64*(wi-1) +: 64] = w;
    end
    $display("%s: found=%0d cover_size=%0d after about %0d clk cycles",
             name, st[1], st[16 +: 9], (longint'($time) - t0) / 10);
    check({name, " answer"}, longint'(st[1]), longint'(expect_found));
    if (st[1]) begin
      check({name, " valid cover"}, longint'(is_cover(n, cov)), 1);
      check({name, " within k"}, longint'($countones(cov) <= k), 1);
      check({name, " size field"}, longint'(st[16 +: 9]), $countones(cov));
    end else begin
      check({name, " all-ones mask"}, longint'(cov == '1), 1);
    end
    dimm_write(14'h0FE, 64'd0);
    repeat (50) @(posedge clk);
    dimm_read(14'(STATUS), st);
    check({name, " cleared"}, longint'(st), 0);
  endtask

  // Dense graph on all 256 vertices: each pair joined with probability 1/2,
  // except inside a hidden independent set of 12 vertices (5, 26, .., 236),
  // so a cover of 244 vertices exists.
  task automatic make_dense();
    for (int i = 0; i <= N; i++) adj[i] = '0;
    for (int a = 0; a < N; a++)
      for (int b = a + 1; b < N; b++)
        if (!(a % 21 == 5 && b % 21 == 5 && b < 252) && $urandom_range(0, 1) == 1)
          add_edge(a, b);
  endtask

  initial begin
    bit in_s [N];
    int sel [25];
    repeat (4) @(posedge clk);
    rst = 0;
    // dense graphs, cover sizes of the first rows of the table
    make_dense();
    run_graph("dense k=248", 256, 248, 1);
    run_graph("dense k=247", 256, 247, 1);
    run_graph("dense k=246", 256, 246, 1);
    run_graph("dense k=245", 256, 245, 1);
    // sparse graph with a planted cover of 25
    for (int i = 0; i <= N; i++) adj[i] = '0;
    for (int v = 0; v < N; v++) in_s[v] = 0;
    for (int i = 0; i < 25; i++) begin
      int v;
      do v = $urandom_range(0, N - 1); while (in_s[v]);
      in_s[v] = 1;
      sel[i] = v;
    end
    for (int v = 0; v < N; v++)
      if (!in_s[v]) for (int e = 0; e < 2; e++) add_edge(v, sel[$urandom_range(0, 24)]);
    run_graph("sparse k=25", 256, 25, 1);
    // 25 disjoint stars of one centre and nine leaves (250 vertices, six
    // isolated): the minimum cover is the 25 centres, so k = 24 has none
    for (int i = 0; i <= N; i++) adj[i] = '0;
    for (int s = 0; s < 25; s++)
      for (int l = 1; l <= 9; l++) add_edge(10 * s, 10 * s + l);
    run_graph("stars k=25", 256, 25, 1);
    run_graph("stars k=24", 256, 24, 0);
    $display("neighbour branches=%0d prunes=%0d", n_back, n_prune);
    check("backtracking exercised", longint'(n_back > 0), 1);
    check("pruning exercised", longint'(n_prune > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
