// tb_pilchard_vc_top: end-to-end test through the DIMM-slot pins at a
// 64-vertex size. A host model issues SDRAM-style write and read commands:
// it writes the matrix chunks, starts the engine, polls the status word,
// reads the cover and clears the result, for random graphs (checked
// against an exhaustive minimum-cover reference), a star graph (forces the
// parameter-check prune) and an edgeless graph. Reads must drive the data
// pins exactly three clocks after the command. Each mechanism of the design
// is counted and must occur at least once: chunk writes, start, row
// concatenation, edgeless checks, vertex selections, greedy dives,
// backtracks into a neighbour branch, prunes, "found" and "no cover"
// answers, result write-out and clear.
module tb_pilchard_vc_top;
  localparam int unsigned N = 64, CH = N / 32, WORDS = N / 64, STATUS = WORDS + 1;
  localparam int unsigned EXP_WR = 18 * (N + 1) * CH;  // chunk writes over all 18 runs
  logic          clk = 1'b0, clk_div = 1'b0, rst = 1'b1;
  logic          dimm_s = 1'b1, dimm_ras = 1'b1, dimm_cas = 1'b1, dimm_we = 1'b1;
  logic [13:0]   dimm_a = '0;
  logic [63:0]   dimm_d_in = '0, dimm_d_out;
  logic          dimm_d_oe;
  logic [N-1:0]  adj [N+1];
  int            checks = 0, failures = 0;
  int            n_wr = 0, n_start = 0, n_load = 0, n_edge = 0, n_sel = 0, n_dive = 0;
  int            n_back = 0, n_prune = 0, n_yes = 0, n_no = 0, n_out = 0, n_clear = 0;

  pilchard_vc_top #(.N(N)) dut (
    .clk(clk), .clk_div(clk_div), .rst(rst), .dimm_s(dimm_s), .dimm_ras(dimm_ras),
    .dimm_cas(dimm_cas), .dimm_we(dimm_we), .dimm_a(dimm_a), .dimm_d_in(dimm_d_in),
    .dimm_d_out(dimm_d_out), .dimm_d_oe(dimm_d_oe));

  always #5  clk = ~clk;
  always #10 clk_div = ~clk_div;

  // mechanism counters, from the design's own strobes
  always @(posedge clk) if (!rst && dut.u_pcore.data_we) n_wr++;
  always @(posedge clk_div) begin
    if (dut.u_pcore.finish_load) n_load++;
    if (dut.u_pcore.u_branch.u_edge.done) n_edge++;
    if (dut.u_pcore.u_branch.u_select.done) n_sel++;
    if (dut.u_pcore.u_branch.ev_dive) n_dive++;
    if (dut.u_pcore.u_branch.ev_neighbour) n_back++;
    if (dut.u_pcore.u_branch.ev_prune) n_prune++;
    if (dut.u_pcore.out_we && 32'(dut.u_pcore.out_addr) == STATUS && dut.u_pcore.out_din[0]) n_out++;
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
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

  // read command, then data must be on the pins after exactly three edges
  task automatic dimm_read(logic [13:0] a, output logic [63:0] d);
    @(negedge clk);
    dimm_s = 0; dimm_ras = 1; dimm_cas = 0; dimm_we = 1; dimm_a = a;
    @(negedge clk);
    dimm_s = 1; dimm_cas = 1;
    @(posedge clk); #1;
    check("bus not driven before read latency", longint'(dimm_d_oe), 0);
    @(posedge clk); #1;
    check("bus driven at read latency", longint'(dimm_d_oe), 1);
    d = dimm_d_out;
    @(posedge clk); #1;
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

  task automatic run_graph(int n, int k);
    int mvc, polls;
    logic [63:0] st, w;
    logic [N-1:0] cov;
    mvc = min_cover(n);
    adj[0] = '0;
    adj[0][5:0] = 6'(k);
    adj[0][11:6] = 6'(n);
    for (int r = 0; r <= N; r++)
      for (int c = 0; c < CH; c++)
        dimm_write(14'h20, {adj[r][32*c +: 32], 20'd0, 12'(r * CH + c)});
    dimm_write(14'h0FF, 64'd0);
    n_start++;
    polls = 0;
    do begin
      dimm_read(14'(STATUS), st);
      polls++;
    end while (!st[0] && polls < 50000);
    for (int wi = 1; wi <= WORDS; wi++) begin
      dimm_read(14'(wi), w);
      cov[64*(wi-1) +: 64] = w;
    end
    check("found", longint'(st[1]), longint'(mvc <= k));
    if (st[1]) begin
      n_yes++;
      check("valid cover", longint'(is_cover(n, cov)), 1);
      check("within k", longint'($countones(cov) <= k), 1);
      check("cover size field", longint'(st[16 +: 7]), $countones(cov));
    end else begin
      n_no++;
      check("all-ones mask", longint'(cov == '1), 1);
    end
    dimm_write(14'h0FE, 64'd0);
    n_clear++;
    polls = 0;
    do begin
      dimm_read(14'(STATUS), st);
      polls++;
    end while (st != 0 && polls < 1000);
    check("status cleared", longint'(st), 0);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    // star on 10 vertices with k = 2: the centre must be in the cover and
    // its neighbour branch is pruned; answer is yes (centre plus nothing)
    for (int i = 0; i <= N; i++) adj[i] = '0;
    for (int j = 1; j < 10; j++) begin adj[1][j] = 1; adj[j+1][0] = 1; end
    run_graph(10, 2);
    // edgeless graph, k = 0
    for (int i = 0; i <= N; i++) adj[i] = '0;
    run_graph(8, 0);
    // random graphs at k = minimum and k = minimum - 1
    for (int t = 0; t < 16; t++) begin
      int n, mvc;
      n = $urandom_range(4, 12);
      for (int i = 0; i <= N; i++) adj[i] = '0;
      for (int i = 0; i < n; i++)
        for (int j = i + 1; j < n; j++)
          if ($urandom_range(0, 99) < 40) begin adj[i+1][j] = 1; adj[j+1][i] = 1; end
      mvc = min_cover(n);
      run_graph(n, (t % 2 == 0) ? mvc : ((mvc > 0) ? mvc - 1 : 0));
    end
    $display("writes=%0d starts=%0d loads=%0d edgeless=%0d selects=%0d dives=%0d",
             n_wr, n_start, n_load, n_edge, n_sel, n_dive);
    $display("backtracks=%0d prunes=%0d yes=%0d no=%0d writeouts=%0d clears=%0d",
             n_back, n_prune, n_yes, n_no, n_out, n_clear);
    check("chunk writes", longint'(n_wr), longint'(EXP_WR));
    check("loads = starts", longint'(n_load), longint'(n_start));
    check("write-outs = starts", longint'(n_out), longint'(n_start));
    check("edgeless checks seen", longint'(n_edge > 0), 1);
    check("selections seen", longint'(n_sel > 0), 1);
    check("dives = selections", longint'(n_dive), longint'(n_sel));
    check("backtracks seen", longint'(n_back > 0), 1);
    check("prunes seen", longint'(n_prune > 0), 1);
    check("yes answers seen", longint'(n_yes > 0), 1);
    check("no answers seen", longint'(n_no > 0), 1);
    check("clears seen", longint'(n_clear > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
