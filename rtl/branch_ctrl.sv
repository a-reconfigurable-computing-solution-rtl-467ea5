// branch_ctrl: bounded-search-tree engine for the parameterized vertex cover.
//
// Given the graph in the adjacency RAM (row 0: k in bits VW-1..0 and the
// vertex count in bits 2VW-1..VW, a count of 0 meaning all N vertices; row
// v+1: the neighbours of vertex v) the engine decides whether a vertex
// cover of at most k vertices exists and, if so, returns one. It branches
// on the rule that for any vertex v, either v or all of its neighbours are
// in every cover, always picking the vertex of highest degree in the
// current graph:
//
//   dive:      while the cover is not edgeless and holds fewer than k
//              vertices, select the highest-degree vertex v, push the cover
//              (before v) onto the stack at the level equal to the cover
//              size, record v and its degree in the order vector, mark the
//              level's neighbour branch as still open in the stack
//              indicator, and add v to the cover.
//   backtrack: when the cover reaches k vertices without being edgeless,
//              scan the stack indicator from the deepest level upwards for
//              an open neighbour branch. If the neighbours of that level's
//              vertex would overflow the budget (degree > k - level) the
//              branch is pruned and the scan goes on; otherwise the cover of
//              that level is read back from the stack, the vertex's row is
//              OR-ed into it (all of its neighbours join the cover), and the
//              edgeless check and the dive resume from there.
//   result:    an edgeless check that passes ends the search with found = 1
//              and mask = the cover; a scan that runs past level 0 ends it
//              with found = 0 and mask = all ones, the "no cover of size k"
//              answer.
//
// The selection, edgeless check, stack, stack indicator and order vector
// are the original engine's; keeping each selected vertex's degree beside
// the order vector (instead of recounting the neighbour row) and the exact
// order of the backtracking states are this design's own choices.
//
// Timing: select costs graph_size*(LEVELS+2)+1 cycles, an edgeless check up
// to 3*graph_size+3, a backtrack step one cycle per stack level scanned plus
// three to restore a level. done pulses for one cycle; found, mask and
// cover_size hold until the next start.
//
// Ports: clk, rst (async, active high), start, adj_addr/adj_data (adjacency
// RAM read port, one-cycle latency), done, found, mask, cover_size, and
// one-cycle event strobes ev_dive, ev_backtrack, ev_neighbour, ev_prune for
// instrumentation.
//
// The assertion a_budget (the cover never exceeds k) is disabled during
// the asynchronous reset; that use of rst inside a clocked property is why
// lint reports rst as both synchronous and asynchronous here and in the
// modules above. No flip-flop uses rst synchronously.
module branch_ctrl
  import vc_pkg::*;
#(
  parameter int unsigned N  = 256,
  parameter int unsigned VW = $clog2(N),
  parameter int unsigned CW = $clog2(N + 1),
  parameter int unsigned AW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic [AW-1:0] adj_addr,
  input  logic [N-1:0]  adj_data,
  output logic          done,
  output logic          found,
  output logic [N-1:0]  mask,
  output logic [VW:0]   cover_size,
  output logic          ev_dive,
  output logic          ev_backtrack,
  output logic          ev_neighbour,
  output logic          ev_prune
);

  typedef enum logic [3:0] {
    B_IDLE,       // waiting for start
    B_HDR_RD,     // read row 0 (k, graph size)
    B_HDR,        // latch k and the graph size, clear the search state
    B_EDGE_GO,    // start the edgeless check
    B_EDGE_WAIT,  // wait for it; decide between found, dive and backtrack
    B_SEL_GO,     // start the highest-degree selection
    B_SEL_WAIT,   // wait for it; push the level and add the vertex
    B_BT,         // backtrack: scan the stack indicator upwards
    B_POP_RD,     // read the level's cover and its vertex's row
    B_NEIGH,      // cover := level cover | neighbours of the level's vertex
    B_FOUND,      // report the cover_vec
    B_NOSOL       // report that no cover of size k exists
  } state_e;

  state_e        state;
  logic [VW-1:0] k_reg;
  logic [VW:0]   n_reg;               // vertex count, 1..N
  logic [N-1:0]  cover_vec;               // the mask vector: current cover_vec
  logic [VW:0]   status;              // number of vertices in the cover_vec
  logic [VW-1:0] lvl;                 // backtrack scan level
  logic [VW-1:0] order_vec [N];       // vertex selected at each level
  logic [CW-1:0] deg_vec   [N];       // its degree when selected
  logic [N-1:0]  stack_ind;           // 0: level's neighbour branch open
  logic [AW-1:0] ctrl_addr;

  // stack of cover vectors, one per level
  logic          stk_we;
  logic [VW-1:0] stk_addr;
  logic [N-1:0]  stk_din, stk_dout, stk_unused;

  dp_ram #(.WIDTH(N), .DEPTH(N)) u_stack (
    .clk_a (clk),
    .we_a  (stk_we),
    .addr_a(stk_addr),
    .din_a (stk_din),
    .dout_a(stk_dout),
    .clk_b (clk),
    .addr_b('0),
    .dout_b(stk_unused)
  );

  // selection and edgeless units share the adjacency read port
  logic          sel_start, sel_busy, sel_done;
  logic [AW-1:0] sel_addr;
  logic [VW-1:0] sel_vertex;
  logic [CW-1:0] sel_degree;
  logic          edge_start, edge_busy, edge_done, edge_ok;
  logic [AW-1:0] edge_addr;

  select_vertex #(.N(N)) u_select (
    .clk       (clk),
    .rst       (rst),
    .start     (sel_start),
    .graph_size(n_reg),
    .cover_vec     (cover_vec),
    .row_addr  (sel_addr),
    .row_data  (adj_data),
    .busy      (sel_busy),
    .done      (sel_done),
    .vertex    (sel_vertex),
    .degree    (sel_degree)
  );

  edgeless_check #(.N(N)) u_edge (
    .clk       (clk),
    .rst       (rst),
    .start     (edge_start),
    .graph_size(n_reg),
    .cover_vec     (cover_vec),
    .row_addr  (edge_addr),
    .row_data  (adj_data),
    .busy      (edge_busy),
    .done      (edge_done),
    .edgeless  (edge_ok)
  );

  always_comb begin
    if (sel_busy)       adj_addr = sel_addr;
    else if (edge_busy) adj_addr = edge_addr;
    else                adj_addr = ctrl_addr;
  end

  assign sel_start  = (state == B_SEL_GO);
  assign edge_start = (state == B_EDGE_GO);

  // budget left at level lvl: k - lvl
  logic [CW-1:0] budget;
  assign budget = CW'(k_reg) - CW'(lvl);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state        <= B_IDLE;
      k_reg        <= '0;
      n_reg        <= '0;
      cover_vec        <= '0;
      status       <= '0;
      lvl          <= '0;
      stack_ind    <= '1;
      ctrl_addr    <= '0;
      stk_we       <= 1'b0;
      stk_addr     <= '0;
      stk_din      <= '0;
      done         <= 1'b0;
      found        <= 1'b0;
      mask         <= '0;
      cover_size   <= '0;
      ev_dive      <= 1'b0;
      ev_backtrack <= 1'b0;
      ev_neighbour <= 1'b0;
      ev_prune     <= 1'b0;
      for (int i = 0; i < N; i++) begin
        order_vec[i] <= '0;
        deg_vec[i]   <= '0;
      end
    end else begin
      stk_we       <= 1'b0;
      done         <= 1'b0;
      ev_dive      <= 1'b0;
      ev_backtrack <= 1'b0;
      ev_neighbour <= 1'b0;
      ev_prune     <= 1'b0;
      unique case (state)
        B_IDLE: if (start) begin
          ctrl_addr <= '0;
          state     <= B_HDR_RD;
        end
        B_HDR_RD: state <= B_HDR;
        B_HDR: begin
          k_reg     <= adj_data[VW-1:0];
          // a vertex-count field of 0 stands for a full N-vertex graph
          n_reg     <= (adj_data[2*VW-1:VW] == '0) ? (VW+1)'(N) : {1'b0, adj_data[2*VW-1:VW]};
          cover_vec     <= '0;
          status    <= '0;
          stack_ind <= '1;
          state     <= B_EDGE_GO;
        end
        B_EDGE_GO: state <= B_EDGE_WAIT;
        B_EDGE_WAIT: if (edge_done) begin
          if (edge_ok) begin
            state <= B_FOUND;
          end else if (status >= {1'b0, k_reg}) begin
            if (status == '0) state <= B_NOSOL;
            else begin
              lvl   <= VW'(status - 1'b1);
              state <= B_BT;
            end
          end else begin
            state <= B_SEL_GO;
          end
        end
        B_SEL_GO: state <= B_SEL_WAIT;
        B_SEL_WAIT: if (sel_done) begin
          stk_we                         <= 1'b1;
          stk_addr                       <= VW'(status);
          stk_din                        <= cover_vec;
          order_vec[VW'(status)]         <= sel_vertex;
          deg_vec[VW'(status)]           <= sel_degree;
          stack_ind[VW'(status)]         <= 1'b0;
          cover_vec[sel_vertex]              <= 1'b1;
          status                         <= status + 1'b1;
          ev_dive                        <= 1'b1;
          state                          <= B_EDGE_GO;
        end
        B_BT: begin
          if (!stack_ind[lvl]) begin
            stack_ind[lvl] <= 1'b1;
            if (deg_vec[lvl] > budget) begin
              // neighbours would overflow the parameter: prune
              ev_prune <= 1'b1;
              if (lvl == '0) state <= B_NOSOL;
              else           lvl   <= lvl - 1'b1;
            end else begin
              ev_backtrack <= 1'b1;
              stk_addr     <= lvl;
              ctrl_addr    <= AW'(order_vec[lvl]) + AW'(1);
              state        <= B_POP_RD;
            end
          end else if (lvl == '0) begin
            state <= B_NOSOL;
          end else begin
            lvl <= lvl - 1'b1;
          end
        end
        B_POP_RD: state <= B_NEIGH;
        B_NEIGH: begin
          cover_vec        <= stk_dout | adj_data;
          status       <= (VW+1)'(lvl) + (VW+1)'(deg_vec[lvl]);
          ev_neighbour <= 1'b1;
          state        <= B_EDGE_GO;
        end
        B_FOUND: begin
          mask       <= cover_vec;
          found      <= 1'b1;
          cover_size <= status;
          done       <= 1'b1;
          state      <= B_IDLE;
        end
        B_NOSOL: begin
          mask       <= '1;
          found      <= 1'b0;
          cover_size <= '0;
          done       <= 1'b1;
          state      <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  // the search never lets the cover grow past the parameter
  a_budget: assert property (@(posedge clk) disable iff (rst)
    (state != B_IDLE && state != B_HDR_RD && state != B_HDR) |-> (status <= {1'b0, k_reg}));

endmodule
