// edgeless_check: tells whether the cover vector covers every edge.
//
// The unit walks the adjacency RAM row by row (vertex v is RAM row v+1) and
// masks each row with the cover through stage_mix in edgeless mode: the
// result is all ones when the row's vertex is in the cover or when every
// neighbour of it is. The first row that is not all ones ends the scan with
// edgeless = 0; reaching the end of the graph gives edgeless = 1.
//
// Timing per row follows the original state machine: a counter check, the
// edgeless-vector check and an address-increment-and-wait state, i.e. three
// cycles per vertex. Counting rising edges from the one that takes start to
// the one that raises done, a full scan (edgeless result) takes
// 3*graph_size + 3 and a scan that stops at vertex v takes 3*v + 4.
// edgeless is valid with done and held until the next start.
// cover and graph_size must stay stable while busy. graph_size (1..N) is
// one bit wider than a vertex index so that it can hold N itself.
//
// Ports: clk, rst (async, active high), start, graph_size, cover_vec,
// row_addr/row_data (adjacency RAM read port, one-cycle latency), busy,
// done, edgeless.
module edgeless_check
  import vc_pkg::*;
#(
  parameter int unsigned N  = 256,
  parameter int unsigned VW = $clog2(N),
  parameter int unsigned AW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [VW:0]   graph_size,   // 1..N vertices
  input  logic [N-1:0]  cover_vec,
  output logic [AW-1:0] row_addr,
  input  logic [N-1:0]  row_data,
  output logic          busy,
  output logic          done,
  output logic          edgeless
);

  typedef enum logic [2:0] {
    E_IDLE  = 3'd0,  // idle
    E_INIT  = 3'd1,  // initialisation, first row read
    E_CNT   = 3'd2,  // counter check
    E_VEC   = 3'd3,  // edgeless vector check
    E_INC   = 3'd4,  // address increment and wait
    E_FINAL = 3'd5   // result
  } state_e;

  state_e        state;
  logic [VW:0]   v;          // one bit wider: counts up to graph_size
  logic [N-1:0]  mixed;
  logic          ok;

  assign row_addr = AW'(v) + AW'(1);
  assign busy     = (state != E_IDLE);

  stage_mix #(.N(N)) u_mix (
    .mode        (MIX_EDGELESS),
    .row_in_cover(cover_vec[v[VW-1:0]]),
    .adj_row     (row_data),
    .cover_vec       (cover_vec),
    .vec         (mixed)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= E_IDLE;
      v        <= '0;
      ok       <= 1'b0;
      done     <= 1'b0;
      edgeless <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        E_IDLE: if (start) begin
          v     <= '0;
          ok    <= 1'b1;
          state <= E_INIT;
        end
        E_INIT: state <= E_CNT;
        E_CNT: begin
          if (v == graph_size) state <= E_FINAL;
          else                         state <= E_VEC;
        end
        E_VEC: begin
          if (mixed != '1) begin
            ok    <= 1'b0;
            state <= E_FINAL;
          end else begin
            v     <= v + 1'b1;
            state <= E_INC;
          end
        end
        E_INC: state <= E_CNT;
        E_FINAL: begin
          edgeless <= ok;
          done     <= 1'b1;
          state    <= E_IDLE;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

endmodule
