// select_vertex: finds the highest-degree vertex of the current graph.
//
// The "current graph" is the stored graph with every edge that touches a
// vertex of the cover removed. The unit walks the adjacency RAM row by row
// (vertex v is RAM row v+1), masks each row with the cover vector (stage_mix in
// select mode, which zeroes the rows of vertices already in the cover),
// counts the ones with the pipelined adder tree and keeps the largest count.
// Only a strictly larger degree replaces the best so far, so on a tie the
// vertex met first, the lowest-numbered one, wins.
//
// Timing per vertex follows the original state machine: one wait state for
// the RAM read, LEVELS adder-pipeline states (four for N = 256) and one
// check-and-increment state, i.e. LEVELS+2 cycles. Counting rising edges
// from the one that takes start to the one that raises done, a call takes
// graph_size*(LEVELS+2) + 1. vertex and degree are
// valid with done and held until the next start. cover and graph_size must
// stay stable while busy. graph_size (1..N) is one bit wider than a
// vertex index so that it can hold N itself.
//
// Ports: clk, rst (async, active high), start, graph_size, cover_vec,
// row_addr/row_data (adjacency RAM read port, one-cycle latency), busy,
// done, vertex, degree.
module select_vertex
  import vc_pkg::*;
#(
  parameter int unsigned N  = 256,
  parameter int unsigned VW = $clog2(N),       // vertex index width
  parameter int unsigned CW = $clog2(N + 1),   // degree width
  parameter int unsigned AW = $clog2(N + 1)    // adjacency RAM address width
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
  output logic [VW-1:0] vertex,
  output logic [CW-1:0] degree
);

  localparam int unsigned LEVELS = $clog2(N / 16);

  typedef enum logic [3:0] {
    S_IDLE  = 4'd0,  // idle
    S_INIT  = 4'd1,  // initialisation
    S_ADD   = 4'd2,  // adder pipeline stages 1..LEVELS
    S_CHECK = 4'd6,  // address counter check and degree check
    S_WAIT  = 4'd7,  // wait for the RAM read after the address increment
    S_DONE  = 4'd8   // result of the final address
  } state_e;

  state_e        state;
  logic [VW-1:0] v;
  logic [2:0]    add_cnt;
  logic [N-1:0]  mixed;
  logic [CW-1:0] count;

  assign row_addr = AW'(v) + AW'(1);
  assign busy     = (state != S_IDLE);

  stage_mix #(.N(N)) u_mix (
    .mode        (MIX_SELECT),
    .row_in_cover(cover_vec[v]),
    .adj_row     (row_data),
    .cover_vec       (cover_vec),
    .vec         (mixed)
  );

  degree_adder_tree #(.N(N)) u_tree (
    .clk  (clk),
    .vec  (mixed),
    .count(count)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= S_IDLE;
      v       <= '0;
      add_cnt <= '0;
      vertex  <= '0;
      degree  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          v      <= '0;
          vertex <= '0;
          degree <= '0;
          state  <= S_INIT;
        end
        S_INIT: begin                    // row 1 address is on the RAM
          add_cnt <= '0;
          state   <= S_ADD;
        end
        S_ADD: begin                     // row data valid; tree filling
          if (32'(add_cnt) == LEVELS - 1) state <= S_CHECK;
          add_cnt <= add_cnt + 3'd1;
        end
        S_CHECK: begin
          if (count > degree) begin
            degree <= count;
            vertex <= v;
          end
          if ({1'b0, v} == graph_size - 1'b1) begin
            state <= S_DONE;
          end else begin
            v     <= v + VW'(1);
            state <= S_WAIT;
          end
        end
        S_WAIT: begin
          add_cnt <= '0;
          state   <= S_ADD;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
