// ram_load: rebuilds full adjacency-matrix rows from host-sized chunks.
//
// The host bus carries 32 bits of payload per write, far narrower than a
// matrix row, so the host writes each row as N/32 consecutive 32-bit chunks
// into the input RAM (chunk c of row r at address r*(N/32)+c; row 0 is the
// header with k and the vertex count). Once started, this state machine
// reads the chunks back in order, concatenates them (chunk c lands in bits
// 32c+31..32c) and writes each completed row as one word into the adjacency
// RAM, so that the branching engine later gets a whole row per RAM access.
// It always moves all N+1 rows and then pulses finish_load for one cycle.
//
// Timing: two cycles per chunk (address, capture) and one per row write,
// i.e. (N+1)*(2*N/32+1) cycles plus one, about 4.4k cycles for N = 256.
// The concatenation-then-branch flow and the chunk order follow the
// original loader; its exact state count is not reproduced.
//
// Ports: clk, rst (async, active high), start, in_addr/in_data (input RAM
// read port, one-cycle latency), row_we/row_addr/row_data (adjacency RAM
// write port), busy, finish_load.
module ram_load
  import vc_pkg::*;
#(
  parameter int unsigned N   = 256,
  parameter int unsigned IAW = 12,             // input RAM address width
  parameter int unsigned AW  = $clog2(N + 1)   // adjacency RAM address width
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  output logic [IAW-1:0]     in_addr,
  input  logic [CHUNK_W-1:0] in_data,
  output logic               row_we,
  output logic [AW-1:0]      row_addr,
  output logic [N-1:0]       row_data,
  output logic               busy,
  output logic               finish_load
);

  localparam int unsigned CHUNKS = N / CHUNK_W;
  localparam int unsigned CCW    = (CHUNKS > 1) ? $clog2(CHUNKS) : 1;

  typedef enum logic [2:0] {
    L_IDLE,     // waiting for start
    L_ADDR,     // chunk address on the input RAM
    L_CAPTURE,  // chunk data valid: place it in the row register
    L_WRITE,    // write the finished row
    L_FINISH    // raise finish_load
  } state_e;

  state_e        state;
  logic [AW-1:0] row;
  logic [CCW-1:0] chunk;

  assign busy = (state != L_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state       <= L_IDLE;
      row         <= '0;
      chunk       <= '0;
      in_addr     <= '0;
      row_we      <= 1'b0;
      row_addr    <= '0;
      row_data    <= '0;
      finish_load <= 1'b0;
    end else begin
      row_we      <= 1'b0;
      finish_load <= 1'b0;
      unique case (state)
        L_IDLE: if (start) begin
          row     <= '0;
          chunk   <= '0;
          in_addr <= '0;
          state   <= L_ADDR;
        end
        L_ADDR: state <= L_CAPTURE;
        L_CAPTURE: begin
          row_data[CHUNK_W*chunk +: CHUNK_W] <= in_data;
          in_addr <= in_addr + 1'b1;
          if (32'(chunk) == CHUNKS - 1) begin
            chunk <= '0;
            state <= L_WRITE;
          end else begin
            chunk <= chunk + 1'b1;
            state <= L_ADDR;
          end
        end
        L_WRITE: begin
          row_we   <= 1'b1;
          row_addr <= row;
          if (32'(row) == N) begin
            state <= L_FINISH;
          end else begin
            row   <= row + 1'b1;
            state <= L_ADDR;
          end
        end
        L_FINISH: begin
          finish_load <= 1'b1;
          state       <= L_IDLE;
        end
        default: state <= L_IDLE;
      endcase
    end
  end

endmodule
