// pcore: the vertex-cover engine behind the host memory-slot interface.
//
// The host sees a 64-bit memory window. Its writes and reads arrive here as
// one-cycle strobes on clk with an address and a 64-bit data word:
//   * a write whose low address byte is neither 0xFF nor 0xFE is a data
//     write into the input chunk RAM: din[IAW-1:0] is the chunk address and
//     din[63:32] the 32-bit chunk (the address travels in the data word
//     because the slot offers too few usable address lines);
//   * a write to 0xFF starts the engine, a write to 0xFE clears the result;
//   * reads return word addr[OAW-1:0] of the output RAM on dout one cycle
//     after the address: words 1..N/64 hold the cover vector (bits 64w-64 ..
//     64w-1 in word w, all ones when no cover of size k exists) and word
//     N/64+1 is a status word: bit 0 done, bit 1 found, bits 16 and up the
//     cover size.
// Flow: start -> ram_load rebuilds the adjacency rows from the chunks ->
// finish_load starts branch_ctrl -> on its done the output state machine
// copies the result into the output RAM, slice by slice, then waits for a
// clear, which zeroes word 1 and the status word. The same two words are
// zeroed right after reset, so the status word never shows a stale "done".
//
// Two clocks: clk is the host interface clock, clk_core the slower core
// clock (half of clk by default on the original board). Command strobes
// are stretched to CMD_STRETCH clk cycles and pass a two-flop synchroniser
// into clk_core; the RAMs are the only other crossing. The synchroniser,
// the status word and the suppression of the RAM write on command writes
// are this design's choices; the rest follows the original core, including
// the 12-bit chunk address din[11:0] (its prose speaks of a 10-bit field,
// too small for 2056 chunks) and the 16-word output RAM.
//
// Ports: clk, clk_core, rst (async, active high), write, addr, din, dout.
// The branch engine's event strobes and the loader's busy flag are left
// unconnected here (they exist for observation), as are the address bits
// above the command byte and the data bits between chunk address and chunk.
module pcore
  import vc_pkg::*;
#(
  parameter int unsigned N         = 256,
  parameter int unsigned IN_DEPTH  = 2100,  // input chunk RAM words
  parameter int unsigned IAW       = 12,
  parameter int unsigned OUT_DEPTH = 16,    // output RAM words
  parameter int unsigned OAW       = $clog2(OUT_DEPTH)
) (
  input  logic        clk,
  input  logic        clk_core,
  input  logic        rst,
  input  logic        write,
  input  logic [13:0] addr,
  input  logic [63:0] din,
  output logic [63:0] dout
);

  localparam int unsigned VW     = $clog2(N);
  localparam int unsigned AW     = $clog2(N + 1);
  localparam int unsigned WORDS  = N / 64;       // cover slices
  localparam int unsigned STATUS = WORDS + 1;    // status word address

  // ---------------- host side (clk) ----------------
  logic data_we;
  assign data_we = write && (addr[7:0] != CMD_START) && (addr[7:0] != CMD_CLEAR);

  logic       start_h, clear_h;
  logic [2:0] start_cnt, clear_cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      start_h   <= 1'b0;
      start_cnt <= '0;
      clear_h   <= 1'b0;
      clear_cnt <= '0;
    end else begin
      if (write && addr[7:0] == CMD_START && !start_h) begin
        start_h   <= 1'b1;
        start_cnt <= '0;
      end else if (start_h && 32'(start_cnt) != CMD_STRETCH - 1) begin
        start_cnt <= start_cnt + 1'b1;
      end else begin
        start_h   <= 1'b0;
        start_cnt <= '0;
      end
      if (write && addr[7:0] == CMD_CLEAR && !clear_h) begin
        clear_h   <= 1'b1;
        clear_cnt <= '0;
      end else if (clear_h && 32'(clear_cnt) != CMD_STRETCH - 1) begin
        clear_cnt <= clear_cnt + 1'b1;
      end else begin
        clear_h   <= 1'b0;
        clear_cnt <= '0;
      end
    end
  end

  // ---------------- crossing into clk_core ----------------
  logic [1:0] start_sync, clear_sync;
  always_ff @(posedge clk_core or posedge rst) begin
    if (rst) begin
      start_sync <= '0;
      clear_sync <= '0;
    end else begin
      start_sync <= {start_sync[0], start_h};
      clear_sync <= {clear_sync[0], clear_h};
    end
  end

  // ---------------- input chunk RAM ----------------
  logic [IAW-1:0]     ld_in_addr;
  logic [CHUNK_W-1:0] ld_in_data, in_dout_unused;

  dp_ram #(.WIDTH(CHUNK_W), .DEPTH(IN_DEPTH), .AW(IAW)) u_in_ram (
    .clk_a (clk),
    .we_a  (data_we),
    .addr_a(din[IAW-1:0]),
    .din_a (din[63:32]),
    .dout_a(in_dout_unused),
    .clk_b (clk_core),
    .addr_b(ld_in_addr),
    .dout_b(ld_in_data)
  );

  // ---------------- concatenation into the adjacency RAM ----------------
  logic          row_we, ld_busy, finish_load;
  logic [AW-1:0] row_addr, adj_addr;
  logic [N-1:0]  row_data, adj_data, adj_dout_unused;

  ram_load #(.N(N), .IAW(IAW)) u_load (
    .clk        (clk_core),
    .rst        (rst),
    .start      (start_sync[1]),
    .in_addr    (ld_in_addr),
    .in_data    (ld_in_data),
    .row_we     (row_we),
    .row_addr   (row_addr),
    .row_data   (row_data),
    .busy       (ld_busy),
    .finish_load(finish_load)
  );

  dp_ram #(.WIDTH(N), .DEPTH(N + 1), .AW(AW)) u_adj_ram (  // 257 x 256 for N = 256
    .clk_a (clk_core),
    .we_a  (row_we),
    .addr_a(row_addr),
    .din_a (row_data),
    .dout_a(adj_dout_unused),
    .clk_b (clk_core),
    .addr_b(adj_addr),
    .dout_b(adj_data)
  );

  // ---------------- branching engine ----------------
  logic          bc_done, bc_found;
  logic [N-1:0]  bc_mask;
  logic [VW:0]   bc_size;
  logic          ev_dive, ev_backtrack, ev_neighbour, ev_prune;

  branch_ctrl #(.N(N)) u_branch (
    .clk         (clk_core),
    .rst         (rst),
    .start       (finish_load),
    .adj_addr    (adj_addr),
    .adj_data    (adj_data),
    .done        (bc_done),
    .found       (bc_found),
    .mask        (bc_mask),
    .cover_size  (bc_size),
    .ev_dive     (ev_dive),
    .ev_backtrack(ev_backtrack),
    .ev_neighbour(ev_neighbour),
    .ev_prune    (ev_prune)
  );

  // ---------------- output RAM write-out ----------------
  typedef enum logic [2:0] {
    W_IDLE,    // waiting for the engine
    W_SLICE,   // writing cover slices 1..WORDS
    W_STATUS,  // writing the status word
    W_HOLD,    // result readable; waiting for a clear
    W_CLR1,    // zero word 1
    W_CLR2     // zero the status word
  } wstate_e;

  wstate_e        wstate;
  logic [OAW-1:0] slice;
  logic           out_we;
  logic [OAW-1:0] out_addr;
  logic [63:0]    out_din, out_dout_unused;

  always_ff @(posedge clk_core or posedge rst) begin
    if (rst) begin
      wstate   <= W_CLR1;             // clear the result words after reset
      slice    <= '0;
      out_we   <= 1'b0;
      out_addr <= '0;
      out_din  <= '0;
    end else begin
      out_we <= 1'b0;
      unique case (wstate)
        W_IDLE: if (bc_done) begin
          slice  <= OAW'(1);
          wstate <= W_SLICE;
        end
        W_SLICE: begin
          out_we   <= 1'b1;
          out_addr <= slice;
          out_din  <= bc_mask[64*(32'(slice)-1) +: 64];
          if (32'(slice) == WORDS) wstate <= W_STATUS;
          slice <= slice + 1'b1;
        end
        W_STATUS: begin
          out_we   <= 1'b1;
          out_addr <= OAW'(STATUS);
          out_din  <= 64'({bc_size, 14'd0, bc_found, 1'b1});
          wstate   <= W_HOLD;
        end
        W_HOLD: if (clear_sync[1]) wstate <= W_CLR1;
        W_CLR1: begin
          out_we   <= 1'b1;
          out_addr <= OAW'(1);
          out_din  <= '0;
          wstate   <= W_CLR2;
        end
        W_CLR2: begin
          out_we   <= 1'b1;
          out_addr <= OAW'(STATUS);
          out_din  <= '0;
          wstate   <= W_IDLE;
        end
        default: wstate <= W_IDLE;
      endcase
    end
  end

  dp_ram #(.WIDTH(64), .DEPTH(OUT_DEPTH), .AW(OAW)) u_out_ram (
    .clk_a (clk_core),
    .we_a  (out_we),
    .addr_a(out_addr),
    .din_a (out_din),
    .dout_a(out_dout_unused),
    .clk_b (clk),
    .addr_b(addr[OAW-1:0]),
    .dout_b(dout)
  );

endmodule
