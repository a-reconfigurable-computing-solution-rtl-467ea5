// vc_pkg: types and constants shared by the vertex-cover branching engine.
//
// The engine keeps a graph as an adjacency matrix in a block RAM, one matrix
// row per RAM word. Row 0 is a header word: the parameter k sits in the low
// byte-sized field and the number of vertices in the field above it (for the
// default N = 256 these are bits 7:0 and 15:8; a count of 0 stands for N).
// Vertex v lives in RAM row v+1.
// The host talks to the engine through 64-bit writes whose low address byte
// selects a command (start, clear) or, for any other value, a plain data
// write into the input chunk RAM.
package vc_pkg;

  // Operating mode of the row/cover mask generator (stage_mix).
  typedef enum logic [1:0] {
    MIX_OFF      = 2'b00,  // output all zeros
    MIX_SELECT   = 2'b01,  // uncovered neighbours of the row's vertex
    MIX_EDGELESS = 2'b10,  // ones where the row's edges are covered
    MIX_SPARE    = 2'b11   // unused, outputs zeros
  } mix_mode_e;

  // Width of one host data chunk written into the input RAM.
  localparam int unsigned CHUNK_W = 32;

  // Command addresses (low 8 bits of the host address).
  localparam logic [7:0] CMD_START = 8'hFF;
  localparam logic [7:0] CMD_CLEAR = 8'hFE;

  // Number of clock cycles a host command strobe is stretched for, so that
  // the slower core clock is sure to see it.
  localparam int unsigned CMD_STRETCH = 8;

endpackage
