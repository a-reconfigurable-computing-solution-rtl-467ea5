// degree_adder_tree: pipelined popcount of an N-bit vector.
//
// The vector is cut into N/16 slices, each counted by a combinational
// ones_count16. The slice counts are then added pairwise in a registered
// tree, one register stage per tree level, so an N-bit count takes
// log2(N/16) clock cycles: four stages for the default N = 256, matching the
// four adder pipeline states of the vertex-selection state machine. The
// pipeline runs freely every cycle; a user holds the input stable for
// LEVELS cycles and then reads count.
//
// Ports: clk, vec (N bits), count (0..N). Latency: LEVELS clock edges.
// N must be a power of two and at least 32.
module degree_adder_tree #(
  parameter int unsigned N = 256
) (
  input  logic                   clk,
  input  logic [N-1:0]           vec,
  output logic [$clog2(N+1)-1:0] count
);

  localparam int unsigned GROUPS = N / 16;
  localparam int unsigned LEVELS = $clog2(GROUPS);
  localparam int unsigned CW     = $clog2(N + 1);

  logic [CW-1:0] leaf [GROUPS];
  // stage[l][p] holds the sum of 2^(l+1) slices after l+1 clock edges
  logic [CW-1:0] stage [LEVELS][GROUPS/2];

  for (genvar g = 0; g < GROUPS; g++) begin : g_slice
    logic [4:0] c;
    ones_count16 u_cnt (.bits(vec[16*g +: 16]), .count(c));
    assign leaf[g] = CW'(c);
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < GROUPS / 2; p++)
      stage[0][p] <= leaf[2*p] + leaf[2*p+1];
    for (int l = 1; l < LEVELS; l++)
      for (int p = 0; p < (GROUPS >> (l + 1)); p++)
        stage[l][p] <= stage[l-1][2*p] + stage[l-1][2*p+1];
  end

  assign count = stage[LEVELS-1][0];

endmodule
