// ones_count16: number of ones in a 16-bit word, as a tree of small adders.
//
// The tree uses the carry input of each adder to take in one more data bit,
// so 16 bits need only eight adders: four 2-bit adders each sum three bits,
// two 3-bit adders fold those pairs together with one more bit each, a
// 4-bit adder folds the two results with a further bit, and a final 5-bit
// addition takes the last bit. This adder-tree structure (rather than a
// serial counter or a 64K-entry look-up table) is the one the design uses
// for its degree counting. Purely combinational.
//
// Ports: bits (16-bit word), count (0..16).
module ones_count16 (
  input  logic [15:0] bits,
  output logic [4:0]  count
);

  logic [1:0] s1, s2, s3, s4;  // three bits each
  logic [2:0] s5, s6;          // seven bits each
  logic [3:0] s7;              // fifteen bits

  always_comb begin
    s1    = 2'({1'b0, bits[0]}) + 2'({1'b0, bits[1]})  + 2'(bits[2]);
    s2    = 2'({1'b0, bits[3]}) + 2'({1'b0, bits[4]})  + 2'(bits[5]);
    s3    = 2'({1'b0, bits[6]}) + 2'({1'b0, bits[7]})  + 2'(bits[8]);
    s4    = 2'({1'b0, bits[9]}) + 2'({1'b0, bits[10]}) + 2'(bits[11]);
    s5    = {1'b0, s1} + {1'b0, s2} + 3'(bits[12]);
    s6    = {1'b0, s3} + {1'b0, s4} + 3'(bits[13]);
    s7    = {1'b0, s5} + {1'b0, s6} + 4'(bits[14]);
    count = {1'b0, s7} + 5'(bits[15]);
  end

endmodule
