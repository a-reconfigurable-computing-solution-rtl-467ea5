// dp_ram: dual-port synchronous block RAM with independent clocks.
//
// Port A reads and writes; port B only reads. Both ports register their read
// data: the word at the address presented in one cycle appears after the
// next rising edge of that port's clock. A read on port A that hits the
// address being written returns the old word (read-first). The design uses
// four of these, in the places where the original used the FPGA's dual-port
// block RAM: the host input chunk RAM, the adjacency-matrix RAM, the cover
// stack and the output RAM. None of them writes through its second port, so
// port B has no write side here; that is this design's simplification.
//
// The memory is not reset: its contents are whatever was written.
//
// Ports: clk_a, we_a, addr_a, din_a, dout_a; clk_b, addr_b, dout_b.
module dp_ram #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk_a,
  input  logic             we_a,
  input  logic [AW-1:0]    addr_a,
  input  logic [WIDTH-1:0] din_a,
  output logic [WIDTH-1:0] dout_a,
  input  logic             clk_b,
  input  logic [AW-1:0]    addr_b,
  output logic [WIDTH-1:0] dout_b
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (we_a && (32'(addr_a) < DEPTH))
      mem[addr_a] <= din_a;
    dout_a <= mem[addr_a];
  end

  always_ff @(posedge clk_b)
    dout_b <= mem[addr_b];

endmodule
