// pilchard_vc_top: vertex-cover accelerator behind a 64-bit DIMM-slot
// interface.
//
// The board sits in a PC's SDRAM DIMM slot, so the host reaches it with
// ordinary memory reads and writes. This top decodes the SDRAM command pins
// (all active low) the way the slot interface does: chip select asserted,
// RAS high and CAS low is a column access, a read when WE is high and a
// write when WE is low. The command strobes, the address pins and the data
// pins are registered once (the I/O-block flip-flops of the FPGA) before
// they reach pcore, and pcore's read data is registered once more on the
// way out. The output enable of the data pins follows a read by two clocks,
// so read data is on the pins three clk cycles after the read command.
//
// The clock DLL and the pad buffers of the board are vendor primitives and
// are not modelled: both clocks come in as ports, and the bidirectional
// data pins are split into dimm_d_in, dimm_d_out and dimm_d_oe. The data
// mask, expansion-connector and serial-presence pins of the slot are not
// used by the engine and are left out.
//
// Ports: clk (slot clock), clk_div (core clock, clk/2 by default on the
// board), rst (async, active high), dimm_s/dimm_ras/dimm_cas/dimm_we
// (active-low command pins), dimm_a (address pins), dimm_d_in, dimm_d_out,
// dimm_d_oe.
module pilchard_vc_top #(
  parameter int unsigned N         = 256,
  parameter int unsigned IN_DEPTH  = 2100,
  parameter int unsigned IAW       = 12,
  parameter int unsigned OUT_DEPTH = 16
) (
  input  logic        clk,
  input  logic        clk_div,
  input  logic        rst,
  input  logic        dimm_s,
  input  logic        dimm_ras,
  input  logic        dimm_cas,
  input  logic        dimm_we,
  input  logic [13:0] dimm_a,
  input  logic [63:0] dimm_d_in,
  output logic [63:0] dimm_d_out,
  output logic        dimm_d_oe
);

  logic        read_p, write_p;
  logic        read_r, write_r, read_d;
  logic [13:0] addr_r;
  logic [63:0] din_r, core_dout;

  assign read_p  = !dimm_s &&  dimm_ras && !dimm_cas &&  dimm_we;
  assign write_p = !dimm_s &&  dimm_ras && !dimm_cas && !dimm_we;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      read_r     <= 1'b0;
      write_r    <= 1'b0;
      read_d     <= 1'b0;
      addr_r     <= '0;
      din_r      <= '0;
      dimm_d_out <= '0;
      dimm_d_oe  <= 1'b0;
    end else begin
      read_r     <= read_p;
      write_r    <= write_p;
      read_d     <= read_r;
      addr_r     <= dimm_a;
      din_r      <= dimm_d_in;
      dimm_d_out <= core_dout;
      dimm_d_oe  <= read_d;
    end
  end

  pcore #(
    .N        (N),
    .IN_DEPTH (IN_DEPTH),
    .IAW      (IAW),
    .OUT_DEPTH(OUT_DEPTH)
  ) u_pcore (
    .clk     (clk),
    .clk_core(clk_div),
    .rst     (rst),
    .write   (write_r),
    .addr    (addr_r),
    .din     (din_r),
    .dout    (core_dout)
  );

endmodule
