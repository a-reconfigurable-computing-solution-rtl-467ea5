// tb_ram_load: fills an input-RAM model with random 32-bit chunks for a
// 64-vertex matrix (two chunks per row, 65 rows with the header), runs the
// concatenation and checks that every adjacency row is written exactly once
// with chunk c in bits 32c+31..32c, that finish_load is a single-cycle
// pulse, and that the run takes (N+1)*(2*N/32+1)+1 cycles. A second run
// with new data checks that the loader restarts cleanly.
module tb_ram_load;
  localparam int unsigned N = 64, IAW = 12, AW = 7, CH = N / 32;
  logic           clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [IAW-1:0] in_addr;
  logic [31:0]    in_data;
  logic           row_we, busy, finish_load;
  logic [AW-1:0]  row_addr;
  logic [N-1:0]   row_data;
  logic [31:0]    inmem [(N+1)*CH];
  logic [N-1:0]   got [N+1];
  int             writes [N+1];
  int             checks = 0, failures = 0;

  ram_load #(.N(N), .IAW(IAW)) dut (
    .clk(clk), .rst(rst), .start(start), .in_addr(in_addr), .in_data(in_data),
    .row_we(row_we), .row_addr(row_addr), .row_data(row_data), .busy(busy),
    .finish_load(finish_load));

  always #5 clk = ~clk;
  always_ff @(posedge clk) in_data <= inmem[in_addr];
  always_ff @(posedge clk) if (row_we) begin
    got[row_addr]    <= row_data;
    writes[row_addr] <= writes[row_addr] + 1;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got_v, int exp);
    checks++;
    if (got_v != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d expected=%0d", what, got_v, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int run = 0; run < 2; run++) begin
      int cycles;
      for (int i = 0; i < (N+1)*CH; i++) inmem[i] = $urandom;
      for (int r = 0; r <= N; r++) begin got[r] = '0; writes[r] = 0; end
      @(negedge clk); start = 1;
      @(posedge clk); #1 start = 0;
      cycles = 0;
      while (!finish_load) begin @(posedge clk); #1; cycles++; end
      check("cycles", cycles, (N + 1) * (2 * CH + 1) + 1);
      @(posedge clk); #1;
      check("finish_load is one cycle", int'(finish_load), 0);
      check("idle after finish", int'(busy), 0);
      for (int r = 0; r <= N; r++) begin
        logic [N-1:0] exp_row;
        for (int c = 0; c < CH; c++) exp_row[32*c +: 32] = inmem[r*CH + c];
        check($sformatf("row %0d written once", r), writes[r], 1);
        checks++;
        if (got[r] !== exp_row) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d got=%h expected=%h", r, got[r], exp_row);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
