// tb_stage_mix: checks the row/cover mask generator in all four modes
// against a per-bit reference on random rows and covers.
module tb_stage_mix;
  import vc_pkg::*;
  localparam int unsigned N = 64;
  logic          clk = 1'b0;
  mix_mode_e     mode;
  logic          row_in_cover;
  logic [N-1:0]  adj_row, cover_vec, vec, expect_vec;
  int            checks = 0, failures = 0;

  stage_mix #(.N(N)) dut (.mode(mode), .row_in_cover(row_in_cover), .adj_row(adj_row),
                          .cover_vec(cover_vec), .vec(vec));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      mode         = mix_mode_e'(t % 4);
      row_in_cover = $urandom_range(0, 1) == 1;
      adj_row      = {$urandom, $urandom};
      cover_vec    = {$urandom, $urandom};
      for (int i = 0; i < N; i++) begin
        logic live;  // edge to i exists and is not covered
        live = adj_row[i] && !cover_vec[i];
        case (t % 4)
          1:       expect_vec[i] = row_in_cover ? 1'b0 : live;
          2:       expect_vec[i] = row_in_cover ? 1'b1 : !live;
          default: expect_vec[i] = 1'b0;
        endcase
      end
      @(posedge clk);
      checks++;
      if (vec !== expect_vec) begin
        failures++;
        if (failures < 10) $display("FAIL mode=%0d in_cover=%0d vec=%h expected=%h",
                                    mode, row_in_cover, vec, expect_vec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
