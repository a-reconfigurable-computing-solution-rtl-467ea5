// tb_degree_adder_tree: streams a new random 256-bit vector every cycle into
// the pipelined popcount and checks that each count appears exactly four
// clock edges later (the four adder pipeline stages) and equals the bit sum
// of the vector that produced it.
module tb_degree_adder_tree;
  localparam int unsigned N = 256;
  localparam int unsigned LAT = 4;
  logic                   clk = 1'b0;
  logic [N-1:0]           vec;
  logic [$clog2(N+1)-1:0] count;
  int                     hist [$];
  int                     checks = 0, failures = 0;

  degree_adder_tree #(.N(N)) dut (.clk(clk), .vec(vec), .count(count));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_vec(int density);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = ($urandom_range(0, 99) < density);
    return v;
  endfunction

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int ones;
      case (t % 5)
        0: vec = '0;
        1: vec = '1;
        default: vec = rand_vec($urandom_range(0, 100));
      endcase
      ones = 0;
      for (int i = 0; i < N; i++) ones += int'(vec[i]);
      hist.push_back(ones);
      @(posedge clk);
      #1;
      if (hist.size() > LAT) void'(hist.pop_front());
      if (t >= LAT) begin
        checks++;
        if (int'(count) != hist[0]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d count=%0d expected=%0d", t, count, hist[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
