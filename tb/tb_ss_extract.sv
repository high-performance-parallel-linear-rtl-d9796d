// tb_ss_extract: self-checking test of the serial read-out controller,
// connected to a real shifter sorter (N = 8).
//
// The sorter is filled with random pairs, then a read-out is started and the
// receiver stalls at random. The stream must give exactly N pairs, smallest
// of the kept set first, with out_last on the N-th, must not move while the
// receiver is not ready, and must take N clocks when the receiver is always
// ready. Afterwards the sorter must be empty.
module tb_ss_extract;
  localparam int unsigned N  = 8;
  localparam int unsigned KW = 8;
  localparam int unsigned DW = 8;

  logic          clk = 1'b0;
  logic          rst;
  logic          in_valid;
  logic [KW-1:0] in_key;
  logic [DW-1:0] in_data;
  logic [KW-1:0] node_key  [N];
  logic [DW-1:0] node_data [N];
  logic [KW-1:0] tail_key;
  logic [DW-1:0] tail_data;
  logic          tail_load;
  logic          start, busy, out_valid, out_ready, out_last, shift;
  logic [KW-1:0] out_key;
  logic [DW-1:0] out_data;

  int checks = 0, failures = 0;

  shifter_sorter #(.N(N), .KEY_W(KW), .DATA_W(DW)) u_ss (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_key(in_key), .in_data(in_data),
    .flush(shift), .load_in(1'b0), .key_in('0), .data_in('0),
    .node_key(node_key), .node_data(node_data),
    .out_key(tail_key), .out_data(tail_data), .out_load(tail_load));

  ss_extract #(.N(N), .KEY_W(KW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [KW-1:0] want_k [N];
    logic [DW-1:0] want_d [N];
    rst = 1; in_valid = 0; in_key = 0; in_data = 0; start = 0; out_ready = 0;
    @(posedge clk); #1 rst = 0;
    for (int round = 0; round < 20; round++) begin
      int got, clocks, fill;
      bit always_ready;
      got = 0; clocks = 0;
      always_ready = (round % 2 == 1);
      fill = $urandom_range(0, 3 * N);
      for (int t = 0; t < fill; t++) begin
        in_valid = 1; in_key = KW'($urandom_range(1, 255)); in_data = DW'($urandom);
        @(posedge clk); #1;
      end
      in_valid = 0; in_key = 0; in_data = 0;
      for (int i = 0; i < N; i++) begin want_k[i] = node_key[i]; want_d[i] = node_data[i]; end
      start = 1; @(posedge clk); #1 start = 0;
      while (got < N && clocks < 10 * N) begin
        out_ready = always_ready ? 1'b1 : ($urandom_range(0, 1) == 1);
        #1;
        if (out_valid && out_ready) begin
          checks++;
          if (out_key !== want_k[N-1-got] || out_data !== want_d[N-1-got] ||
              out_last !== (got == N - 1)) begin
            failures++;
            $display("round %0d pair %0d: got %0d/%0d last %b expected %0d/%0d", round, got,
                     out_key, out_data, out_last, want_k[N-1-got], want_d[N-1-got]);
          end
          got++;
        end else if (out_valid) begin
          checks++;
          if (shift) begin failures++; $display("shift without ready"); end
        end
        @(posedge clk); #1;
        clocks++;
      end
      out_ready = 0;
      checks++;
      if (got != N || busy || out_valid) begin
        failures++; $display("round %0d: %0d pairs, busy %b cnt %0d", round, got, busy, dut.cnt);
      end
      if (always_ready) begin
        checks++;
        if (clocks != N) begin failures++; $display("read-out took %0d clocks", clocks); end
      end
      checks++;
      foreach (node_key[i]) if (node_key[i] != 0) begin
        failures++; $display("sorter not empty after read-out"); break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
