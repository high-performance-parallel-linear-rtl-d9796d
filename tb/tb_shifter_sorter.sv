// tb_shifter_sorter: self-checking test of the N-cell shifter sorter.
//
// Uses N = 16. Inserts random pairs (keys 1..255, many repeats), one per
// clock with random gaps, and after every clock compares all cells with a
// reference list kept sorted in descending key order where a new pair goes
// below existing pairs with an equal key and the list is cut to N entries.
// Each insertion must be visible in the very next clock (one pair per clock).
// Then flushes the chain N times and checks that the pairs leave the last
// cell smallest first, that out_load marks each shift, and that the chain is
// empty afterwards. A key-0 pair must never be stored.
module tb_shifter_sorter;
  localparam int unsigned N  = 16;
  localparam int unsigned KW = 8;
  localparam int unsigned DW = 8;

  logic          clk = 1'b0;
  logic          rst;
  logic          in_valid, flush, load_in;
  logic [KW-1:0] in_key, key_in;
  logic [DW-1:0] in_data, data_in;
  logic [KW-1:0] node_key  [N];
  logic [DW-1:0] node_data [N];
  logic [KW-1:0] out_key;
  logic [DW-1:0] out_data;
  logic          out_load;

  int checks = 0, failures = 0;

  shifter_sorter #(.N(N), .KEY_W(KW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: descending, stable for equal keys, at most N entries, rest 0
  logic [KW-1:0] r_key  [N];
  logic [DW-1:0] r_data [N];

  task automatic ref_insert(input logic [KW-1:0] k, input logic [DW-1:0] d);
    int pos = N;
    if (k == 0) return;
    for (int i = 0; i < N; i++) if (r_key[i] < k) begin pos = i; break; end
    if (pos == N) return;
    for (int i = N - 1; i > pos; i--) begin r_key[i] = r_key[i-1]; r_data[i] = r_data[i-1]; end
    r_key[pos] = k; r_data[pos] = d;
  endtask

  task automatic compare(input string what);
    checks++;
    for (int i = 0; i < N; i++)
      if (node_key[i] !== r_key[i] || node_data[i] !== r_data[i]) begin
        failures++;
        $display("%s: cell %0d holds %0d/%0d, expected %0d/%0d", what, i,
                 node_key[i], node_data[i], r_key[i], r_data[i]);
        break;
      end
  endtask

  initial begin
    rst = 1; in_valid = 0; flush = 0; load_in = 0; in_key = 0; in_data = 0;
    key_in = 0; data_in = 0;
    for (int i = 0; i < N; i++) begin r_key[i] = 0; r_data[i] = 0; end
    @(posedge clk); #1 rst = 0;
    for (int round = 0; round < 6; round++) begin
      // fill with random pairs
      for (int t = 0; t < 5 * N; t++) begin
        in_valid = ($urandom_range(0, 4) != 0);
        in_key   = (round == 0 && t < 4) ? KW'(0) : KW'($urandom_range(1, (round % 2) ? 20 : 255));
        in_data  = DW'(t);
        if (in_valid) ref_insert(in_key, in_data);
        @(posedge clk); #1;
        compare("insert");
      end
      in_valid = 0; in_key = 0; in_data = 0;
      // serial read-out from the last cell
      flush = 1;
      for (int i = N - 1; i >= 0; i--) begin
        #0;
        checks++;
        if (out_key !== r_key[i] || out_data !== r_data[i] || out_load !== 1'b1) begin
          failures++;
          $display("read-out %0d: got %0d/%0d load %b, expected %0d/%0d", i, out_key, out_data,
                   out_load, r_key[i], r_data[i]);
        end
        @(posedge clk); #1;
      end
      flush = 0;
      for (int i = 0; i < N; i++) begin r_key[i] = 0; r_data[i] = 0; end
      compare("after read-out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
