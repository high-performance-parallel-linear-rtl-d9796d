// tb_parallel_ss: self-checking test of the parallel shifter sorter.
//
// Uses N = 8 cells and B = 3 units, 16-bit data carrying a unique tag per
// pair. Feeds random pairs into random lanes, starts a merge, and checks:
//  * merge_busy stays high for exactly (B-1)*N clocks, merge_done pulses once
//    right after, and in_ready is low during the merge;
//  * unit 0 then holds the N largest keys of everything inserted, in
//    descending order, and every stored pair is an inserted pair, none twice;
//  * more pairs after a merge and a second merge still give the right set
//    (without clearing);
//  * drain_shift read-out gives the set smallest first.
// The reference is a plain list of all inserted pairs, sorted by key.
module tb_parallel_ss;
  localparam int unsigned N  = 8;
  localparam int unsigned B  = 3;
  localparam int unsigned KW = 8;
  localparam int unsigned DW = 16;

  logic          clk = 1'b0;
  logic          rst;
  logic          in_valid  [B];
  logic [KW-1:0] in_key    [B];
  logic [DW-1:0] in_data   [B];
  logic          in_ready;
  logic          merge_start, merge_busy, merge_done, drain_shift;
  logic [KW-1:0] result_key  [N];
  logic [DW-1:0] result_data [N];
  logic [KW-1:0] tail_key;
  logic [DW-1:0] tail_data;

  int checks = 0, failures = 0;

  parallel_ss #(.N(N), .B(B), .KEY_W(KW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [KW-1:0] all_key  [$];
  logic [DW-1:0] all_tag  [$];
  int tag = 1;

  function automatic logic [KW-1:0] nth_largest(int n);
    logic [KW-1:0] s [$];
    s = all_key;
    s.rsort();
    return (n < s.size()) ? s[n] : '0;
  endfunction

  task automatic check_result(string what);
    bit seen [int];
    checks++;
    for (int i = 0; i < N; i++) begin
      logic [KW-1:0] want = nth_largest(i);
      if (result_key[i] !== want) begin
        failures++;
        $display("%s: cell %0d key %0d expected %0d", what, i, result_key[i], want);
        return;
      end
      if (want != 0) begin
        int hit = 0;
        foreach (all_tag[j]) if (all_tag[j] == result_data[i] && all_key[j] == want) hit = 1;
        if (!hit || seen.exists(int'(result_data[i]))) begin
          failures++;
          $display("%s: cell %0d pair %0d/%0d not an inserted pair or repeated", what, i,
                   result_key[i], result_data[i]);
          return;
        end
        seen[int'(result_data[i])] = 1;
      end
    end
  endtask

  task automatic feed(int cycles, int kmax);
    for (int t = 0; t < cycles; t++) begin
      for (int k = 0; k < B; k++) begin
        in_valid[k] = ($urandom_range(0, 2) != 0);
        in_key[k]   = KW'($urandom_range(1, kmax));
        in_data[k]  = DW'(tag);
        tag++;
        if (in_valid[k]) begin all_key.push_back(in_key[k]); all_tag.push_back(in_data[k]); end
      end
      @(posedge clk); #1;
    end
    for (int k = 0; k < B; k++) in_valid[k] = 0;
  endtask

  task automatic merge(string what);
    int busy_cycles = 0, done_seen = 0;
    merge_start = 1;
    @(posedge clk); #1;
    merge_start = 0;
    // keep offering input during the merge: it must be ignored
    for (int k = 0; k < B; k++) begin in_valid[k] = 1; in_key[k] = '1; in_data[k] = '1; end
    while (merge_busy) begin
      busy_cycles++;
      checks++;
      if (in_ready) begin failures++; $display("%s: in_ready high during merge", what); end
      @(posedge clk); #1;
      if (merge_done) done_seen++;
    end
    for (int k = 0; k < B; k++) in_valid[k] = 0;
    checks++;
    if (busy_cycles != (B - 1) * N || done_seen != 1) begin
      failures++;
      $display("%s: merge took %0d clocks (expected %0d), done pulses %0d", what, busy_cycles,
               (B - 1) * N, done_seen);
    end
    check_result(what);
  endtask

  initial begin
    rst = 1; merge_start = 0; drain_shift = 0;
    for (int k = 0; k < B; k++) begin in_valid[k] = 0; in_key[k] = 0; in_data[k] = 0; end
    @(posedge clk); #1 rst = 0;
    for (int round = 0; round < 8; round++) begin
      feed($urandom_range(1, 4 * N), (round % 3 == 0) ? 12 : 255);
      merge($sformatf("round %0d merge 1", round));
      feed($urandom_range(1, 2 * N), 255);
      merge($sformatf("round %0d merge 2", round));
      // serial read-out of unit 0, smallest first
      drain_shift = 1;
      for (int i = N - 1; i >= 0; i--) begin
        checks++;
        if (tail_key !== nth_largest(i)) begin
          failures++;
          $display("round %0d read-out %0d: key %0d expected %0d", round, i, tail_key,
                   nth_largest(i));
        end
        @(posedge clk); #1;
      end
      drain_shift = 0;
      // new query
      rst = 1; @(posedge clk); #1 rst = 0;
      all_key.delete(); all_tag.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
