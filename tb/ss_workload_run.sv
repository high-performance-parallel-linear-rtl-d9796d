// ss_workload_run: runs one selector-core configuration for tb_ss_workloads.
//
// Instantiates ss_soc_sorter with N cells per sorter and B units on a 64-bit
// bus with 8-bit keys and data (q = 4), streams WORDS gap-free bus words of
// random pairs and measures the clocks the core needs to take them. A
// producer packs min(q, B) pairs per word when B does not divide q (so the
// bus is not wasted on a beat that carries one pair), q pairs otherwise. The
// rate must be exactly B pairs per clock for B <= q (plus one clock for the
// serializer register). Then the core merges
// ((B-1)*N clocks) and the N largest keys are checked against a reference,
// and the set is read out serially, smallest first. Reports its counts on
// checks/failures and raises done.
module ss_workload_run #(
  parameter int unsigned N     = 64,
  parameter int unsigned B     = 1,
  parameter int unsigned WORDS = 256
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned BUS_W = 64;
  localparam int unsigned KW    = 8;
  localparam int unsigned DW    = 8;
  localparam int unsigned Q     = BUS_W / (KW + DW);
  localparam int unsigned P     = (B >= Q || Q % B == 0) ? Q : B;   // pairs per word

  logic             clear, bus_valid, bus_ready, cmd_merge, merge_busy, merge_done;
  logic             cmd_drain, idle, out_valid, out_ready, out_last;
  logic [BUS_W-1:0] bus_word;
  logic [Q-1:0]     bus_mask;
  logic [KW-1:0]    result_key  [N];
  logic [DW-1:0]    result_data [N];
  logic [KW-1:0]    out_key;
  logic [DW-1:0]    out_data;

  ss_soc_sorter #(.BUS_W(BUS_W), .KEY_W(KW), .DATA_W(DW), .N(N), .B(B)) dut (.*);

  logic [KW-1:0] ref_key [$];

  function automatic logic [KW-1:0] nth_largest(int n);
    logic [KW-1:0] s [$];
    s = ref_key;
    s.rsort();
    return (n < s.size()) ? s[n] : '0;
  endfunction

  initial begin
    int t0, t1, clocks, got;
    done = 0; checks = 0; failures = 0;
    clear = 0; bus_valid = 0; bus_word = '0; bus_mask = '0;
    cmd_merge = 0; cmd_drain = 0; out_ready = 0;
    @(negedge rst);
    @(posedge clk); #1;
    // gap-free stream
    t0 = $time;
    for (int w = 0; w < WORDS; w++) begin
      for (int i = 0; i < Q; i++) begin
        logic [KW-1:0] k = KW'($urandom_range(1, 255));
        bus_mask[i] = (i < P);
        bus_word[i*(KW+DW) +: KW+DW] = {k, DW'($urandom)};
        if (i < P) ref_key.push_back(k);
      end
      bus_valid = 1;
      @(posedge clk);
      while (!bus_ready) @(posedge clk);
      #1;
    end
    bus_valid = 0;
    // the last word leaves the serializer
    while (dut.p2s_busy) begin @(posedge clk); #1; end
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != WORDS * P / B + 1) begin
      failures++;
      $display("N=%0d B=%0d: %0d pairs took %0d clocks, expected %0d pairs per clock", N, B,
               WORDS * P, (t1 - t0) / 10, B);
    end else
      $display("N=%0d B=%0d: %0d pairs in %0d clocks (%0d pairs per clock)", N, B, WORDS * P,
               (t1 - t0) / 10, B);
    // merge
    cmd_merge = 1; @(posedge clk); #1 cmd_merge = 0;
    clocks = 0;
    while (merge_busy) begin clocks++; @(posedge clk); #1; end
    checks++;
    // one clock of request, then (B-1)*N clocks of merge
    if (clocks != 1 + (B - 1) * N) begin
      failures++;
      $display("N=%0d B=%0d: merge took %0d clocks, expected %0d", N, B, clocks - 1, (B - 1) * N);
    end
    checks++;
    for (int i = 0; i < N; i++)
      if (result_key[i] !== nth_largest(i)) begin
        failures++;
        $display("N=%0d B=%0d: cell %0d key %0d expected %0d", N, B, i, result_key[i],
                 nth_largest(i));
        break;
      end
    // serial read-out
    cmd_drain = 1; @(posedge clk); #1 cmd_drain = 0;
    out_ready = 1;
    got = 0;
    while (out_valid) begin
      checks++;
      if (out_key !== nth_largest(N - 1 - got)) begin
        failures++;
        $display("N=%0d B=%0d: read-out %0d key %0d", N, B, got, out_key);
      end
      got++;
      @(posedge clk); #1;
    end
    checks++;
    if (got != N) begin failures++; $display("N=%0d B=%0d: read %0d pairs", N, B, got); end
    done = 1;
  end
endmodule
