// tb_ss_soc_sorter_full: the selector core at its default size, end to end.
//
// Default configuration: 64-bit bus, 8-bit keys and data (q = 4 pairs per
// word), N = 64 cells per sorter, b = 4 units, so a bus word goes into the
// sorters in one clock and no serialization is needed. One complete query:
// clear, stream 2048 bus words (8192 pairs, with some partly filled words
// and key-0 pairs), merge, check the 64 largest pairs in parallel, stream
// 256 more words, merge again, check, and read the set out serially with a
// stalling receiver. Timing checks: a gap-free burst takes one word per
// clock, each merge takes (b-1)*N = 192 clocks, the read-out gives N pairs.
// Counted mechanisms (each must occur): partly filled words, key-0 pairs,
// evictions, a merge waiting for the serializer, merges, a repeated merge
// without clear, the serial read-out and its stalls.
module tb_ss_soc_sorter_full;
  localparam int unsigned BUS_W = ss_pkg::DEF_BUS_W;
  localparam int unsigned KW    = ss_pkg::DEF_KEY_W;
  localparam int unsigned DW    = ss_pkg::DEF_DATA_W;
  localparam int unsigned N     = ss_pkg::DEF_N;
  localparam int unsigned B     = ss_pkg::DEF_B;
  localparam int unsigned Q     = BUS_W / (KW + DW);
  localparam int unsigned G     = (Q < B) ? Q : B;

  logic             clk = 1'b0;
  logic             rst, clear;
  logic             bus_valid, bus_ready;
  logic [BUS_W-1:0] bus_word;
  logic [Q-1:0]     bus_mask;
  logic             cmd_merge, merge_busy, merge_done, cmd_drain, idle;
  logic [KW-1:0]    result_key  [N];
  logic [DW-1:0]    result_data [N];
  logic             out_valid, out_ready, out_last;
  logic [KW-1:0]    out_key;
  logic [DW-1:0]    out_data;

  int checks = 0, failures = 0;

  ss_soc_sorter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  logic [KW-1:0] ref_key [$];
  int            ref_cnt [logic [KW+DW-1:0]];

  function automatic logic [KW-1:0] nth_largest(int n);
    logic [KW-1:0] s [$];
    s = ref_key;
    s.rsort();
    return (n < s.size()) ? s[n] : '0;
  endfunction

  // ------------------------------------------------------ mechanism counts
  int m_ser_stall = 0, m_partial = 0, m_key0 = 0, m_evict = 0, m_merge_wait = 0;
  int m_merge = 0, m_remerge = 0, m_drain = 0, m_drain_stall = 0, m_clear = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (bus_valid && !bus_ready && dut.p2s_busy && !merge_busy) m_ser_stall++;
      if (dut.u_pss.load0 && !merge_busy) m_evict++;
      if (out_valid && !out_ready) m_drain_stall++;
    end
  end

  task automatic check_result(string what);
    int cnt [logic [KW+DW-1:0]];
    checks++;
    cnt = ref_cnt;
    for (int i = 0; i < N; i++) begin
      logic [KW-1:0] want = nth_largest(i);
      if (result_key[i] !== want) begin
        failures++;
        $display("%s: cell %0d key %0d expected %0d", what, i, result_key[i], want);
        return;
      end
      if (want != 0) begin
        if (!cnt.exists({result_key[i], result_data[i]}) || cnt[{result_key[i], result_data[i]}] == 0) begin
          failures++;
          $display("%s: cell %0d pair %0d/%0d was not sent", what, i, result_key[i],
                   result_data[i]);
          return;
        end
        cnt[{result_key[i], result_data[i]}]--;
      end
    end
  endtask

  // one bus word; returns the clock count at acceptance
  task automatic send_word(input int kmax, input bit gaps, input bit full);
    for (int i = 0; i < Q; i++) begin
      logic [KW-1:0] k;
      logic [DW-1:0] d;
      k = ($urandom_range(0, 30) == 0) ? KW'(0) : KW'($urandom_range(1, kmax));
      d = DW'($urandom);
      bus_mask[i] = full ? 1'b1 : ($urandom_range(0, 3) != 0);
      bus_word[i*(KW+DW) +: KW+DW] = {k, d};
    end
    if (gaps) repeat ($urandom_range(0, 2)) @(posedge clk);
    #1 bus_valid = 1;
    @(posedge clk);
    while (!bus_ready) @(posedge clk);
    #1 bus_valid = 0;
    if (bus_mask != '1) m_partial++;
    for (int i = 0; i < Q; i++)
      if (bus_mask[i]) begin
        logic [KW+DW-1:0] p = bus_word[i*(KW+DW) +: KW+DW];
        if (p[KW+DW-1:DW] == 0) m_key0++;
        else begin
          ref_key.push_back(p[KW+DW-1:DW]);
          if (ref_cnt.exists(p)) ref_cnt[p]++; else ref_cnt[p] = 1;
        end
      end
  endtask

  task automatic merge(string what);
    int clocks = 0;
    if (dut.p2s_busy) m_merge_wait++;
    cmd_merge = 1;
    @(posedge clk); #1 cmd_merge = 0;
    while (!dut.ps_busy) begin @(posedge clk); #1; end
    while (dut.ps_busy) begin clocks++; @(posedge clk); #1; end
    checks++;
    if (clocks != (B - 1) * N || !merge_done) begin
      failures++;
      $display("%s: merge took %0d clocks, expected %0d; done %b", what, clocks, (B - 1) * N,
               merge_done);
    end
    m_merge++;
    @(posedge clk); #1;
    check_result(what);
  endtask

  task automatic drain(string what);
    int got = 0, clocks = 0;
    cmd_drain = 1;
    @(posedge clk); #1 cmd_drain = 0;
    while (got < N && clocks < 20 * N) begin
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_key !== nth_largest(N - 1 - got) || out_last !== (got == N - 1)) begin
          failures++;
          $display("%s: pair %0d key %0d last %b, expected %0d", what, got, out_key, out_last,
                   nth_largest(N - 1 - got));
        end
        got++;
      end
      @(posedge clk); #1;
      clocks++;
    end
    out_ready = 0;
    checks++;
    if (got != N || out_valid) begin failures++; $display("%s: read-out incomplete", what); end
    m_drain++;
  endtask

  initial begin
    rst = 1; clear = 0; bus_valid = 0; bus_word = '0; bus_mask = '0;
    cmd_merge = 0; cmd_drain = 0; out_ready = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    clear = 1; @(posedge clk); #1 clear = 0;
    m_clear++;
    ref_key.delete(); ref_cnt.delete();
    // gap-free burst of full words: one word per clock (q <= b)
    begin
      int t0, t1;
      send_word(255, 1'b0, 1'b1);
      t0 = $time;
      for (int w = 0; w < 256; w++) send_word(255, 1'b0, 1'b1);
      t1 = $time;
      checks++;
      if ((t1 - t0) / 10 != 256 * (Q / G)) begin
        failures++;
        $display("burst of 256 words took %0d clocks, expected %0d", (t1 - t0) / 10,
                 256 * (Q / G));
      end
    end
    for (int w = 0; w < 2048 - 257; w++) send_word(255, 1'b1, 1'b0);
    merge("first merge");
    for (int w = 0; w < 256; w++) send_word(255, 1'b1, 1'b0);
    merge("second merge");
    m_remerge++;
    drain("read-out");

    $display("mechanisms: serializer stall %0d, partial word %0d, key 0 %0d, eviction %0d, merge waits for serializer %0d, merge %0d, merge again %0d, read-out %0d, read-out stall %0d, clear %0d",
             m_ser_stall, m_partial, m_key0, m_evict, m_merge_wait, m_merge, m_remerge, m_drain,
             m_drain_stall, m_clear);
    if (m_partial == 0 || m_key0 == 0 || m_evict == 0 || m_merge_wait == 0 ||
        m_merge == 0 || m_remerge == 0 || m_drain == 0 || m_drain_stall == 0 || m_clear == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
