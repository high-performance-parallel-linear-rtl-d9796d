// tb_p2s_g3: the parallel-to-serial converter with a lane count that does
// not divide the word: Q = 4 pairs per word, G = 3 lanes, so a full word goes
// out as a beat of three pairs and a beat of one pair.
// Random words with random pair masks are offered with random gaps while the
// receiver stalls at random. Every pair that comes out is compared, in order
// and with its lane-valid bit, with a queue of what went in; beats after the
// last present pair of a word must be skipped. With the receiver always
// ready the converter must take one word every ceil(Q/G) clocks, which is
// checked by counting clocks for a burst of words.
module tb_p2s_g3;
  localparam int unsigned Q  = 4;
  localparam int unsigned G  = 3;
  localparam int unsigned KW = 8;
  localparam int unsigned DW = 8;

  logic          clk = 1'b0;
  logic          rst;
  logic          in_valid, in_ready;
  logic          in_mask [Q];
  logic [KW-1:0] in_key  [Q];
  logic [DW-1:0] in_data [Q];
  logic          out_valid, out_ready;
  logic          out_lane_valid [G];
  logic [KW-1:0] out_key  [G];
  logic [DW-1:0] out_data [G];
  logic          busy;

  int checks = 0, failures = 0;
  int words_in = 0, stalls = 0;

  p2s #(.Q(Q), .G(G), .KEY_W(KW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected lane stream: {valid, key, data}
  logic [KW+DW:0] exp_q [$];
  bit random_ready = 1;

  // receiver / checker
  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      for (int g = 0; g < G; g++) begin
        logic [KW+DW:0] e;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected beat");
        end else begin
          e = exp_q.pop_front();
          if (e[KW+DW] != out_lane_valid[g] ||
              (e[KW+DW] && (e[KW+DW-1:0] != {out_key[g], out_data[g]}))) begin
            failures++;
            $display("lane %0d: got %b %0d/%0d expected %b %0d/%0d", g, out_lane_valid[g],
                     out_key[g], out_data[g], e[KW+DW], e[KW+DW-1:DW], e[DW-1:0]);
          end
        end
      end
    end
    if (!rst && out_valid && !out_ready) stalls++;
  end

  always @(negedge clk) out_ready <= random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic put_word();
    for (int i = 0; i < Q; i++) begin
      in_mask[i] = ($urandom_range(0, 3) != 0);
      in_key[i]  = KW'($urandom);
      in_data[i] = DW'($urandom);
    end
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    // beats up to the one holding the last present pair (at least one beat)
    begin
      int lastb = 0;
      for (int i = 0; i < Q; i++) if (in_mask[i]) lastb = i / G;
      for (int i = 0; i < (lastb + 1) * G; i++)
        if (i < Q) exp_q.push_back({in_mask[i], in_key[i], in_data[i]});
        else       exp_q.push_back('0);
    end
    words_in++;
    #1 in_valid = 0;
  endtask

  initial begin
    int t0, t1;
    rst = 1; in_valid = 0;
    for (int i = 0; i < Q; i++) begin in_mask[i] = 0; in_key[i] = 0; in_data[i] = 0; end
    out_ready = 0;
    @(posedge clk); #1 rst = 0;
    for (int w = 0; w < 300; w++) begin
      put_word();
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    wait (exp_q.size() == 0);
    @(posedge clk); #1;
    // rate: back-to-back words with an always-ready receiver
    random_ready = 0;
    @(posedge clk); #1;
    t0 = $time;
    for (int w = 0; w < 20; w++) begin
      for (int i = 0; i < Q; i++) begin in_mask[i] = 1; in_key[i] = KW'(w); in_data[i] = DW'(i); end
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      for (int i = 0; i < (Q + G - 1) / G * G; i++)
        if (i < Q) exp_q.push_back({1'b1, in_key[i], in_data[i]});
        else       exp_q.push_back('0);
      #1;
    end
    in_valid = 0;
    t1 = $time;
    checks++;
    // 20 words, the first accepted at once, each later one Q/G clocks after
    if ((t1 - t0) / 10 != 1 + 19 * ((Q + G - 1) / G)) begin
      failures++;
      $display("rate: 20 words took %0d clocks, expected %0d", (t1 - t0) / 10, 1 + 19 * ((Q + G - 1) / G));
    end
    wait (exp_q.size() == 0);
    repeat (2) @(posedge clk);
    checks++;
    if (stalls == 0 || busy) begin failures++; $display("no stall seen or still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
