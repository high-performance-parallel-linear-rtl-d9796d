// ss_soc_sorter: MAX_N selector core for a system bus, built from shifter
// sorters.
//
// The core selects the N pairs with the largest keys out of an arbitrarily
// long stream of (key, data) pairs arriving over a W-bit bus. Each bus word
// carries q = W / (KEY_W + DATA_W) pairs. A parallel-to-serial converter
// (p2s) turns a word into beats of min(q, b) pairs, which are inserted into b
// parallel shifter sorters, one pair per unit per clock. Because every sorter
// only ever keeps its N largest pairs, no input FIFO and no feedback of the
// partial result are needed: the sorters are the running top-N. When the
// stream ends, a merge gathers the N largest pairs of all units into unit 0
// in (b-1)*N clocks. The result is then available in parallel (result_key,
// result_data, largest first) and, optionally, as a serial stream of N pairs
// in ascending key order.
//
// Bus side (the bus protocol itself is not part of this core):
//  * bus_valid/bus_ready/bus_word/bus_mask: one bus word per handshake. Pair i
//    sits in bus_word[i*(KEY_W+DATA_W) +: KEY_W+DATA_W] with its key in the
//    upper KEY_W bits; bus_mask[i] marks it as present. An offered word must
//    stay unchanged until it is taken (checked by an assertion).
//  * clear: synchronous clear of the selected set, starts a new query.
//  * cmd_merge: request the merge. Bus words are refused from then on; the
//    merge starts once the word held in p2s is used up. merge_busy covers
//    the request and the merge, merge_done pulses when the result is final.
//  * cmd_drain: start the serial read-out (taken only while idle is high).
//    out_valid/out_ready/out_key/out_data/out_last carry the N pairs; reading
//    them out empties the selected set.
//
// Timing: with q <= b one bus word is taken every clock; with q > b one word
// every q/b clocks. Keys of value 0 mark empty cells and are never selected.
// The datapath (serializer, parallel shifter sorters, merge) follows the
// reference architecture; the bus-side handshake, the command inputs and the
// pair packing are choices of this implementation.
module ss_soc_sorter #(
  parameter int unsigned BUS_W  = ss_pkg::DEF_BUS_W,
  parameter int unsigned KEY_W  = ss_pkg::DEF_KEY_W,
  parameter int unsigned DATA_W = ss_pkg::DEF_DATA_W,
  parameter int unsigned N      = ss_pkg::DEF_N,
  parameter int unsigned B      = ss_pkg::DEF_B,
  localparam int unsigned Q     = ss_pkg::pairs_per_word(BUS_W, KEY_W, DATA_W),
  localparam int unsigned G     = ss_pkg::lanes(Q, B)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  // bus side
  input  logic              bus_valid,
  output logic              bus_ready,
  input  logic [BUS_W-1:0]  bus_word,
  input  logic [Q-1:0]      bus_mask,
  // commands and status
  input  logic              cmd_merge,
  output logic              merge_busy,
  output logic              merge_done,
  input  logic              cmd_drain,
  output logic              idle,
  // result O_N, parallel
  output logic [KEY_W-1:0]  result_key  [N],
  output logic [DATA_W-1:0] result_data [N],
  // result O_N, serial
  output logic              out_valid,
  input  logic              out_ready,
  output logic [KEY_W-1:0]  out_key,
  output logic [DATA_W-1:0] out_data,
  output logic              out_last
);

  localparam int unsigned PW = KEY_W + DATA_W;

  logic core_rst;
  assign core_rst = rst || clear;

  // -------------------------------------------------------- word unpacking
  logic              w_mask [Q];
  logic [KEY_W-1:0]  w_key  [Q];
  logic [DATA_W-1:0] w_data [Q];

  always_comb begin
    for (int i = 0; i < Q; i++) begin
      w_mask[i] = bus_mask[i];
      w_key[i]  = bus_word[i*PW + DATA_W +: KEY_W];
      w_data[i] = bus_word[i*PW +: DATA_W];
    end
  end

  // ------------------------------------------------------------- control
  logic merge_pend, ps_busy, ps_ready, ps_done, p2s_busy, ex_busy, ex_shift;
  logic p2s_in_ready, p2s_out_valid;

  assign idle = !merge_pend && !ps_busy && !p2s_busy && !ex_busy;

  always_ff @(posedge clk) begin
    if (core_rst)                        merge_pend <= 1'b0;
    else if (merge_pend && !p2s_busy)    merge_pend <= 1'b0;
    else if (cmd_merge && !ps_busy && !ex_busy) merge_pend <= 1'b1;
  end

  assign bus_ready  = p2s_in_ready && !merge_pend && !ps_busy && !ex_busy && !cmd_merge;
  assign merge_busy = merge_pend || ps_busy;
  assign merge_done = ps_done;

  // ---------------------------------------------------------- serializer
  logic              l_valid [G];
  logic [KEY_W-1:0]  l_key   [G];
  logic [DATA_W-1:0] l_data  [G];

  p2s #(.Q(Q), .G(G), .KEY_W(KEY_W), .DATA_W(DATA_W)) u_p2s (
    .clk            (clk),
    .rst            (core_rst),
    .in_valid       (bus_valid && bus_ready),
    .in_ready       (p2s_in_ready),
    .in_mask        (w_mask),
    .in_key         (w_key),
    .in_data        (w_data),
    .out_valid      (p2s_out_valid),
    .out_ready      (ps_ready && !ex_busy),
    .out_lane_valid (l_valid),
    .out_key        (l_key),
    .out_data       (l_data),
    .busy           (p2s_busy)
  );

  // ------------------------------------------------------ parallel sorter
  logic              s_valid [B];
  logic [KEY_W-1:0]  s_key   [B];
  logic [DATA_W-1:0] s_data  [B];
  logic [KEY_W-1:0]  tail_key;
  logic [DATA_W-1:0] tail_data;

  always_comb begin
    for (int k = 0; k < B; k++) begin
      s_valid[k] = 1'b0;
      s_key[k]   = '0;
      s_data[k]  = '0;
    end
    for (int g = 0; g < G; g++) begin
      s_valid[g] = p2s_out_valid && l_valid[g] && !ex_busy;
      s_key[g]   = l_key[g];
      s_data[g]  = l_data[g];
    end
  end

  parallel_ss #(.N(N), .B(B), .KEY_W(KEY_W), .DATA_W(DATA_W)) u_pss (
    .clk         (clk),
    .rst         (core_rst),
    .in_valid    (s_valid),
    .in_key      (s_key),
    .in_data     (s_data),
    .in_ready    (ps_ready),
    .merge_start (merge_pend && !p2s_busy),
    .merge_busy  (ps_busy),
    .merge_done  (ps_done),
    .drain_shift (ex_shift),
    .result_key  (result_key),
    .result_data (result_data),
    .tail_key    (tail_key),
    .tail_data   (tail_data)
  );

  // ------------------------------------------------------ serial read-out
  ss_extract #(.N(N), .KEY_W(KEY_W), .DATA_W(DATA_W)) u_ex (
    .clk       (clk),
    .rst       (core_rst),
    .start     (cmd_drain && idle),
    .busy      (ex_busy),
    .tail_key  (tail_key),
    .tail_data (tail_data),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .out_key   (out_key),
    .out_data  (out_data),
    .out_last  (out_last),
    .shift     (ex_shift)
  );

  // Bus-side rule: an offered word is held until it is taken.
  property p_bus_hold;
    @(posedge clk) disable iff (core_rst)
      (bus_valid && !bus_ready) |=> (bus_valid && $stable(bus_word) && $stable(bus_mask));
  endproperty
  assert property (p_bus_hold);

  // The merge never starts while the serializer still holds pairs.
  assert property (@(posedge clk) disable iff (core_rst) ps_busy |-> !p2s_busy);

endmodule
