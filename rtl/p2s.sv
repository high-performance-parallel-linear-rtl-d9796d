// p2s: parallel-to-serial converter in front of the sorter.
//
// A shifter sorter takes one pair per unit per clock, while a bus word or an
// input chunk carries Q pairs at once. p2s takes a word of Q pairs and hands
// it on G pairs per clock (G = 1 for a single sorter, G = b for b parallel
// units), Q/G beats per word. Each pair has its own valid bit, so partly
// filled words (the end of an input set) need no padding.
//
// Interface (valid/ready handshakes on both sides):
//  * in_valid/in_ready/in_mask/in_key/in_data: one word; in_mask[i] marks
//    pair i as present. Pair i goes out in beat i/G on lane i%G.
//  * out_valid/out_ready/out_lane_valid/out_key/out_data: one beat of G
//    lanes; out_lane_valid[g] tells the sorter whether lane g carries a pair.
//  * busy: a word is held (not all of its beats have been taken).
//
// Timing: a word accepted at one clock edge is offered from the next clock;
// the last beat and the next word are exchanged in the same clock, so with
// Q = G one word passes every clock. Trailing beats that carry no pair are
// skipped, so a word takes as many clocks as its last present pair needs. The converter's function is the
// reference design's; its register structure and handshake are this
// implementation's choices. Q must be a multiple of G.
module p2s #(
  parameter int unsigned Q      = ss_pkg::pairs_per_word(ss_pkg::DEF_BUS_W, ss_pkg::DEF_KEY_W,
                                                         ss_pkg::DEF_DATA_W),
  parameter int unsigned G      = 1,
  parameter int unsigned KEY_W  = ss_pkg::DEF_KEY_W,
  parameter int unsigned DATA_W = ss_pkg::DEF_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_mask [Q],
  input  logic [KEY_W-1:0]  in_key  [Q],
  input  logic [DATA_W-1:0] in_data [Q],
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_lane_valid [G],
  output logic [KEY_W-1:0]  out_key  [G],
  output logic [DATA_W-1:0] out_data [G],
  output logic              busy
);

  localparam int unsigned BEATS = (Q + G - 1) / G;
  localparam int unsigned QP    = BEATS * G;   // word padded to whole beats
  localparam int unsigned BW    = (BEATS < 2) ? 1 : $clog2(BEATS);

  logic              full;
  logic [BW-1:0]     beat;
  logic              mask_q [QP];
  logic [KEY_W-1:0]  key_q  [QP];
  logic [DATA_W-1:0] data_q [QP];

  logic last_beat, rest_empty, out_fire, in_fire;

  // The word is finished after the current beat if no later beat carries a
  // pair, so a word that holds only G pairs (a producer that packs b pairs
  // per bus word) passes in a single clock.
  always_comb begin
    rest_empty = 1'b1;
    for (int i = 0; i < QP; i++)
      if (i >= (int'(beat) + 1) * G && mask_q[i]) rest_empty = 1'b0;
  end

  assign last_beat = (beat == BW'(BEATS - 1)) || rest_empty;
  assign out_fire  = full && out_ready;
  assign in_ready  = !full || (out_ready && last_beat);
  assign in_fire   = in_valid && in_ready;
  assign out_valid = full;
  assign busy      = full;

  always_ff @(posedge clk) begin
    if (rst) begin
      full <= 1'b0;
      beat <= '0;
      for (int i = 0; i < QP; i++) begin
        mask_q[i] <= 1'b0;
        key_q[i]  <= '0;
        data_q[i] <= '0;
      end
    end else begin
      if (out_fire) beat <= last_beat ? '0 : beat + 1'b1;
      if (in_fire) begin
        full <= 1'b1;
        beat <= '0;
        for (int i = 0; i < QP; i++) begin
          mask_q[i] <= (i < Q) ? in_mask[i % Q] : 1'b0;
          key_q[i]  <= in_key[i % Q];
          data_q[i] <= in_data[i % Q];
        end
      end else if (out_fire && last_beat) begin
        full <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int g = 0; g < G; g++) begin
      out_lane_valid[g] = full && mask_q[int'(beat) * G + g];
      out_key[g]        = key_q [int'(beat) * G + g];
      out_data[g]       = data_q[int'(beat) * G + g];
    end
  end

  // A held beat stays put until it is taken.
  property p_hold;
    @(posedge clk) disable iff (rst) (out_valid && !out_ready) |=> (out_valid && $stable(beat));
  endproperty
  assert property (p_hold);

endmodule
