// parallel_ss: b shifter sorters working side by side, with a final merge.
//
// The input set is split into b disjoint streams, one per sorting unit, so up
// to b pairs are inserted every clock. Each unit keeps the N largest pairs of
// its own stream; the N largest of the whole set can sit in any unit, so a
// merge gathers them into unit 0. The merge needs only a multiplexer in front
// of every unit and a counter:
//
//   * units 1..b-1 are flushed every clock, so together they act as one shift
//     register of (b-1)*N cells: unit k takes the pair leaving unit k-1;
//   * the pair leaving the last unit is fed back to unit 0 as an ordinary
//     insertion, so unit 0 keeps the N largest pairs it is offered;
//   * a pair evicted from unit 0 (Load of its last cell high) is passed into
//     unit 1 and goes round the ring again; it can never get back into unit 0
//     because unit 0's smallest key only grows. When unit 0 does not evict,
//     unit 1 takes an empty pair (key 0).
//
// After (b-1)*N clocks every pair that was in units 1..b-1 has been offered to
// unit 0, which then holds the N largest pairs of the whole input in
// descending order. The merge therefore costs (b-1)*N clocks, paid once per
// query. Units 1..b-1 afterwards hold only pairs smaller than all of unit 0,
// so inserting more pairs and merging again still gives the right result.
//
// Interface:
//  * in_valid[k]/in_key[k]/in_data[k]: pair for unit k; accepted when
//    in_ready is high (it is low during a merge).
//  * merge_start: pulse to start a merge; merge_busy is high for exactly
//    (b-1)*N clocks and merge_done pulses in the clock after the last one.
//    With b = 1 merge_done follows merge_start directly.
//  * drain_shift: flushes unit 0 by one cell (serial read-out); the pair that
//    leaves is on tail_key/tail_data. Ignored during a merge.
//  * result_key/result_data: the cells of unit 0, index 0 = largest.
//
// The replicated units, their input multiplexers, the domino shift and the
// feedback into the first unit follow the reference architecture; the ring
// path for evicted pairs, the empty-pair rule and the handshake are choices
// of this implementation.
module parallel_ss #(
  parameter int unsigned N      = ss_pkg::DEF_N,
  parameter int unsigned B      = ss_pkg::DEF_B,
  parameter int unsigned KEY_W  = ss_pkg::DEF_KEY_W,
  parameter int unsigned DATA_W = ss_pkg::DEF_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid  [B],
  input  logic [KEY_W-1:0]  in_key    [B],
  input  logic [DATA_W-1:0] in_data   [B],
  output logic              in_ready,
  input  logic              merge_start,
  output logic              merge_busy,
  output logic              merge_done,
  input  logic              drain_shift,
  output logic [KEY_W-1:0]  result_key  [N],
  output logic [DATA_W-1:0] result_data [N],
  output logic [KEY_W-1:0]  tail_key,
  output logic [DATA_W-1:0] tail_data
);

  localparam int unsigned MERGE_CYCLES = (B - 1) * N;
  localparam int unsigned CW = ss_pkg::cnt_w(MERGE_CYCLES);

  logic [KEY_W-1:0]  o_key   [B];   // pair in the last cell of each unit
  logic [DATA_W-1:0] o_data  [B];
  logic              load0;          // unit 0 evicts its last pair

  // ---------------------------------------------------------------- counter
  logic [CW-1:0] cnt;
  logic          busy_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q     <= 1'b0;
      cnt        <= '0;
      merge_done <= 1'b0;
    end else begin
      merge_done <= 1'b0;
      if (busy_q) begin
        if (cnt == CW'(MERGE_CYCLES - 1)) begin
          busy_q     <= 1'b0;
          merge_done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end else if (merge_start) begin
        cnt <= '0;
        if (MERGE_CYCLES == 0) merge_done <= 1'b1;
        else                   busy_q     <= 1'b1;
      end
    end
  end

  assign merge_busy = busy_q;
  assign in_ready   = !busy_q;

  // ------------------------------------ units with their input multiplexers
  for (genvar k = 0; k < B; k++) begin : g_unit
    logic              u_valid;
    logic [KEY_W-1:0]  u_key;
    logic [DATA_W-1:0] u_data;
    logic              u_flush;
    logic              u_load;

    if (k == 0) begin : g_mux
      // normal: own input; merge: pair leaving the last unit (feedback);
      // read-out: shift down and fill with empty pairs
      always_comb begin
        u_valid = busy_q ? 1'b1 : in_valid[0];
        u_flush = !busy_q && drain_shift;
        if (busy_q) begin
          u_key  = o_key[B-1];
          u_data = o_data[B-1];
        end else if (drain_shift) begin
          u_key  = '0;
          u_data = '0;
        end else begin
          u_key  = in_key[0];
          u_data = in_data[0];
        end
      end
    end else if (k == 1) begin : g_mux
      // merge: the pair evicted from unit 0, or an empty pair
      always_comb begin
        u_valid = in_valid[1] && !busy_q;
        u_flush = busy_q;
        if (busy_q) begin
          u_key  = load0 ? o_key[0]  : '0;
          u_data = load0 ? o_data[0] : '0;
        end else begin
          u_key  = in_key[1];
          u_data = in_data[1];
        end
      end
    end else begin : g_mux
      // merge: the pair leaving the unit above (domino shift)
      always_comb begin
        u_valid = in_valid[k] && !busy_q;
        u_flush = busy_q;
        u_key   = busy_q ? o_key[k-1]  : in_key[k];
        u_data  = busy_q ? o_data[k-1] : in_data[k];
      end
    end

    if (k == 0) begin : g_ss
      shifter_sorter #(.N(N), .KEY_W(KEY_W), .DATA_W(DATA_W)) u_ss (
        .clk       (clk),
        .rst       (rst),
        .in_valid  (u_valid),
        .in_key    (u_key),
        .in_data   (u_data),
        .flush     (u_flush),
        .load_in   (1'b0),
        .key_in    ('0),
        .data_in   ('0),
        .node_key  (result_key),
        .node_data (result_data),
        .out_key   (o_key[k]),
        .out_data  (o_data[k]),
        .out_load  (u_load)
      );
      assign load0 = u_load;
    end else begin : g_ss
      shifter_sorter #(.N(N), .KEY_W(KEY_W), .DATA_W(DATA_W)) u_ss (
        .clk       (clk),
        .rst       (rst),
        .in_valid  (u_valid),
        .in_key    (u_key),
        .in_data   (u_data),
        .flush     (u_flush),
        .load_in   (1'b0),
        .key_in    ('0),
        .data_in   ('0),
        .node_key  (),
        .node_data (),
        .out_key   (o_key[k]),
        .out_data  (o_data[k]),
        .out_load  (u_load)
      );
    end
  end

  assign tail_key  = o_key[0];
  assign tail_data = o_data[0];

endmodule
