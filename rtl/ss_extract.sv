// ss_extract: serial read-out controller of the shifter sorter.
//
// The sorted set can be read in parallel from the cells, or serially from the
// last cell by shifting the whole chain down one cell at a time. This
// controller does the latter: after start it offers the pair in the last cell
// of the sorter as a stream and, for every pair taken, asks the sorter to
// shift down by one (shift). After N pairs the sorter is empty and the
// controller is idle again. Pairs leave in ascending key order (the last cell
// holds the smallest of the N kept pairs); cells that were never filled come
// out as key 0.
//
// Interface:
//  * start: begins a read-out of N pairs (ignored while busy).
//  * tail_key/tail_data: the sorter's last cell.
//  * out_valid/out_ready/out_key/out_data/out_last: the stream; out_last marks
//    the N-th pair.
//  * shift: to the sorter, high in every clock where a pair is taken.
// out_key and out_data are the tail inputs passed straight through: the
// sorter's last cell is already the output register of the stream.
//
// Timing: out_valid rises the clock after start; with out_ready held high one
// pair leaves per clock, N clocks in all. Reading from the last cell while the
// chain is shifted down follows the reference design, which does it by
// feeding the largest key value; the forced shift used here has the same
// effect without excluding that key value from the data.
module ss_extract #(
  parameter int unsigned N      = ss_pkg::DEF_N,
  parameter int unsigned KEY_W  = ss_pkg::DEF_KEY_W,
  parameter int unsigned DATA_W = ss_pkg::DEF_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  input  logic [KEY_W-1:0]  tail_key,
  input  logic [DATA_W-1:0] tail_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [KEY_W-1:0]  out_key,
  output logic [DATA_W-1:0] out_data,
  output logic              out_last,
  output logic              shift
);

  localparam int unsigned CW = ss_pkg::cnt_w(N);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (busy) begin
      if (out_ready) begin
        cnt <= cnt + 1'b1;
        if (out_last) busy <= 1'b0;
      end
    end else if (start) begin
      busy <= 1'b1;
      cnt  <= '0;
    end
  end

  assign out_valid = busy;
  assign out_key   = tail_key;
  assign out_data  = tail_data;
  assign out_last  = busy && (cnt == CW'(N - 1));
  assign shift     = busy && out_ready;

  // An offered pair stays on the stream until it is taken: no shift and no
  // count while the receiver stalls.
  property p_hold;
    @(posedge clk) disable iff (rst) (out_valid && !out_ready) |=> (out_valid && $stable(cnt));
  endproperty
  assert property (p_hold);

endmodule
