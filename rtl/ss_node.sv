// ss_node: one cell of the shifter sorter.
//
// The cell holds one (key, data) pair. Each clock the key broadcast to all
// cells is compared with the stored key; when the stored key is the smaller
// one the cell loads (its Load output goes high). What it loads depends on the
// cell above: if that cell loads as well, the pair stored above is shifted
// down into this cell, otherwise the broadcast pair is written here. In a
// chain this inserts the new pair at its sorted place and pushes every
// smaller pair one cell down, so the chain keeps its contents in descending
// key order. This structure (comparator, two 2:1 multiplexers selected by the
// Load of the cell above, key and data registers enabled by this cell's Load,
// a common reset) follows the reference cell design.
//
// Choices of this implementation:
//  * The comparison is strict (stored < broadcast): a key equal to a stored
//    key is placed below it, so pairs with equal keys keep arrival order.
//  * Reset is synchronous and clears key and data to zero. A cleared cell
//    holds key 0, which no new key can be smaller than, so key 0 doubles as
//    "empty": a pair with key 0 is never stored by insertion.
//  * in_valid qualifies the broadcast pair; without it no cell loads.
//  * flush forces Load high. It behaves as if a key larger than any storable
//    key were broadcast and is used to shift the whole chain down by one
//    (serial read-out and the merge of parallel units).
//
// Timing: the Load output is combinational from the stored key and the
// broadcast key; the stored pair changes at the next rising clock edge.
module ss_node #(
  parameter int unsigned KEY_W  = ss_pkg::DEF_KEY_W,
  parameter int unsigned DATA_W = ss_pkg::DEF_DATA_W
) (
  input  logic              clk,
  input  logic              rst,         // synchronous clear
  // broadcast pair
  input  logic              in_valid,
  input  logic [KEY_W-1:0]  in_key,
  input  logic [DATA_W-1:0] in_data,
  input  logic              flush,       // force a shift-down
  // from the cell above (Key_{i-1}, Data_{i-1}, Load_{i-1})
  input  logic [KEY_W-1:0]  key_above,
  input  logic [DATA_W-1:0] data_above,
  input  logic              load_above,
  // to the cell below (Key_i, Data_i, Load_i)
  output logic [KEY_W-1:0]  key_q,
  output logic [DATA_W-1:0] data_q,
  output logic              load
);

  always_comb load = flush || (in_valid && (key_q < in_key));

  always_ff @(posedge clk) begin
    if (rst) begin
      key_q  <= '0;
      data_q <= '0;
    end else if (load) begin
      key_q  <= load_above ? key_above  : in_key;
      data_q <= load_above ? data_above : in_data;
    end
  end

endmodule
