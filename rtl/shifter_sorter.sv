// shifter_sorter: an N-cell insertion sorter built as a shift register.
//
// N ss_node cells are chained: the broadcast pair (in_key, in_data) reaches
// every cell, and each cell passes its stored pair and its Load signal to the
// cell below. One pair can be inserted every clock, so N pairs are sorted in
// N clocks, and because the chain never holds more than N pairs it keeps the
// N largest keys of everything it was given, largest at cell 0. Resources are
// one register, one comparator and one multiplexer per cell for the key and
// one register and one multiplexer per cell for the data.
//
// Interface:
//  * in_valid/in_key/in_data: pair to insert this clock (no back-pressure;
//    the sorter accepts one pair every clock).
//  * flush: every cell loads; the chain moves down by one, cell 0 takes the
//    broadcast pair and the pair of the last cell leaves on out_key/out_data.
//  * load_in: Load input of cell 0 (Load_0 of the chain). With load_in high
//    cell 0 takes key_in/data_in instead of the broadcast pair; tied low this
//    is a plain sorter.
//  * node_key/node_data: parallel view of all cells, index 0 = largest.
//  * out_key/out_data/out_load: stored pair and Load of the last cell; when
//    out_load is high that pair leaves the sorter at the next clock edge.
//
// Timing: the parallel outputs show an insertion one clock after in_valid.
// The chain structure and port set follow the reference design; the strict
// comparison, the flush input and the synchronous clear are the choices
// described in ss_node.
module shifter_sorter #(
  parameter int unsigned N      = ss_pkg::DEF_N,
  parameter int unsigned KEY_W  = ss_pkg::DEF_KEY_W,
  parameter int unsigned DATA_W = ss_pkg::DEF_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [KEY_W-1:0]  in_key,
  input  logic [DATA_W-1:0] in_data,
  input  logic              flush,
  input  logic              load_in,
  input  logic [KEY_W-1:0]  key_in,
  input  logic [DATA_W-1:0] data_in,
  output logic [KEY_W-1:0]  node_key  [N],
  output logic [DATA_W-1:0] node_data [N],
  output logic [KEY_W-1:0]  out_key,
  output logic [DATA_W-1:0] out_data,
  output logic              out_load
);

  logic [KEY_W-1:0]  key_chain  [N+1];
  logic [DATA_W-1:0] data_chain [N+1];
  logic              load_chain [N+1];

  assign key_chain[0]  = key_in;
  assign data_chain[0] = data_in;
  assign load_chain[0] = load_in;

  for (genvar i = 0; i < N; i++) begin : g_node
    ss_node #(.KEY_W(KEY_W), .DATA_W(DATA_W)) u_node (
      .clk        (clk),
      .rst        (rst),
      .in_valid   (in_valid),
      .in_key     (in_key),
      .in_data    (in_data),
      .flush      (flush),
      .key_above  (key_chain[i]),
      .data_above (data_chain[i]),
      .load_above (load_chain[i]),
      .key_q      (key_chain[i+1]),
      .data_q     (data_chain[i+1]),
      .load       (load_chain[i+1])
    );
    assign node_key[i]  = key_chain[i+1];
    assign node_data[i] = data_chain[i+1];
  end

  assign out_key  = key_chain[N];
  assign out_data = data_chain[N];
  assign out_load = load_chain[N];

endmodule
