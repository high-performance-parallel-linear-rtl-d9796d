// tb_ss_node: self-checking test of one shifter-sorter cell.
//
// Drives random broadcast pairs, random pairs from the cell above, random
// in_valid, load_above and flush, and a clear now and then. A model of the
// cell written from its specification (load when the stored key is smaller
// than a valid broadcast key or when flushed; take the pair from above when
// the cell above loads) predicts the Load output in the same clock and the
// stored pair after every clock edge.
module tb_ss_node;
  localparam int unsigned KW = 8;
  localparam int unsigned DW = 8;

  logic          clk = 1'b0;
  logic          rst;
  logic          in_valid, flush, load_above;
  logic [KW-1:0] in_key, key_above, key_q;
  logic [DW-1:0] in_data, data_above, data_q;
  logic          load;

  int checks = 0, failures = 0;
  int n_load_new = 0, n_load_above = 0, n_hold = 0;

  ss_node #(.KEY_W(KW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [KW-1:0] m_key;
  logic [DW-1:0] m_data;
  logic          m_load;

  initial begin
    rst = 1'b1; in_valid = 0; flush = 0; load_above = 0;
    in_key = '0; in_data = '0; key_above = '0; data_above = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    m_key = '0; m_data = '0;
    if (key_q !== 0 || data_q !== 0) begin failures++; $display("reset value wrong"); end
    checks++;
    for (int t = 0; t < 4000; t++) begin
      in_valid   = ($urandom_range(0, 3) != 0);
      flush      = ($urandom_range(0, 15) == 0);
      load_above = ($urandom_range(0, 1) == 1);
      in_key     = KW'($urandom);
      in_data    = DW'($urandom);
      key_above  = KW'($urandom);
      data_above = DW'($urandom);
      rst        = ($urandom_range(0, 199) == 0);
      #1;
      m_load = flush || (in_valid && (m_key < in_key));
      checks++;
      if (load !== m_load) begin
        failures++;
        $display("t=%0d load=%b expected %b (stored %0d, key %0d)", t, load, m_load, m_key, in_key);
      end
      if (rst) begin
        m_key = '0; m_data = '0;
      end else if (m_load) begin
        if (load_above) begin m_key = key_above; m_data = data_above; n_load_above++; end
        else            begin m_key = in_key;    m_data = in_data;    n_load_new++;   end
      end else n_hold++;
      @(posedge clk); #1;
      checks++;
      if (key_q !== m_key || data_q !== m_data) begin
        failures++;
        $display("t=%0d stored %0d/%0d expected %0d/%0d", t, key_q, data_q, m_key, m_data);
      end
    end
    if (n_load_new == 0 || n_load_above == 0 || n_hold == 0) begin
      failures++;
      $display("coverage: new=%0d above=%0d hold=%0d", n_load_new, n_load_above, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
