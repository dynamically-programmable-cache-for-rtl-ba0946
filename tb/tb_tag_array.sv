// tb_tag_array: random writes, fabric dirty-set pulses and lookups checked
// against a reference copy of the tag store kept in the testbench.
module tb_tag_array;
  import dpc_pkg::*;

  logic clk = 1'b0, rst_n;
  logic [INDEX_BITS-1:0] rd_index, wr_index;
  logic [TAG_BITS-1:0]   rd_tag, wr_tag;
  logic rd_valid, rd_dirty, rd_cfg, wr_en, wr_valid, wr_dirty, wr_cfg;
  logic [NUM_LINES-1:0] fab_dirty_set, cfg_flags;
  int checks = 0, failures = 0;

  logic [TAG_BITS-1:0]  m_tag [NUM_LINES];
  logic [NUM_LINES-1:0] m_v, m_d, m_c;

  tag_array dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; fab_dirty_set = '0; rd_index = '0;
    wr_index = '0; wr_tag = '0; wr_valid = 0; wr_dirty = 0; wr_cfg = 0;
    m_v = '0; m_d = '0; m_c = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      wr_en    = ($urandom % 2) == 0;
      wr_index = 8'($urandom % 32);        // a small range so entries are revisited
      wr_tag   = TAG_BITS'($urandom);
      wr_valid = 1'($urandom); wr_dirty = 1'($urandom); wr_cfg = 1'($urandom);
      fab_dirty_set = '0;
      if ($urandom % 3 == 0) fab_dirty_set[$urandom % 32] = 1'b1;
      rd_index = 8'($urandom % 32);
      #1;
      checks++;
      if ((m_v[rd_index] && rd_tag !== m_tag[rd_index]) || rd_valid !== m_v[rd_index] ||
          rd_dirty !== m_d[rd_index] || rd_cfg !== m_c[rd_index] || cfg_flags !== m_c) begin
        failures++;
        $display("FAIL entry %0d: v%0b d%0b c%0b", rd_index, rd_valid, rd_dirty, rd_cfg);
      end
      @(posedge clk);
      m_d = m_d | (fab_dirty_set & m_v);
      if (wr_en) begin
        m_tag[wr_index] = wr_tag; m_v[wr_index] = wr_valid;
        m_d[wr_index] = wr_dirty; m_c[wr_index] = wr_cfg;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
