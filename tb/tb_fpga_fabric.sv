// tb_fpga_fabric: the 16-row fabric on a modelled set of cache lines.
// Row 2 (context 0) adds two bytes and stores the sum; row 3 (context 0) is
// chained to row 2 in the same cycle and adds row 2's sum shifted left to its
// own operand. Row 6 holds a different configuration in each of its three
// VRs (add, subtract, AND) and the test switches context every cycle. Row 9
// accumulates a byte stream through its LE history, walking the data with the
// execute offset. Also checks that rows outside the mask and rows whose
// selected VR is empty do not execute, and that stores set the dirty bit.
module tb_fpga_fabric;
  import dpc_pkg::*;
  import dpc_cfg_lib::*;

  logic clk = 1'b0, rst_n;
  line_t lines_i [NUM_LINES];
  logic [NUM_LINES-1:0] cfg_flags;
  logic exec;
  logic [1:0] exec_ctx;
  logic [NUM_ROWS-1:0] exec_rows;
  logic [POS_BITS-1:0] exec_offset;
  logic [NUM_ROWS-1:0] fab_we, row_cout, row_active;
  logic [POS_BITS-1:0] fab_pos [NUM_ROWS];
  logic [7:0] fab_wdata [NUM_ROWS];
  logic [NUM_LINES-1:0] fab_dirty_set;
  logic [7:0] row_sum [NUM_ROWS];
  int checks = 0, failures = 0;
  int n_switch = 0, n_chain = 0, n_forward = 0;

  fpga_fabric dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [7:0] byte_at(int row, int pos);
    return lines_i[row*16 + pos/32][8*(pos%32) +: 8];
  endfunction

  task automatic put_cfg(int row, int slot, row_cfg_t c);
    lines_i[row*16 + slot] = '0;
    lines_i[row*16 + slot][ROW_CFG_BITS-1:0] = c;
    cfg_flags[row*16 + slot] = 1'b1;
  endtask

  // apply the fabric's stores to the modelled lines at the clock edge
  always @(posedge clk) begin
    for (int r = 0; r < NUM_ROWS; r++)
      if (fab_we[r]) lines_i[r*16 + int'(fab_pos[r][8:5])][8*int'(fab_pos[r][4:0]) +: 8] <= fab_wdata[r];
  end

  initial begin
    logic [7:0] a, b, acc;
    rst_n = 1'b0; exec = 0; exec_ctx = 0; exec_rows = '0; exec_offset = '0; cfg_flags = '0;
    for (int l = 0; l < NUM_LINES; l++)
      for (int w = 0; w < 8; w++) lines_i[l][32*w +: 32] = $urandom;
    // row 2: sum of bytes 100 and 101 -> byte 200
    put_cfg(2, 0, with_ops(row_cfg(SRC_OPA, SRC_OPB, F_XOR3, F_MAJ, CIN_ZERO), 100, 101, 200, 1));
    // row 3: own byte 120 + (row 2 sum << 1) -> byte 210
    put_cfg(3, 0, with_ops(row_cfg(SRC_OPA, SRC_PREV_SHL, F_XOR3, F_MAJ, CIN_ZERO), 120, 0, 210, 1));
    // row 6: three contexts
    put_cfg(6, 0, with_ops(row_cfg(SRC_OPA, SRC_OPB, F_XOR3, F_MAJ, CIN_ZERO), 128, 129, 300, 1));
    put_cfg(6, 1, with_ops(row_cfg(SRC_OPA, SRC_OPB, F_XNB3, F_MAJNB, CIN_ONE), 128, 129, 301, 1));
    put_cfg(6, 2, with_ops(row_cfg(SRC_OPA, SRC_OPB, F_AND, F_ZERO, CIN_ZERO), 128, 129, 302, 1));
    // row 9: accumulate bytes 96.. through the LE history, no store
    put_cfg(9, 0, with_ops(row_cfg(SRC_OPA, SRC_OWN_HIST, F_XOR3, F_MAJ, CIN_ZERO), 96, 0, 0, 0));
    // row 11: configured in slot 0 only
    put_cfg(11, 0, with_ops(row_cfg(SRC_OPA, SRC_OPB, F_XOR3, F_MAJ, CIN_ZERO), 128, 129, 100, 1));
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // rows 2 and 3 chained in one cycle
    @(negedge clk);
    exec = 1; exec_ctx = 0; exec_rows = 16'h000C; exec_offset = 0;
    #1;
    a = byte_at(2, 100) + byte_at(2, 101);
    chk(row_sum[2] == a, "row 2 add");
    chk(row_sum[3] == 8'(byte_at(3, 120) + {a[6:0], 1'b0}), "row 3 chained to row 2");
    chk(fab_we == 16'h000C && fab_dirty_set[2*16 + 6] && fab_dirty_set[3*16 + 6], "stores and dirty bits");
    b = row_sum[3];
    n_chain++;
    @(negedge clk);
    exec = 0;
    chk(byte_at(2, 200) == a && byte_at(3, 210) == b, "stored results");

    // row 6: context switch every cycle, with row 11 in the mask
    for (int t = 0; t < 60; t++) begin
      int ctx;
      ctx = t % 3;
      @(negedge clk);
      lines_i[6*16 + 4][0 +: 8] = 8'($urandom);   // byte 128
      lines_i[6*16 + 4][8 +: 8] = 8'($urandom);   // byte 129
      exec = 1; exec_ctx = 2'(ctx); exec_rows = 16'h0840; exec_offset = 0;
      #1;
      a = byte_at(6, 128); b = byte_at(6, 129);
      case (ctx)
        0: chk(row_sum[6] == 8'(a + b), "ctx 0 add");
        1: chk(row_sum[6] == 8'(a - b) && row_cout[6] == (a >= b), "ctx 1 subtract");
        default: chk(row_sum[6] == (a & b), "ctx 2 and");
      endcase
      chk(fab_pos[6] == 9'(300 + ctx), "ctx selects destination");
      chk(row_active[11] == (ctx == 0), "empty VR does not execute");
      chk(row_active[9] == 1'b0 && fab_we[2] == 1'b0, "rows outside the mask stay idle");
      n_switch++;
    end

    // row 9: accumulate 32 bytes through the history, stepping the offset
    acc = 8'h00;
    for (int t = 0; t < 32; t++) begin
      @(negedge clk);
      exec = 1; exec_ctx = 0; exec_rows = 16'h0200; exec_offset = 9'(t);
      #1;
      acc = acc + byte_at(9, 96 + t);
      chk(row_sum[9] == acc, "accumulate with forwarding");
      n_forward++;
    end
    @(negedge clk);
    exec = 0;

    chk(n_switch > 0 && n_chain > 0 && n_forward > 0, "mechanisms exercised");
    $display("context switches=%0d chained cycles=%0d forwarded cycles=%0d", n_switch, n_chain, n_forward);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
