// tb_fpga_row: self-checking test of one FPGA row.
// The row is configured as an 8-bit adder, subtractor (with carry-in one),
// AND unit, accumulator (operand plus own forwarded history), a shifted
// chain from the previous row, and a carry-chained upper half of a 16-bit
// adder. Results are compared with arithmetic computed in the testbench.
module tb_fpga_row;
  import dpc_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n, en;
  row_cfg_t   cfg;
  logic [7:0] opa, opb, prev_sum, sum, hist;
  logic       prev_cout, cout;
  int checks = 0, failures = 0;

  fpga_row dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // LUT contents for f(x, y, z) with x = din[0], y = din[1], z = din[2]
  typedef enum {F_XOR3, F_MAJ, F_XNB3, F_MAJNB, F_AND, F_ZERO} fn_e;
  function automatic logic [7:0] lut(fn_e f);
    logic [7:0] l;
    for (int i = 0; i < 8; i++) begin
      logic x, y, z;
      {z, y, x} = 3'(i);
      case (f)
        F_XOR3:  l[i] = x ^ y ^ z;
        F_MAJ:   l[i] = (x & y) | (x & z) | (y & z);
        F_XNB3:  l[i] = x ^ ~y ^ z;
        F_MAJNB: l[i] = (x & ~y) | (x & z) | (~y & z);
        F_AND:   l[i] = x & y;
        default: l[i] = 1'b0;
      endcase
    end
    return l;
  endfunction

  function automatic row_cfg_t make(sb_src_e sx, sb_src_e sy, fn_e fs, fn_e fc, cin_sel_e cs);
    row_cfg_t c = '0;
    for (int i = 0; i < LES_PER_ROW; i++) begin
      c.le[i].src       = {SRC_CARRY, sy, sx};
      c.le[i].sum_lut   = lut(fs);
      c.le[i].carry_lut = lut(fc);
      c.le[i].out_sel   = 2'd0;
    end
    c.cin_sel = cs;
    return c;
  endfunction

  task automatic chk(logic [8:0] got, logic [8:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (a=%h b=%h)", what, got, exp, opa, opb);
    end
  endtask

  initial begin
    logic [7:0] acc;
    rst_n = 1'b0; en = 1'b0; cfg = '0; opa = '0; opb = '0; prev_sum = '0; prev_cout = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int t = 0; t < 300; t++) begin
      opa = 8'($urandom); opb = 8'($urandom); prev_sum = 8'($urandom); prev_cout = 1'($urandom);
      cfg = make(SRC_OPA, SRC_OPB, F_XOR3, F_MAJ, CIN_ZERO);
      #1 chk({cout, sum}, 9'(opa) + 9'(opb), "add");
      cfg = make(SRC_OPA, SRC_OPB, F_XNB3, F_MAJNB, CIN_ONE);
      #1 chk({cout, sum}, {opa >= opb, 8'(opa - opb)}, "sub");
      cfg = make(SRC_OPA, SRC_OPB, F_AND, F_ZERO, CIN_ZERO);
      #1 chk({1'b0, sum}, {1'b0, opa & opb}, "and");
      cfg = make(SRC_OPA, SRC_PREV_SHL, F_XOR3, F_MAJ, CIN_ZERO);
      #1 chk({cout, sum}, 9'(opa) + 9'({prev_sum[6:0], 1'b0}), "prev-row shift chain");
      cfg = make(SRC_OPA, SRC_PREV_SUM, F_XOR3, F_MAJ, CIN_PREV_COUT);
      #1 chk({cout, sum}, 9'(opa) + 9'(prev_sum) + 9'(prev_cout), "carry chain");
      cfg = make(SRC_OPA, SRC_PREV_COUT, F_AND, F_ZERO, CIN_ZERO);
      #1 chk({1'b0, sum}, {1'b0, prev_cout ? opa : 8'h00}, "prev carry as data");
    end

    // accumulator through the LE history (data forwarding)
    cfg = make(SRC_OPA, SRC_OWN_HIST, F_XOR3, F_MAJ, CIN_ZERO);
    acc = '0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      opa = 8'($urandom);
      en  = ($urandom % 4) != 0;
      #1 chk({1'b0, hist}, {1'b0, acc}, "accumulator history");
      chk({1'b0, sum}, {1'b0, 8'(acc + opa)}, "accumulate sum");
      @(posedge clk);
      if (en) acc = acc + opa;
    end
    // older history: out_sel = 3 shows the sum of four executed cycles ago
    @(negedge clk);
    en = 1'b1;
    cfg = make(SRC_OPA, SRC_ZERO, F_XOR3, F_ZERO, CIN_ZERO);
    for (int t = 0; t < 4; t++) begin opa = 8'(t + 8'h30); @(negedge clk); end
    for (int i = 0; i < LES_PER_ROW; i++) cfg.le[i].out_sel = 2'd3;
    en = 1'b0;
    #1 chk({1'b0, hist}, 9'h030, "history depth four");
    for (int i = 0; i < LES_PER_ROW; i++) cfg.le[i].out_sel = 2'd1;
    #1 chk({1'b0, hist}, 9'h032, "history depth two");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
