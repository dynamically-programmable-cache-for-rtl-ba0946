// tb_logic_element: self-checking test of one logical element.
// Random LUT contents and inputs; sum/carry are checked against the LUT bit
// addressed by the inputs, and the output-select mux against a reference
// model of the four-deep history that only advances on enabled cycles.
module tb_logic_element;
  import dpc_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       en;
  logic [2:0] din;
  logic [7:0] sum_lut, carry_lut;
  logic [1:0] out_sel;
  logic       sum, carry, hist_out;

  int checks = 0, failures = 0;
  logic [3:0] model;

  logic_element dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; din = '0; sum_lut = '0; carry_lut = '0; out_sel = '0;
    model = '0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1'b1;
    // full adder: sum = a^b^c (0x96), carry = maj (0xE8)
    sum_lut = 8'h96; carry_lut = 8'hE8;
    for (int v = 0; v < 8; v++) begin
      din = 3'(v);
      #1;
      check(sum,   ^din, "full-adder sum");
      check(carry, (din[0]&din[1])|(din[0]&din[2])|(din[1]&din[2]), "full-adder carry");
    end
    // random functions and history
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      sum_lut   = 8'($urandom);
      carry_lut = 8'($urandom);
      din       = 3'($urandom);
      en        = ($urandom % 3) != 0;
      out_sel   = 2'($urandom);
      #1;
      check(sum,      sum_lut[din],   "sum LUT");
      check(carry,    carry_lut[din], "carry LUT");
      check(hist_out, model[out_sel], "history select");
      @(posedge clk);
      if (en) model = {model[2:0], sum_lut[din]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
