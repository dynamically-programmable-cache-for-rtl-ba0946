// tb_switch_box: exhaustive check of the switch-box source selection.
module tb_switch_box;
  import dpc_pkg::*;

  sb_src_e [2:0] src;
  logic opa_bit, opb_bit, carry_in, own_hist, prev_sum, prev_shl, prev_cout;
  logic [2:0] le_in;
  int checks = 0, failures = 0;

  switch_box dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic pick(int s, logic [6:0] v);
    // v = {prev_cout, prev_shl, prev_sum, own_hist, carry_in, opb, opa}
    return (s == 0) ? 1'b0 : v[s-1];
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [6:0] v;
      v = 7'($urandom);
      {prev_cout, prev_shl, prev_sum, own_hist, carry_in, opb_bit, opa_bit} = v;
      for (int k = 0; k < 3; k++) src[k] = sb_src_e'(3'($urandom));
      #1;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (le_in[k] !== pick(int'(src[k]), v)) begin
          failures++;
          $display("FAIL input %0d src %0d: got %0b", k, src[k], le_in[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
