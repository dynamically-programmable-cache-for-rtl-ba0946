// tb_vr_select: checks that the context named each cycle selects the right
// stored configuration and that an unconfigured or out-of-range slot does
// not enable the row.
module tb_vr_select;
  import dpc_pkg::*;

  line_t [NUM_VR-1:0] vr_line;
  logic  [NUM_VR-1:0] vr_valid;
  logic  [1:0]        ctx;
  row_cfg_t           cfg;
  logic               cfg_ok;
  int checks = 0, failures = 0;

  vr_select dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int v = 0; v < NUM_VR; v++)
        for (int w = 0; w < LINE_BITS/32; w++) vr_line[v][32*w +: 32] = $urandom;
      vr_valid = 3'($urandom);
      ctx      = 2'($urandom);
      #1;
      checks++;
      if (ctx < 2'd3) begin
        if (cfg !== row_cfg_t'(vr_line[ctx][ROW_CFG_BITS-1:0]) || cfg_ok !== vr_valid[ctx]) begin
          failures++;
          $display("FAIL ctx %0d: cfg_ok=%0b", ctx, cfg_ok);
        end
      end else if (cfg_ok !== 1'b0) begin
        failures++;
        $display("FAIL ctx 3 must not enable the row");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
