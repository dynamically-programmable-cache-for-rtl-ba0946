// tb_dpc_decoder: random instructions on the I-cache bus; the decoded execute
// and configuration-write fields and the ready handshake are compared with
// the instruction format worked out field by field in the testbench.
module tb_dpc_decoder;
  import dpc_pkg::*;

  logic                  ibus_valid;
  logic [IBUS_BITS-1:0]  ibus_data;
  logic                  ibus_ready;
  logic                  exec;
  logic [1:0]            exec_ctx;
  logic [NUM_ROWS-1:0]   exec_rows;
  logic [POS_BITS-1:0]   exec_offset;
  logic                  cfg_req;
  logic [INDEX_BITS-1:0] cfg_index;
  line_t                 cfg_line;
  logic                  cfg_ack;
  int checks = 0, failures = 0;

  dpc_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr op %0d)", what, ibus_data[255:254]); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int op, row, slot;
      for (int w = 0; w < 8; w++) ibus_data[32*w +: 32] = $urandom;
      ibus_valid = ($urandom % 8) != 0;
      cfg_ack    = 1'($urandom);
      op   = int'(ibus_data[255:254]);
      row  = int'(ibus_data[253:250]);
      slot = int'(ibus_data[249:248]);
      #1;
      chk(exec == (ibus_valid && op == 1), "exec");
      if (exec) begin
        chk(exec_rows == ibus_data[15:0], "row mask");
        chk(exec_ctx == ibus_data[17:16], "context");
        chk(exec_offset == ibus_data[26:18], "offset");
        chk(ibus_ready, "exec is taken at once");
      end
      chk(cfg_req == (ibus_valid && op == 2 && slot < 3), "cfg_req");
      if (cfg_req) begin
        chk(cfg_index == 8'(row * 16 + slot), "cfg line index");
        chk(cfg_line[ROW_CFG_BITS-1:0] == ibus_data[ROW_CFG_BITS-1:0], "cfg payload");
        chk(ibus_ready == cfg_ack, "cfg waits for ack");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
