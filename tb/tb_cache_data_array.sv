// tb_cache_data_array: byte-masked controller writes and per-row fabric byte
// writes, including same-byte collisions (controller must win), checked
// against a reference copy of the array.
module tb_cache_data_array;
  import dpc_pkg::*;

  logic clk = 1'b0, rst_n;
  logic [INDEX_BITS-1:0] ctl_index;
  line_t                 ctl_rdata, ctl_wdata;
  logic                  ctl_we;
  logic [LINE_BYTES-1:0] ctl_wmask;
  logic [NUM_ROWS-1:0]   fab_we;
  logic [POS_BITS-1:0]   fab_pos   [NUM_ROWS];
  logic [7:0]            fab_wdata [NUM_ROWS];
  line_t                 lines_o   [NUM_LINES];
  int checks = 0, failures = 0;
  line_t m [NUM_LINES];

  cache_data_array dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; ctl_we = 0; ctl_index = '0; ctl_wmask = '0; ctl_wdata = '0; fab_we = '0;
    for (int r = 0; r < NUM_ROWS; r++) begin fab_pos[r] = '0; fab_wdata[r] = '0; end
    for (int l = 0; l < NUM_LINES; l++) m[l] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ctl_index = 8'($urandom);
      ctl_we    = 1'($urandom);
      ctl_wmask = $urandom;
      for (int w = 0; w < 8; w++) ctl_wdata[32*w +: 32] = $urandom;
      for (int r = 0; r < NUM_ROWS; r++) begin
        fab_we[r]    = ($urandom % 4) == 0;
        fab_pos[r]   = 9'($urandom);
        fab_wdata[r] = 8'($urandom);
      end
      // force a collision now and then
      if (t % 7 == 0) begin
        fab_we[ctl_index[7:4]]  = 1'b1;
        fab_pos[ctl_index[7:4]] = {ctl_index[3:0], 5'd3};
        ctl_we = 1'b1; ctl_wmask[3] = 1'b1;
      end
      #1;
      checks++;
      if (ctl_rdata !== m[ctl_index]) begin failures++; $display("FAIL read line %0d", ctl_index); end
      checks++;
      if (lines_o[(t * 37) % NUM_LINES] !== m[(t * 37) % NUM_LINES]) begin
        failures++; $display("FAIL fabric view line %0d", (t * 37) % NUM_LINES);
      end
      @(posedge clk);
      for (int r = 0; r < NUM_ROWS; r++)
        if (fab_we[r]) m[r*16 + int'(fab_pos[r][8:5])][8*int'(fab_pos[r][4:0]) +: 8] = fab_wdata[r];
      if (ctl_we)
        for (int b = 0; b < LINE_BYTES; b++)
          if (ctl_wmask[b]) m[ctl_index][8*b +: 8] = ctl_wdata[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
