// cache_data_array: the DPC cache lines (cache blocks).
//
// 256 lines of 256 bits hold data and FPGA configurations alike. The cache
// controller has one read/write port: a combinational read of line
// `ctl_index` and a byte-masked write at the clock edge. Each FPGA row has a
// byte write port into its own group of 16 lines, and all lines are visible
// to the fabric at once, because every row reads its operands and its
// virtualization registers directly from the lines next to it. When the
// controller and a row write the same byte in one cycle, the controller wins.
// Reset clears all lines (synchronous, active low), so the fabric never reads
// undefined contents.
//
// Line size and line count follow the reference design (256-bit lines, 16
// lines per FPGA row, 16 rows). The sense amplifiers of a real array are
// represented only by the read path.
module cache_data_array
  import dpc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // controller port
  input  logic [INDEX_BITS-1:0] ctl_index,
  output line_t                 ctl_rdata,
  input  logic                  ctl_we,
  input  logic [LINE_BYTES-1:0] ctl_wmask,
  input  line_t                 ctl_wdata,
  // fabric ports, one per row
  input  logic [NUM_ROWS-1:0]   fab_we,
  input  logic [POS_BITS-1:0]   fab_pos   [NUM_ROWS],
  input  logic [7:0]            fab_wdata [NUM_ROWS],
  output line_t                 lines_o   [NUM_LINES]
);

  line_t lines [NUM_LINES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < NUM_LINES; l++) lines[l] <= '0;
    end else begin
      for (int r = 0; r < NUM_ROWS; r++) begin
        if (fab_we[r])
          lines[r*LINES_PER_ROW + int'(fab_pos[r][POS_BITS-1 -: LSEL_BITS])]
               [8*int'(fab_pos[r][BSEL_BITS-1:0]) +: 8] <= fab_wdata[r];
      end
      if (ctl_we) begin
        for (int b = 0; b < LINE_BYTES; b++)
          if (ctl_wmask[b]) lines[ctl_index][8*b +: 8] <= ctl_wdata[8*b +: 8];
      end
    end
  end

  assign ctl_rdata = lines[ctl_index];
  assign lines_o   = lines;

endmodule
