// fpga_fabric: the FPGA array of the DPC, 16 rows of 8 logical elements.
//
// Row r is tied to cache lines 16r .. 16r+15. Its first three lines are its
// virtualization registers (vr_select), the rest hold its data. On an execute
// command the rows named in `exec_rows` run the configuration of VR context
// `exec_ctx`: each reads its operand bytes A and B from the positions given in
// its configuration, plus `exec_offset` (modulo the 512 bytes of the group),
// computes, shifts the result into its LE histories, and, if its
// configuration says so, writes its sum byte back into its own lines at the
// destination position; the line is then marked dirty. A row whose selected
// VR holds no configuration does not execute. Row r also sees row r-1's sum
// byte and carry out in the same cycle (row 0 sees zeros), so a computation
// can span several rows, each with its own configuration.
//
// Interface timing: operand reads, routing and LE logic are combinational
// from the line contents and the command; history updates and result stores
// happen at the rising clock edge of the execute cycle, so a store is visible
// in the cache on the next cycle.
//
// The 16 x 8 array and 16 lines per row follow the reference design; the
// operand/destination addressing, the execute offset and the row-to-row
// chaining are this design's own.
module fpga_fabric
  import dpc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  line_t                 lines_i   [NUM_LINES],
  input  logic [NUM_LINES-1:0]  cfg_flags,
  input  logic                  exec,
  input  logic [VR_BITS-1:0]    exec_ctx,
  input  logic [NUM_ROWS-1:0]   exec_rows,
  input  logic [POS_BITS-1:0]   exec_offset,
  output logic [NUM_ROWS-1:0]   fab_we,
  output logic [POS_BITS-1:0]   fab_pos   [NUM_ROWS],
  output logic [7:0]            fab_wdata [NUM_ROWS],
  output logic [NUM_LINES-1:0]  fab_dirty_set,
  output logic [7:0]            row_sum   [NUM_ROWS],
  output logic [NUM_ROWS-1:0]   row_cout,
  output logic [NUM_ROWS-1:0]   row_active
);

  for (genvar r = 0; r < NUM_ROWS; r++) begin : g_row
    line_t [NUM_VR-1:0]    vr_line;
    logic  [NUM_VR-1:0]    vr_valid;
    row_cfg_t              cfg;
    logic                  cfg_ok;
    logic                  en;
    logic [POS_BITS-1:0]   pos_a, pos_b;
    logic [7:0]            opa, opb;
    logic [7:0]            prev_sum;
    logic                  prev_cout;
    logic [7:0]            s;
    logic                  co;
    logic [7:0]            h;

    for (genvar v = 0; v < NUM_VR; v++) begin : g_vr
      assign vr_line[v]  = lines_i[r*LINES_PER_ROW + v];
      assign vr_valid[v] = cfg_flags[r*LINES_PER_ROW + v];
    end

    vr_select u_vr (
      .vr_line  (vr_line),
      .vr_valid (vr_valid),
      .ctx      (exec_ctx),
      .cfg      (cfg),
      .cfg_ok   (cfg_ok)
    );

    always_comb begin
      pos_a = POS_BITS'({cfg.opa.line, cfg.opa.byte_sel}) + exec_offset;
      pos_b = POS_BITS'({cfg.opb.line, cfg.opb.byte_sel}) + exec_offset;
      opa   = lines_i[r*LINES_PER_ROW + int'(pos_a[POS_BITS-1 -: LSEL_BITS])]
                     [8*int'(pos_a[BSEL_BITS-1:0]) +: 8];
      opb   = lines_i[r*LINES_PER_ROW + int'(pos_b[POS_BITS-1 -: LSEL_BITS])]
                     [8*int'(pos_b[BSEL_BITS-1:0]) +: 8];
    end

    if (r == 0) begin : g_first
      assign prev_sum  = '0;
      assign prev_cout = 1'b0;
    end else begin : g_chain
      assign prev_sum  = g_row[r-1].s;
      assign prev_cout = g_row[r-1].co;
    end

    assign en = exec && exec_rows[r] && cfg_ok;

    fpga_row u_row (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (en),
      .cfg       (cfg),
      .opa       (opa),
      .opb       (opb),
      .prev_sum  (prev_sum),
      .prev_cout (prev_cout),
      .sum       (s),
      .cout      (co),
      .hist      (h)
    );

    assign fab_we[r]    = en && cfg.store_en;
    assign fab_pos[r]   = {cfg.dst.line, cfg.dst.byte_sel};
    assign fab_wdata[r] = s;
    assign row_sum[r]   = s;
    assign row_cout[r]  = co;
    assign row_active[r] = en;

    for (genvar l = 0; l < LINES_PER_ROW; l++) begin : g_dirty
      assign fab_dirty_set[r*LINES_PER_ROW + l] = fab_we[r] && (cfg.dst.line == LSEL_BITS'(l));
    end
  end

endmodule
