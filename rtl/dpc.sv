// dpc: Dynamically Programmable Cache, the level-1 data cache of a processor
// with an FPGA fabric woven between its lines.
//
// Seen from the CPU it is an 8 KB direct-mapped write-back data cache with one
// read/write port (256 lines of 32 bytes). Between its lines sit 16 FPGA rows
// of 8 logical elements; each row owns 16 consecutive lines (a 512-byte
// address block), reads its operands from them and stores its results into
// them, so data is processed where it lies instead of travelling to the CPU.
// The first three lines of a row's group can hold row configurations
// (virtualization registers); the decoder, fed from the I-cache bus, writes
// configurations into them in one cycle and issues execute commands that pick
// one of the three stored configurations every cycle. Without configurations
// the unit is a plain data cache; both uses can be interleaved freely.
//
// Ports: CPU data port (cpu_*; request held until cpu_ack, hits complete in
// the request cycle), I-cache instruction bus into the decoder (ibus_*, valid/
// ready), main-memory line port (mem_*; request held until mem_ack).
// `row_active` shows which rows executed in the current cycle.
//
// The structure (cache lines + tags + FPGA rows + decoder) follows the
// reference design; how the pieces are joined is described in each module.
module dpc
  import dpc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  // CPU data port
  input  logic                      cpu_req,
  input  logic                      cpu_we,
  input  logic [ADDR_BITS-1:0]      cpu_addr,
  input  logic [WORD_BITS-1:0]      cpu_wdata,
  input  logic [WORD_BITS/8-1:0]    cpu_be,
  output logic [WORD_BITS-1:0]      cpu_rdata,
  output logic                      cpu_ack,
  // I-cache bus
  input  logic                      ibus_valid,
  input  logic [IBUS_BITS-1:0]      ibus_data,
  output logic                      ibus_ready,
  // main memory
  output logic                      mem_req,
  output logic                      mem_we,
  output logic [ADDR_BITS-OFFSET_BITS-1:0] mem_addr,
  output line_t                     mem_wdata,
  input  line_t                     mem_rdata,
  input  logic                      mem_ack,
  // status
  output logic [NUM_ROWS-1:0]       row_active
);

  // decoder <-> controller / fabric
  logic                  exec;
  logic [VR_BITS-1:0]    exec_ctx;
  logic [NUM_ROWS-1:0]   exec_rows;
  logic [POS_BITS-1:0]   exec_offset;
  logic                  cfg_req, cfg_ack;
  logic [INDEX_BITS-1:0] cfg_index;
  line_t                 cfg_line;

  // controller <-> arrays
  logic [INDEX_BITS-1:0] tag_rd_index, tag_wr_index, dat_index;
  logic [TAG_BITS-1:0]   tag_rd_tag, tag_wr_tag;
  logic                  tag_rd_valid, tag_rd_dirty, tag_rd_cfg;
  logic                  tag_wr_en, tag_wr_valid, tag_wr_dirty, tag_wr_cfg;
  line_t                 dat_rdata, dat_wdata;
  logic                  dat_we;
  logic [LINE_BYTES-1:0] dat_wmask;

  // fabric <-> arrays
  line_t                 lines    [NUM_LINES];
  logic [NUM_LINES-1:0]  cfg_flags, fab_dirty_set;
  logic [NUM_ROWS-1:0]   fab_we;
  logic [POS_BITS-1:0]   fab_pos  [NUM_ROWS];
  logic [7:0]            fab_wdata[NUM_ROWS];
  logic [7:0]            row_sum  [NUM_ROWS];
  logic [NUM_ROWS-1:0]   row_cout;

  dpc_decoder u_dec (
    .ibus_valid  (ibus_valid),
    .ibus_data   (ibus_data),
    .ibus_ready  (ibus_ready),
    .exec        (exec),
    .exec_ctx    (exec_ctx),
    .exec_rows   (exec_rows),
    .exec_offset (exec_offset),
    .cfg_req     (cfg_req),
    .cfg_index   (cfg_index),
    .cfg_line    (cfg_line),
    .cfg_ack     (cfg_ack)
  );

  cache_controller u_ctl (
    .clk          (clk),
    .rst_n        (rst_n),
    .cpu_req      (cpu_req),
    .cpu_we       (cpu_we),
    .cpu_addr     (cpu_addr),
    .cpu_wdata    (cpu_wdata),
    .cpu_be       (cpu_be),
    .cpu_rdata    (cpu_rdata),
    .cpu_ack      (cpu_ack),
    .cfg_req      (cfg_req),
    .cfg_index    (cfg_index),
    .cfg_line     (cfg_line),
    .cfg_ack      (cfg_ack),
    .tag_rd_index (tag_rd_index),
    .tag_rd_tag   (tag_rd_tag),
    .tag_rd_valid (tag_rd_valid),
    .tag_rd_dirty (tag_rd_dirty),
    .tag_rd_cfg   (tag_rd_cfg),
    .tag_wr_en    (tag_wr_en),
    .tag_wr_index (tag_wr_index),
    .tag_wr_tag   (tag_wr_tag),
    .tag_wr_valid (tag_wr_valid),
    .tag_wr_dirty (tag_wr_dirty),
    .tag_wr_cfg   (tag_wr_cfg),
    .dat_index    (dat_index),
    .dat_rdata    (dat_rdata),
    .dat_we       (dat_we),
    .dat_wmask    (dat_wmask),
    .dat_wdata    (dat_wdata),
    .mem_req      (mem_req),
    .mem_we       (mem_we),
    .mem_addr     (mem_addr),
    .mem_wdata    (mem_wdata),
    .mem_rdata    (mem_rdata),
    .mem_ack      (mem_ack)
  );

  tag_array u_tags (
    .clk           (clk),
    .rst_n         (rst_n),
    .rd_index      (tag_rd_index),
    .rd_tag        (tag_rd_tag),
    .rd_valid      (tag_rd_valid),
    .rd_dirty      (tag_rd_dirty),
    .rd_cfg        (tag_rd_cfg),
    .wr_en         (tag_wr_en),
    .wr_index      (tag_wr_index),
    .wr_tag        (tag_wr_tag),
    .wr_valid      (tag_wr_valid),
    .wr_dirty      (tag_wr_dirty),
    .wr_cfg        (tag_wr_cfg),
    .fab_dirty_set (fab_dirty_set),
    .cfg_flags     (cfg_flags)
  );

  cache_data_array u_data (
    .clk       (clk),
    .rst_n     (rst_n),
    .ctl_index (dat_index),
    .ctl_rdata (dat_rdata),
    .ctl_we    (dat_we),
    .ctl_wmask (dat_wmask),
    .ctl_wdata (dat_wdata),
    .fab_we    (fab_we),
    .fab_pos   (fab_pos),
    .fab_wdata (fab_wdata),
    .lines_o   (lines)
  );

  fpga_fabric u_fab (
    .clk           (clk),
    .rst_n         (rst_n),
    .lines_i       (lines),
    .cfg_flags     (cfg_flags),
    .exec          (exec),
    .exec_ctx      (exec_ctx),
    .exec_rows     (exec_rows),
    .exec_offset   (exec_offset),
    .fab_we        (fab_we),
    .fab_pos       (fab_pos),
    .fab_wdata     (fab_wdata),
    .fab_dirty_set (fab_dirty_set),
    .row_sum       (row_sum),
    .row_cout      (row_cout),
    .row_active    (row_active)
  );

endmodule
