// tag_array: tags and per-line state of the DPC cache.
//
// For each of the 256 lines it keeps the address tag and three flags: valid
// (holds data of the tagged address), dirty (data differs from main memory;
// the cache is write-back) and cfg (the line holds an FPGA configuration, not
// data). The cache controller reads one entry combinationally and writes one
// entry per cycle. The FPGA fabric can set the dirty flag of any data lines it
// stores results into (one set bit per line, all in the same cycle); a write
// by the controller to the same entry takes precedence. All cfg flags are
// offered to the fabric so each row knows which of its VR lines hold a
// configuration. Reset (synchronous, active low) clears all flags.
//
// The reference design only names the tag store; its organisation (direct
// mapped, one entry per line, the cfg flag) is this design's own.
module tag_array
  import dpc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // controller lookup
  input  logic [INDEX_BITS-1:0] rd_index,
  output logic [TAG_BITS-1:0]   rd_tag,
  output logic                  rd_valid,
  output logic                  rd_dirty,
  output logic                  rd_cfg,
  // controller update
  input  logic                  wr_en,
  input  logic [INDEX_BITS-1:0] wr_index,
  input  logic [TAG_BITS-1:0]   wr_tag,
  input  logic                  wr_valid,
  input  logic                  wr_dirty,
  input  logic                  wr_cfg,
  // fabric stores
  input  logic [NUM_LINES-1:0]  fab_dirty_set,
  output logic [NUM_LINES-1:0]  cfg_flags
);

  logic [TAG_BITS-1:0]  tags [NUM_LINES];
  logic [NUM_LINES-1:0] valid, dirty, cfg;

  always_ff @(posedge clk) begin
    if (wr_en) tags[wr_index] <= wr_tag;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
      dirty <= '0;
      cfg   <= '0;
    end else begin
      dirty <= dirty | (fab_dirty_set & valid);
      if (wr_en) begin
        valid[wr_index] <= wr_valid;
        dirty[wr_index] <= wr_dirty;
        cfg[wr_index]   <= wr_cfg;
      end
    end
  end

  always_comb begin
    rd_tag   = tags[rd_index];
    rd_valid = valid[rd_index];
    rd_dirty = dirty[rd_index];
    rd_cfg   = cfg[rd_index];
  end

  assign cfg_flags = cfg;

endmodule
