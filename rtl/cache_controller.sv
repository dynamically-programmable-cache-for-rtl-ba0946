// cache_controller: write-back control of the DPC's single cache port.
//
// Three kinds of access reach the cache: data read and data write from the
// CPU, and configuration write from the decoder. The cache is direct mapped
// with 32-byte lines; writes allocate; dirty lines are written back to main
// memory when they are replaced.
//   * Data read/write hit: done in the cycle of the request (cpu_ack high in
//     that cycle, read data valid with it).
//   * Data miss: a dirty victim is written back (S_WB), the line is fetched
//     (S_FILL), and the access completes as a hit in the following cycle.
//     A line holding a configuration is not a hit for data; a data miss on it
//     simply replaces the configuration (nothing to write back).
//   * Configuration write: the 256-bit configuration is written into the
//     named VR line in one cycle and the line is flagged as configuration
//     (cfg_ack in that cycle). If that line holds dirty data, the data is
//     written back first, so the write then takes the memory round trip.
// A pending configuration write is served before a CPU access.
//
// Memory side: one line per transfer; mem_req (with mem_we, mem_addr, a line
// address, and mem_wdata) is held until mem_ack; read data comes with mem_ack.
// All requests must be held stable until acknowledged.
//
// The reference design gives the write-back policy, the single read/write
// port, the three access types and the one-cycle configuration write; direct
// mapping, write allocation and the memory handshake are this design's own.
module cache_controller
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
  // configuration write from the decoder
  input  logic                      cfg_req,
  input  logic [INDEX_BITS-1:0]     cfg_index,
  input  line_t                     cfg_line,
  output logic                      cfg_ack,
  // tag array
  output logic [INDEX_BITS-1:0]     tag_rd_index,
  input  logic [TAG_BITS-1:0]       tag_rd_tag,
  input  logic                      tag_rd_valid,
  input  logic                      tag_rd_dirty,
  input  logic                      tag_rd_cfg,
  output logic                      tag_wr_en,
  output logic [INDEX_BITS-1:0]     tag_wr_index,
  output logic [TAG_BITS-1:0]       tag_wr_tag,
  output logic                      tag_wr_valid,
  output logic                      tag_wr_dirty,
  output logic                      tag_wr_cfg,
  // data array port
  output logic [INDEX_BITS-1:0]     dat_index,
  input  line_t                     dat_rdata,
  output logic                      dat_we,
  output logic [LINE_BYTES-1:0]     dat_wmask,
  output line_t                     dat_wdata,
  // main memory
  output logic                      mem_req,
  output logic                      mem_we,
  output logic [ADDR_BITS-OFFSET_BITS-1:0] mem_addr,
  output line_t                     mem_wdata,
  input  line_t                     mem_rdata,
  input  logic                      mem_ack
);

  typedef enum logic [1:0] {S_IDLE, S_WB, S_FILL} state_e;
  state_e state, state_n;

  localparam int unsigned WORD_SEL_BITS = OFFSET_BITS - $clog2(WORD_BITS/8);

  logic [TAG_BITS-1:0]      cpu_tag;
  logic [INDEX_BITS-1:0]    cpu_index;
  logic [WORD_SEL_BITS-1:0] cpu_word;
  logic                     serve_cfg;   // this cycle's lookup is for the configuration write
  logic                     hit;
  logic                     wb_for_cfg, wb_for_cfg_n;

  always_comb begin
    cpu_tag   = cpu_addr[ADDR_BITS-1 -: TAG_BITS];
    cpu_index = cpu_addr[OFFSET_BITS +: INDEX_BITS];
    cpu_word  = cpu_addr[OFFSET_BITS-1 -: WORD_SEL_BITS];
  end

  always_comb begin
    serve_cfg    = (state == S_IDLE) ? cfg_req : wb_for_cfg;
    tag_rd_index = serve_cfg ? cfg_index : cpu_index;
    dat_index    = tag_rd_index;
    hit          = tag_rd_valid && !tag_rd_cfg && (tag_rd_tag == cpu_tag);

    state_n      = state;
    wb_for_cfg_n = wb_for_cfg;
    cpu_ack      = 1'b0;
    cfg_ack      = 1'b0;
    cpu_rdata    = dat_rdata[WORD_BITS*int'(cpu_word) +: WORD_BITS];
    tag_wr_en    = 1'b0;
    tag_wr_index = tag_rd_index;
    tag_wr_tag   = cpu_tag;
    tag_wr_valid = 1'b0;
    tag_wr_dirty = 1'b0;
    tag_wr_cfg   = 1'b0;
    dat_we       = 1'b0;
    dat_wmask    = '0;
    dat_wdata    = '0;
    mem_req      = 1'b0;
    mem_we       = 1'b0;
    mem_addr     = {cpu_tag, cpu_index};
    mem_wdata    = dat_rdata;

    unique case (state)
      S_IDLE: begin
        if (cfg_req) begin
          if (tag_rd_valid && tag_rd_dirty && !tag_rd_cfg) begin
            state_n      = S_WB;
            wb_for_cfg_n = 1'b1;
          end else begin
            // one-cycle configuration write
            dat_we       = 1'b1;
            dat_wmask    = '1;
            dat_wdata    = cfg_line;
            tag_wr_en    = 1'b1;
            tag_wr_tag   = tag_rd_tag;
            tag_wr_cfg   = 1'b1;
            cfg_ack      = 1'b1;
          end
        end else if (cpu_req) begin
          if (hit) begin
            cpu_ack = 1'b1;
            if (cpu_we) begin
              dat_we    = 1'b1;
              dat_wdata = {(LINE_BITS/WORD_BITS){cpu_wdata}};
              dat_wmask = LINE_BYTES'(cpu_be) << (int'(cpu_word) * (WORD_BITS/8));
              tag_wr_en    = 1'b1;
              tag_wr_valid = 1'b1;
              tag_wr_dirty = 1'b1;
            end
          end else if (tag_rd_valid && tag_rd_dirty && !tag_rd_cfg) begin
            state_n      = S_WB;
            wb_for_cfg_n = 1'b0;
          end else begin
            state_n = S_FILL;
          end
        end
      end

      S_WB: begin
        mem_req  = 1'b1;
        mem_we   = 1'b1;
        mem_addr = {tag_rd_tag, tag_rd_index};
        if (mem_ack) begin
          tag_wr_en    = 1'b1;
          tag_wr_tag   = tag_rd_tag;
          tag_wr_valid = 1'b0;
          tag_wr_dirty = 1'b0;
          state_n      = wb_for_cfg ? S_IDLE : S_FILL;
          wb_for_cfg_n = 1'b0;
        end
      end

      S_FILL: begin
        mem_req = 1'b1;
        if (mem_ack) begin
          dat_we       = 1'b1;
          dat_wmask    = '1;
          dat_wdata    = mem_rdata;
          tag_wr_en    = 1'b1;
          tag_wr_valid = 1'b1;
          state_n      = S_IDLE;
        end
      end

      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      wb_for_cfg <= 1'b0;
    end else begin
      state      <= state_n;
      wb_for_cfg <= wb_for_cfg_n;
    end
  end

  // Requests are held until acknowledged.
  a_cpu_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (cpu_req && !cpu_ack) |=> cpu_req)
    else $error("cpu_req dropped before cpu_ack");
  a_ack_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(cfg_ack && cpu_ack))
    else $error("two accesses acknowledged in one cycle");

endmodule
