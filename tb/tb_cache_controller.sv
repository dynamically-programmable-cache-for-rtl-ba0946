// tb_cache_controller: the write-back controller with the tag array, the data
// array and a main-memory model. Random CPU reads and writes (few indices,
// many tags, so lines are replaced and dirty lines written back) and random
// configuration writes are checked against a flat reference memory. Also
// checks: hits complete in the request cycle, a clean configuration write
// completes in one cycle and leaves the configuration in the line with the
// cfg flag set, and the written-back data reaches main memory.
module tb_cache_controller;
  import dpc_pkg::*;

  logic clk = 1'b0, rst_n;
  logic cpu_req, cpu_we, cpu_ack;
  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata;
  logic [3:0]  cpu_be;
  logic cfg_req, cfg_ack;
  logic [INDEX_BITS-1:0] cfg_index;
  line_t cfg_line;
  logic [INDEX_BITS-1:0] tag_rd_index, tag_wr_index, dat_index;
  logic [TAG_BITS-1:0] tag_rd_tag, tag_wr_tag;
  logic tag_rd_valid, tag_rd_dirty, tag_rd_cfg, tag_wr_en, tag_wr_valid, tag_wr_dirty, tag_wr_cfg;
  line_t dat_rdata, dat_wdata;
  logic dat_we;
  logic [LINE_BYTES-1:0] dat_wmask;
  logic mem_req, mem_we, mem_ack;
  logic [26:0] mem_addr;
  line_t mem_wdata, mem_rdata;
  logic [NUM_LINES-1:0] cfg_flags;
  logic [NUM_ROWS-1:0] fab_we = '0;
  logic [POS_BITS-1:0] fab_pos [NUM_ROWS];
  logic [7:0] fab_wdata [NUM_ROWS];
  line_t lines [NUM_LINES];

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wb = 0, n_cfg1 = 0, n_cfgwb = 0;
  logic [31:0] ref_mem [logic [29:0]];

  cache_controller dut (.*);
  tag_array u_tags (.clk, .rst_n, .rd_index(tag_rd_index), .rd_tag(tag_rd_tag),
    .rd_valid(tag_rd_valid), .rd_dirty(tag_rd_dirty), .rd_cfg(tag_rd_cfg),
    .wr_en(tag_wr_en), .wr_index(tag_wr_index), .wr_tag(tag_wr_tag), .wr_valid(tag_wr_valid),
    .wr_dirty(tag_wr_dirty), .wr_cfg(tag_wr_cfg), .fab_dirty_set('0), .cfg_flags(cfg_flags));
  cache_data_array u_data (.clk, .rst_n, .ctl_index(dat_index), .ctl_rdata(dat_rdata),
    .ctl_we(dat_we), .ctl_wmask(dat_wmask), .ctl_wdata(dat_wdata), .fab_we(fab_we),
    .fab_pos(fab_pos), .fab_wdata(fab_wdata), .lines_o(lines));
  main_memory_model #(.LATENCY(3)) u_mem (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_word(logic [31:0] a);
    logic [29:0] w = a[31:2];
    if (ref_mem.exists(w)) return ref_mem[w];
    return u_mem.init_line(a[31:5])[32*int'(a[4:2]) +: 32];
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one CPU access; returns the number of cycles until acknowledge
  task automatic cpu_access(logic we, logic [31:0] a, logic [31:0] d, logic [3:0] be,
                            output logic [31:0] rd, output int cycles);
    @(negedge clk);
    cpu_req = 1'b1; cpu_we = we; cpu_addr = a; cpu_wdata = d; cpu_be = be;
    cycles = 0;
    forever begin
      #4;
      cycles++;
      if (cpu_ack) begin rd = cpu_rdata; break; end
      @(negedge clk);
    end
    @(negedge clk);
    cpu_req = 1'b0;
  endtask

  task automatic cfg_access(logic [7:0] idx, line_t l, output int cycles);
    @(negedge clk);
    cfg_req = 1'b1; cfg_index = idx; cfg_line = l;
    cycles = 0;
    forever begin
      #4;
      cycles++;
      if (cfg_ack) break;
      @(negedge clk);
    end
    @(negedge clk);
    cfg_req = 1'b0;
  endtask

  initial begin
    logic [31:0] rd, a, d, exp;
    logic [3:0]  be;
    int cyc;
    line_t l;
    rst_n = 1'b0; cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; cpu_be = 0;
    cfg_req = 0; cfg_index = 0; cfg_line = '0;
    for (int r = 0; r < NUM_ROWS; r++) begin fab_pos[r] = '0; fab_wdata[r] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int t = 0; t < 3000; t++) begin
      int kind;
      kind = $urandom % 10;
      if (kind < 9) begin
        // few indices (0..3), 4 tags, any word
        a = {11'($urandom % 4), 8'h00, 6'($urandom % 4), 7'($urandom % 32)} & 32'hFFFF_FFFC;
        a[12:5] = 8'($urandom % 4);
        a[31:13] = 19'($urandom % 4);
        if (kind < 4) begin
          d  = $urandom;
          be = 4'($urandom) | 4'b0001;
          exp = ref_word(a);
          for (int b = 0; b < 4; b++) if (be[b]) exp[8*b +: 8] = d[8*b +: 8];
          cpu_access(1'b1, a, d, be, rd, cyc);
          ref_mem[a[31:2]] = exp;
        end else begin
          cpu_access(1'b0, a, 32'h0, 4'h0, rd, cyc);
          chk(rd == ref_word(a), "read data");
        end
        if (cyc == 1) n_hit++; else n_miss++;
        if (cyc > 7) n_wb++;
      end else begin
        logic [7:0] idx;
        logic was_dirty;
        idx = 8'($urandom % 4);
        for (int w = 0; w < 8; w++) l[32*w +: 32] = $urandom;
        @(negedge clk);
        was_dirty = u_tags.valid[idx] && u_tags.dirty[idx] && !u_tags.cfg[idx];
        cfg_access(idx, l, cyc);
        @(negedge clk);
        chk(lines[idx] == l, "configuration stored in line");
        chk(cfg_flags[idx], "cfg flag set");
        if (!was_dirty) begin
          chk(cyc == 1, "clean configuration write takes one cycle");
          n_cfg1++;
        end else n_cfgwb++;
      end
    end
    // a hit completes in the request cycle
    a = 32'h0000_2040;
    cpu_access(1'b0, a, 0, 0, rd, cyc);
    cpu_access(1'b0, a, 0, 0, rd, cyc);
    chk(cyc == 1, "hit latency one cycle");
    chk(rd == ref_word(a), "hit data");
    $display("hits=%0d misses=%0d writebacks=%0d cfg1=%0d cfg_after_wb=%0d mem_writes=%0d",
             n_hit, n_miss, n_wb, n_cfg1, n_cfgwb, u_mem.n_writes);
    chk(n_hit > 0 && n_miss > 0 && n_wb > 0 && n_cfg1 > 0 && n_cfgwb > 0, "all paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
