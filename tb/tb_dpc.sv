// tb_dpc: end-to-end test of the Dynamically Programmable Cache at its full
// size (16 x 8 fabric, 256 lines of 256 bits), with a main-memory model.
//
//  1. Data-cache use: the CPU writes two 64-byte pixel blocks (C and R) into
//     the 512-byte region of FPGA row 4 and a run-length test row into the
//     region of row 8 (misses, fills, write hits).
//  2. A dirty data line sits in a VR line; the configuration write to it
//     must write the line back first. The other configuration writes are
//     clean and must complete in one cycle.
//  3. Motion-estimation kernel (sum of absolute differences) on rows 4..7,
//     chained in one cycle: row 4 C-R, row 5 absolute value, rows 6/7 a
//     16-bit accumulator in the LE histories. Context 1 of rows 6/7 clears
//     the accumulator, context 0 accumulates: the context switches between
//     instructions. The result is stored into the cache and read by the CPU.
//  4. Run-length kernel on rows 8/9: compare neighbouring pixels along the
//     carry chain, count equal pairs.
//  5. CPU accesses issued in the same cycles as fabric execution.
//  6. Random data-cache traffic that evicts the fabric's result lines
//     (written back, re-read from memory) and reclaims configuration lines.
// Every CPU read is compared with a reference memory; each mechanism is
// counted and must occur at least once.
module tb_dpc;
  import dpc_pkg::*;
  import dpc_cfg_lib::*;

  localparam int N_SAD = 64;
  localparam int N_RLC = 48;

  logic clk = 1'b0, rst_n;
  logic cpu_req, cpu_we, cpu_ack;
  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata;
  logic [3:0]  cpu_be;
  logic ibus_valid, ibus_ready;
  logic [IBUS_BITS-1:0] ibus_data;
  logic mem_req, mem_we, mem_ack;
  logic [26:0] mem_addr;
  line_t mem_wdata, mem_rdata;
  logic [NUM_ROWS-1:0] row_active;

  dpc dut (.*);
  main_memory_model #(.LATENCY(4)) u_mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [logic [29:0]];

  // mechanism counters
  int n_hit = 0, n_fill = 0, n_wb = 0, n_cfg1 = 0, n_cfg_wb = 0, n_ctx_switch = 0;
  int n_chain = 0, n_store = 0, n_forward = 0, n_reclaim = 0, n_concurrent = 0, n_fab_wb = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitors ----------------
  logic [1:0] last_ctx = '0;
  logic       cfg_wait = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (cpu_req && cpu_ack && dut.u_ctl.state == 2'd0) n_hit++;
    if (mem_req && mem_ack && !mem_we) n_fill++;
    if (mem_req && mem_ack && mem_we) begin
      n_wb++;
      if (mem_addr[11:0] == 12'h063 || mem_addr[11:0] == 12'h073) n_fab_wb++;   // result lines of rows 6/7
    end
    if (dut.cfg_req && !dut.cfg_ack) cfg_wait <= 1'b1;
    if (dut.cfg_ack) begin
      if (cfg_wait) n_cfg_wb++; else n_cfg1++;
      cfg_wait <= 1'b0;
    end
    if (dut.exec) begin
      if (dut.exec_ctx != last_ctx) n_ctx_switch++;
      last_ctx <= dut.exec_ctx;
    end
    for (int r = 1; r < NUM_ROWS; r++) if (row_active[r] && row_active[r-1]) n_chain++;
    if (|dut.fab_we) n_store++;
    if (row_active[6] && dut.u_fab.g_row[6].cfg.le[0].src[1] == SRC_OWN_HIST) n_forward++;
    if (dut.u_ctl.state == 2'd2 && mem_ack && dut.tag_rd_cfg) n_reclaim++;
    if (cpu_req && dut.exec) n_concurrent++;
  end

  // ---------------- helpers ----------------
  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] ref_word(logic [31:0] a);
    if (ref_mem.exists(a[31:2])) return ref_mem[a[31:2]];
    return u_mem.init_line(a[31:5])[32*int'(a[4:2]) +: 32];
  endfunction

  task automatic cpu_access(logic we, logic [31:0] a, logic [31:0] d, logic [3:0] be,
                            output logic [31:0] rd);
    @(negedge clk);
    cpu_req = 1'b1; cpu_we = we; cpu_addr = a; cpu_wdata = d; cpu_be = be;
    forever begin
      #4;
      if (cpu_ack) begin rd = cpu_rdata; break; end
      @(negedge clk);
    end
    @(negedge clk);
    cpu_req = 1'b0;
  endtask

  task automatic cpu_write(logic [31:0] a, logic [31:0] d);
    logic [31:0] rd;
    cpu_access(1'b1, a, d, 4'hF, rd);
    ref_mem[a[31:2]] = d;
  endtask

  task automatic cpu_write_byte(logic [31:0] a, logic [7:0] d);
    logic [31:0] rd, w;
    cpu_access(1'b1, a, {4{d}}, 4'(1 << a[1:0]), rd);
    w = ref_word(a);
    w[8*int'(a[1:0]) +: 8] = d;
    ref_mem[a[31:2]] = w;
  endtask

  task automatic cpu_check(logic [31:0] a, string what);
    logic [31:0] rd;
    cpu_access(1'b0, a, 0, 0, rd);
    chk(rd == ref_word(a), what);
  endtask

  // send one instruction; returns the cycles until it was taken
  task automatic ibus_send(logic [IBUS_BITS-1:0] i, output int cycles);
    @(negedge clk);
    ibus_valid = 1'b1; ibus_data = i;
    cycles = 0;
    forever begin
      #4;
      cycles++;
      if (ibus_ready) break;
      @(negedge clk);
    end
    @(negedge clk);
    ibus_valid = 1'b0;
  endtask

  // ---------------- stimulus ----------------
  localparam logic [31:0] ROW4 = 32'h0000_0800, ROW6 = 32'h0000_0C00, ROW7 = 32'h0000_0E00;
  localparam logic [31:0] ROW8 = 32'h0000_1000, ROW9 = 32'h0000_1200, ROW12 = 32'h0000_1800;
  localparam int C_POS = 96, R_POS = 256, RES_POS = 100, PIX_POS = 96;

  logic [7:0] c_pix [N_SAD];
  logic [7:0] r_pix [N_SAD];
  logic [7:0] rl_pix [N_RLC];

  initial begin
    int cyc, sad, eq;
    logic [31:0] rd;
    rst_n = 1'b0; cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; cpu_be = 0;
    ibus_valid = 0; ibus_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. data: pixel blocks for the SAD and the run-length row
    for (int k = 0; k < N_SAD; k++) begin c_pix[k] = 8'($urandom); r_pix[k] = 8'($urandom); end
    for (int k = 0; k < N_SAD; k += 4) begin
      cpu_write(ROW4 + C_POS + k, {c_pix[k+3], c_pix[k+2], c_pix[k+1], c_pix[k]});
      cpu_write(ROW4 + R_POS + k, {r_pix[k+3], r_pix[k+2], r_pix[k+1], r_pix[k]});
    end
    rl_pix[0] = 8'h10;
    for (int k = 1; k < N_RLC; k++)
      rl_pix[k] = ((k % 5 == 0) || (k % 7 == 3)) ? rl_pix[k-1] + 8'(1 + $urandom % 4) : rl_pix[k-1];
    for (int k = 0; k < N_RLC; k++) cpu_write_byte(ROW8 + PIX_POS + k, rl_pix[k]);
    // result words: allocate their lines
    cpu_write(ROW6 + RES_POS, 32'h0);
    cpu_write(ROW7 + RES_POS, 32'h0);
    cpu_write(ROW9 + RES_POS, 32'h0);
    for (int k = 0; k < N_SAD; k += 8) cpu_check(ROW4 + C_POS + k, "pixel read-back");

    // 2. a dirty data line in VR slot 0 of row 4, then configuration writes
    cpu_write(ROW4, 32'hDEAD_BEEF);
    ibus_send(i_cfg(4, 0, with_ops(row_cfg(SRC_OPA, SRC_OPB, F_XNB3, F_MAJNB, CIN_ONE), C_POS, R_POS, 0, 0)), cyc);
    chk(cyc > 1, "configuration over dirty data waits for the write-back");
    chk(u_mem.peek(ROW4[31:5])[31:0] == 32'hDEAD_BEEF, "dirty data written back before configuration");
    ibus_send(i_cfg(5, 0, row_cfg(SRC_PREV_SUM, SRC_PREV_COUT, F_XNB3, F_CNEG_C, CIN_PREV_NCO)), cyc);
    chk(cyc == 1, "configuration write in one cycle");
    ibus_send(i_cfg(6, 0, with_ops(row_cfg(SRC_PREV_SUM, SRC_OWN_HIST, F_XOR3, F_MAJ, CIN_ZERO), 0, 0, RES_POS, 1)), cyc);
    ibus_send(i_cfg(7, 0, with_ops(row_cfg(SRC_ZERO, SRC_OWN_HIST, F_XOR3, F_MAJ, CIN_PREV_COUT), 0, 0, RES_POS, 1)), cyc);
    ibus_send(i_cfg(6, 1, row_cfg(SRC_ZERO, SRC_ZERO, F_ZERO, F_ZERO, CIN_ZERO)), cyc);
    ibus_send(i_cfg(7, 1, row_cfg(SRC_ZERO, SRC_ZERO, F_ZERO, F_ZERO, CIN_ZERO)), cyc);
    chk(cyc == 1, "configuration write in one cycle");
    ibus_send(i_cfg(8, 0, with_ops(row_cfg(SRC_OPA, SRC_OPB, F_ZERO, F_EQCHAIN, CIN_ONE), PIX_POS, PIX_POS + 1, 0, 0)), cyc);
    ibus_send(i_cfg(9, 0, with_ops(row_cfg(SRC_OWN_HIST, SRC_ZERO, F_XOR3, F_MAJ, CIN_PREV_COUT), 0, 0, RES_POS, 1)), cyc);
    ibus_send(i_cfg(9, 1, row_cfg(SRC_ZERO, SRC_ZERO, F_ZERO, F_ZERO, CIN_ZERO)), cyc);
    ibus_send(i_cfg(12, 0, row_cfg(SRC_OPA, SRC_OPB, F_XOR3, F_MAJ, CIN_ZERO)), cyc);
    chk(dut.cfg_flags[4*16] && dut.cfg_flags[12*16], "configuration flags set");

    // 3. SAD: clear (context 1), then N_SAD accumulate steps (context 0)
    ibus_send(i_exec(16'h00C0, 1, 0), cyc);
    for (int k = 0; k < N_SAD; k++) begin
      @(negedge clk);
      ibus_valid = 1'b1; ibus_data = i_exec(16'h00F0, 0, k);
      #4 chk(ibus_ready, "execute taken every cycle");
    end
    @(negedge clk);
    ibus_valid = 1'b0;
    sad = 0;
    for (int k = 0; k < N_SAD; k++) sad += (c_pix[k] > r_pix[k]) ? c_pix[k] - r_pix[k] : r_pix[k] - c_pix[k];
    begin
      logic [31:0] lo, hi;
      cpu_access(1'b0, ROW6 + RES_POS, 0, 0, lo);
      cpu_access(1'b0, ROW7 + RES_POS, 0, 0, hi);
      chk({hi[7:0], lo[7:0]} == 16'(sad), "SAD result");
      $display("SAD over %0d pixels: expected %0d, got %0d", N_SAD, sad, {hi[7:0], lo[7:0]});
      ref_mem[(ROW6 + RES_POS) >> 2] = {24'h0, 8'(sad)};
      ref_mem[(ROW7 + RES_POS) >> 2] = {24'h0, 8'(sad >> 8)};
    end

    // 4. run-length: clear, then compare/count with CPU reads in the same cycles (5.)
    ibus_send(i_exec(16'h0200, 1, 0), cyc);
    fork
      begin
        for (int k = 0; k < N_RLC - 1; k++) begin
          @(negedge clk);
          ibus_valid = 1'b1; ibus_data = i_exec(16'h0300, 0, k);
        end
        @(negedge clk);
        ibus_valid = 1'b0;
      end
      begin
        for (int k = 0; k < 6; k++) cpu_check(ROW4 + C_POS + 4 * k, "read during execution");
      end
    join
    eq = 0;
    for (int k = 0; k < N_RLC - 1; k++) if (rl_pix[k] == rl_pix[k+1]) eq++;
    cpu_access(1'b0, ROW9 + RES_POS, 0, 0, rd);
    chk(rd[7:0] == 8'(eq), "run-length equal-pair count");
    $display("run-length: %0d equal neighbour pairs in %0d pixels (runs %0d), got %0d",
             eq, N_RLC, N_RLC - eq, rd[7:0]);
    ref_mem[(ROW9 + RES_POS) >> 2] = {24'h0, 8'(eq)};

    // 6. conventional traffic: evict result lines, reclaim a configuration line
    cpu_check(ROW12 + 32'h2000, "data access over a configuration line");
    chk(!dut.cfg_flags[12*16], "configuration line reclaimed by data");
    for (int t = 0; t < 600; t++) begin
      logic [31:0] a;
      a = {15'($urandom % 3), 17'h0} | {19'h0, 13'($urandom)};
      a = a & 32'hFFFF_FFFC;
      if ($urandom % 2 == 0) cpu_write(a, $urandom);
      else cpu_check(a, "random traffic read");
    end
    cpu_check(ROW6 + RES_POS, "SAD low byte after eviction");
    cpu_check(ROW7 + RES_POS, "SAD high byte after eviction");
    cpu_check(ROW9 + RES_POS, "RLC result after eviction");

    $display("hits=%0d fills=%0d writebacks=%0d cfg_1cycle=%0d cfg_after_writeback=%0d ctx_switches=%0d",
             n_hit, n_fill, n_wb, n_cfg1, n_cfg_wb, n_ctx_switch);
    $display("chained_row_cycles=%0d fabric_stores=%0d forwarding_cycles=%0d cfg_reclaimed=%0d concurrent=%0d result_writebacks=%0d",
             n_chain, n_store, n_forward, n_reclaim, n_concurrent, n_fab_wb);
    chk(n_hit > 0, "hit happened");
    chk(n_fill > 0, "fill happened");
    chk(n_wb > 0, "write-back happened");
    chk(n_cfg1 > 0, "one-cycle configuration write happened");
    chk(n_cfg_wb > 0, "configuration after write-back happened");
    chk(n_ctx_switch > 0, "context switch happened");
    chk(n_chain > 0, "row chaining happened");
    chk(n_store > 0, "fabric store happened");
    chk(n_forward > 0, "history forwarding happened");
    chk(n_reclaim > 0, "configuration reclaimed happened");
    chk(n_concurrent > 0, "concurrent cache and fabric use happened");
    chk(n_fab_wb > 0, "fabric result written back happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
