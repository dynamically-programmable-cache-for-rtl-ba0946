// tb_workloads: the two evaluated kernels that map onto the fabric, run at
// the largest parallelism the 16-row fabric holds, on the full-size DPC.
//
//  Motion estimation: 4 SAD units in parallel (rows 4u..4u+3), each on an
//  8 x 8 macroblock pair (64 pixels) held in the first row's block. One clear
//  (context 1) then 64 execute cycles, one pixel pair per unit per cycle.
//  Run-length coding: the fabric is reconfigured in place for 7 compare-and-
//  count routines (rows 2k, 2k+1), each over a 200-pixel run of one image
//  row. One clear then 199 execute cycles.
//  Virtualization: one SAD unit on rows 0..3 processes MB_SEQ macroblocks in
//  sequence, once with the accumulator clear held in a second VR (context
//  switch, no reconfiguration) and once with a single VR per row, where the
//  clear and accumulate configurations have to be rewritten for every block.
//  Both give the same SADs; the cycle counts are checked exactly.
// Results are read back through the CPU port and compared with sums worked
// out in the testbench; the execute phase must take exactly one cycle per
// step, and each configuration write one cycle.
module tb_workloads;
  import dpc_pkg::*;
  import dpc_cfg_lib::*;

  localparam int ME_UNITS = 4, ME_PIX = 64;
  localparam int RLC_UNITS = 7, RLC_PIX = 200;
  localparam int MB_SEQ = 3;
  localparam int C_POS = 96, R_POS = 256, RES_POS = 100, PIX_POS = 96;

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
  int cycle = 0;      // all cycles
  int busy = 0;       // cycles with an instruction on the I-cache bus
  always @(posedge clk) begin
    cycle++;
    if (ibus_valid) busy++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic cpu_access(logic we, logic [31:0] a, logic [31:0] d, output logic [31:0] rd);
    @(negedge clk);
    cpu_req = 1'b1; cpu_we = we; cpu_addr = a; cpu_wdata = d; cpu_be = 4'hF;
    forever begin
      #4;
      if (cpu_ack) begin rd = cpu_rdata; break; end
      @(negedge clk);
    end
    @(negedge clk);
    cpu_req = 1'b0;
  endtask

  task automatic cfg(int row, int slot, row_cfg_t c);
    int cycles;
    @(negedge clk);
    ibus_valid = 1'b1; ibus_data = i_cfg(row, slot, c);
    cycles = 0;
    forever begin
      #4;
      cycles++;
      if (ibus_ready) break;
      @(negedge clk);
    end
    chk(cycles == 1, "configuration write takes one cycle");
    @(negedge clk);
    ibus_valid = 1'b0;
  endtask

  task automatic load_block(int u, int blk);
    logic [31:0] rd;
    for (int k = 0; k < ME_PIX; k += 4) begin
      cpu_access(1'b1, rowbase(4*u) + C_POS + k,
                 {c_pix[blk][k+3], c_pix[blk][k+2], c_pix[blk][k+1], c_pix[blk][k]}, rd);
      cpu_access(1'b1, rowbase(4*u) + R_POS + k,
                 {r_pix[blk][k+3], r_pix[blk][k+2], r_pix[blk][k+1], r_pix[blk][k]}, rd);
    end
  endtask

  function automatic int sad_of(int blk);
    int s;
    s = 0;
    for (int k = 0; k < ME_PIX; k++)
      s += (c_pix[blk][k] > r_pix[blk][k]) ? c_pix[blk][k] - r_pix[blk][k] : r_pix[blk][k] - c_pix[blk][k];
    return s;
  endfunction

  task automatic read_sad(int u, output int v);
    logic [31:0] lo, hi;
    cpu_access(1'b0, rowbase(4*u+2) + RES_POS, 0, lo);
    cpu_access(1'b0, rowbase(4*u+3) + RES_POS, 0, hi);
    v = int'({hi[7:0], lo[7:0]});
  endtask

  // issue `steps` back-to-back executes; returns the cycles they took
  task automatic exec_run(logic [15:0] rows, int ctx, int steps, output int cycles);
    int start;
    @(negedge clk);
    start = cycle;
    for (int k = 0; k < steps; k++) begin
      ibus_valid = 1'b1; ibus_data = i_exec(rows, ctx, k);
      #4 chk(ibus_ready && row_active == rows, "all masked rows execute");
      @(negedge clk);
    end
    ibus_valid = 1'b0;
    cycles = cycle - start;
  endtask

  function automatic logic [31:0] rowbase(int r);
    return 32'(r * 512);
  endfunction

  logic [7:0] c_pix [ME_UNITS][ME_PIX];
  logic [7:0] r_pix [ME_UNITS][ME_PIX];
  logic [7:0] l_pix [RLC_UNITS][RLC_PIX];

  initial begin
    logic [31:0] rd, lo, hi;
    int cycles;
    rst_n = 1'b0; cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; cpu_be = 0;
    ibus_valid = 0; ibus_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------------- motion estimation ----------------
    for (int u = 0; u < ME_UNITS; u++) begin
      for (int k = 0; k < ME_PIX; k++) begin
        c_pix[u][k] = 8'($urandom);
        r_pix[u][k] = 8'(int'(c_pix[u][k]) + int'($urandom % 41) - 20);  // a nearby block
      end
      for (int k = 0; k < ME_PIX; k += 4) begin
        cpu_access(1'b1, rowbase(4*u) + C_POS + k, {c_pix[u][k+3], c_pix[u][k+2], c_pix[u][k+1], c_pix[u][k]}, rd);
        cpu_access(1'b1, rowbase(4*u) + R_POS + k, {r_pix[u][k+3], r_pix[u][k+2], r_pix[u][k+1], r_pix[u][k]}, rd);
      end
      cpu_access(1'b1, rowbase(4*u+2) + RES_POS, 32'h0, rd);
      cpu_access(1'b1, rowbase(4*u+3) + RES_POS, 32'h0, rd);
      cfg(4*u,   0, with_ops(row_cfg(SRC_OPA, SRC_OPB, F_XNB3, F_MAJNB, CIN_ONE), C_POS, R_POS, 0, 0));
      cfg(4*u+1, 0, row_cfg(SRC_PREV_SUM, SRC_PREV_COUT, F_XNB3, F_CNEG_C, CIN_PREV_NCO));
      cfg(4*u+2, 0, with_ops(row_cfg(SRC_PREV_SUM, SRC_OWN_HIST, F_XOR3, F_MAJ, CIN_ZERO), 0, 0, RES_POS, 1));
      cfg(4*u+3, 0, with_ops(row_cfg(SRC_ZERO, SRC_OWN_HIST, F_XOR3, F_MAJ, CIN_PREV_COUT), 0, 0, RES_POS, 1));
      cfg(4*u+2, 1, row_cfg(SRC_ZERO, SRC_ZERO, F_ZERO, F_ZERO, CIN_ZERO));
      cfg(4*u+3, 1, row_cfg(SRC_ZERO, SRC_ZERO, F_ZERO, F_ZERO, CIN_ZERO));
    end
    exec_run(16'hCCCC, 1, 1, cycles);
    exec_run(16'hFFFF, 0, ME_PIX, cycles);
    chk(cycles == ME_PIX, "one pixel pair per unit per cycle");
    $display("motion estimation: %0d units x %0d pixels in %0d execute cycles", ME_UNITS, ME_PIX, cycles);
    for (int u = 0; u < ME_UNITS; u++) begin
      int sad;
      sad = 0;
      for (int k = 0; k < ME_PIX; k++)
        sad += (c_pix[u][k] > r_pix[u][k]) ? c_pix[u][k] - r_pix[u][k] : r_pix[u][k] - c_pix[u][k];
      cpu_access(1'b0, rowbase(4*u+2) + RES_POS, 0, lo);
      cpu_access(1'b0, rowbase(4*u+3) + RES_POS, 0, hi);
      chk({hi[7:0], lo[7:0]} == 16'(sad), "SAD of a unit");
      $display("  unit %0d: SAD %0d (expected %0d)", u, {hi[7:0], lo[7:0]}, sad);
    end

    // ---------------- run-length coding ----------------
    for (int u = 0; u < RLC_UNITS; u++) begin
      l_pix[u][0] = 8'($urandom);
      for (int k = 1; k < RLC_PIX; k++)
        l_pix[u][k] = ($urandom % 4 == 0) ? l_pix[u][k-1] + 8'(1 + $urandom % 3) : l_pix[u][k-1];
      for (int k = 0; k < RLC_PIX; k += 4)
        cpu_access(1'b1, rowbase(2*u) + PIX_POS + k, {l_pix[u][k+3], l_pix[u][k+2], l_pix[u][k+1], l_pix[u][k]}, rd);
      cpu_access(1'b1, rowbase(2*u+1) + RES_POS, 32'h0, rd);
      cfg(2*u,   0, with_ops(row_cfg(SRC_OPA, SRC_OPB, F_ZERO, F_EQCHAIN, CIN_ONE), PIX_POS, PIX_POS + 1, 0, 0));
      cfg(2*u+1, 0, with_ops(row_cfg(SRC_OWN_HIST, SRC_ZERO, F_XOR3, F_MAJ, CIN_PREV_COUT), 0, 0, RES_POS, 1));
      cfg(2*u+1, 1, row_cfg(SRC_ZERO, SRC_ZERO, F_ZERO, F_ZERO, CIN_ZERO));
    end
    exec_run(16'h2AAA, 1, 1, cycles);
    exec_run(16'h3FFF, 0, RLC_PIX - 1, cycles);
    chk(cycles == RLC_PIX - 1, "one pixel pair per routine per cycle");
    $display("run-length: %0d routines x %0d pixels in %0d execute cycles", RLC_UNITS, RLC_PIX, cycles);
    for (int u = 0; u < RLC_UNITS; u++) begin
      int eq;
      eq = 0;
      for (int k = 0; k < RLC_PIX - 1; k++) if (l_pix[u][k] == l_pix[u][k+1]) eq++;
      cpu_access(1'b0, rowbase(2*u+1) + RES_POS, 0, rd);
      chk(rd[7:0] == 8'(eq), "equal-pair count of a routine");
      $display("  routine %0d: %0d runs (%0d equal pairs, got %0d)", u, RLC_PIX - eq, eq, rd[7:0]);
    end

    // ---------------- virtualized vs single-VR operation ----------------
    begin
      row_cfg_t acc_lo, acc_hi, clr;
      int t_virt, t_single, start, v;
      acc_lo = with_ops(row_cfg(SRC_PREV_SUM, SRC_OWN_HIST, F_XOR3, F_MAJ, CIN_ZERO), 0, 0, RES_POS, 1);
      acc_hi = with_ops(row_cfg(SRC_ZERO, SRC_OWN_HIST, F_XOR3, F_MAJ, CIN_PREV_COUT), 0, 0, RES_POS, 1);
      clr    = row_cfg(SRC_ZERO, SRC_ZERO, F_ZERO, F_ZERO, CIN_ZERO);
      cfg(0, 0, with_ops(row_cfg(SRC_OPA, SRC_OPB, F_XNB3, F_MAJNB, CIN_ONE), C_POS, R_POS, 0, 0));
      cfg(1, 0, row_cfg(SRC_PREV_SUM, SRC_PREV_COUT, F_XNB3, F_CNEG_C, CIN_PREV_NCO));
      cfg(2, 0, acc_lo);
      cfg(3, 0, acc_hi);
      cfg(2, 1, clr);
      cfg(3, 1, clr);
      // virtualized: clear by switching to context 1
      t_virt = 0;
      for (int b = 0; b < MB_SEQ; b++) begin
        load_block(0, b);
        start = busy;
        exec_run(16'h000C, 1, 1, cycles);
        exec_run(16'h000F, 0, ME_PIX, cycles);
        t_virt += busy - start;
        read_sad(0, v);
        chk(v == sad_of(b), "virtualized SAD");
      end
      // single VR: the clear and the accumulate configuration share slot 0
      t_single = 0;
      for (int b = 0; b < MB_SEQ; b++) begin
        load_block(0, b);
        start = busy;
        cfg(2, 0, clr);
        cfg(3, 0, clr);
        exec_run(16'h000C, 0, 1, cycles);
        cfg(2, 0, acc_lo);
        cfg(3, 0, acc_hi);
        exec_run(16'h000F, 0, ME_PIX, cycles);
        t_single += busy - start;
        read_sad(0, v);
        chk(v == sad_of(b), "single-VR SAD");
      end
      $display("%0d macroblocks: %0d instruction cycles with virtualization registers, %0d with one VR",
               MB_SEQ, t_virt, t_single);
      // each instruction (execute or configuration write) occupies the bus one cycle:
      // per block 1 clear + 64 accumulate, plus 4 configuration writes with one VR
      chk(t_virt == MB_SEQ * (1 + ME_PIX), "virtualized cycle count");
      chk(t_single == MB_SEQ * (4 + 1 + ME_PIX), "single-VR cycle count");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
