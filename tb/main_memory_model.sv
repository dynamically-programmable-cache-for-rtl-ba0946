// main_memory_model: behavioural model of the main memory behind the DPC
// (testbench only). One 256-bit line per transfer: a request held on
// mem_req is acknowledged after LATENCY cycles; read data comes with mem_ack.
// Lines never written read as init_line(address), a fixed pattern the
// testbenches can recompute. Counts reads and writes for the testbenches.
module main_memory_model
  import dpc_pkg::*;
#(
  parameter int unsigned LATENCY = 3
) (
  input  logic                             clk,
  input  logic                             mem_req,
  input  logic                             mem_we,
  input  logic [ADDR_BITS-OFFSET_BITS-1:0] mem_addr,
  input  line_t                            mem_wdata,
  output line_t                            mem_rdata,
  output logic                             mem_ack
);

  line_t store [logic [ADDR_BITS-OFFSET_BITS-1:0]];
  int    wait_cnt = 0;
  int    n_reads = 0, n_writes = 0;

  function automatic line_t init_line(logic [ADDR_BITS-OFFSET_BITS-1:0] a);
    line_t l;
    for (int w = 0; w < LINE_BITS/32; w++) l[32*w +: 32] = {a[23:0], 8'(w)} ^ 32'h5a5a_0000;
    return l;
  endfunction

  function automatic line_t peek(logic [ADDR_BITS-OFFSET_BITS-1:0] a);
    return store.exists(a) ? store[a] : init_line(a);
  endfunction

  initial begin
    mem_ack   = 1'b0;
    mem_rdata = '0;
  end

  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (wait_cnt == int'(LATENCY) - 1) begin
        wait_cnt <= 0;
        mem_ack  <= 1'b1;
        if (mem_we) begin
          store[mem_addr] = mem_wdata;
          n_writes++;
        end else begin
          mem_rdata <= peek(mem_addr);
          n_reads++;
        end
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end
  end

endmodule
