// logic_element: one logical element (LE) of the DPC FPGA fabric.
//
// Two SRAM look-up tables, one producing `sum` and one producing `carry`, are
// addressed by the same three data inputs (the LUT output mux of each table is
// the read of one SRAM bit). The LUT contents are the "function" part of the
// configuration, so the LE can be an AND, OR, XOR, full adder, comparator
// slice or any other 3-input function. Behind the sum output sits a chain of
// four flip-flops that keep the results of the last four executed cycles for
// data forwarding; an output-select mux picks one of them as `hist_out`.
//
// Timing: `sum` and `carry` are combinational in `din`. When `en` is high the
// history shifts at the rising clock edge: f[0] <= sum, f[k] <= f[k-1]. With
// out_sel = k, `hist_out` is the sum computed k+1 executed cycles ago.
// Reset (active low, synchronous to clk) clears the history.
//
// Follows the reference LE (two SRAM-LUTs, muxes, four result flops, output
// select). The number of LUT inputs (3) and that the history only advances on
// executed cycles are this design's choices.
module logic_element
  import dpc_pkg::*;
#(
  parameter int unsigned N_IN  = LUT_INPUTS,
  parameter int unsigned DEPTH = HIST_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,          // this cycle is executed by the row
  input  logic [N_IN-1:0]          din,         // data inputs from the switch box
  input  logic [(1<<N_IN)-1:0]     sum_lut,     // SRAM contents of the sum LUT
  input  logic [(1<<N_IN)-1:0]     carry_lut,   // SRAM contents of the carry LUT
  input  logic [$clog2(DEPTH)-1:0] out_sel,     // history flop shown on hist_out
  output logic                     sum,
  output logic                     carry,
  output logic                     hist_out
);

  logic [DEPTH-1:0] hist;

  always_comb begin
    sum   = sum_lut[din];
    carry = carry_lut[din];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  hist <= '0;
    else if (en) hist <= {hist[DEPTH-2:0], sum};
  end

  assign hist_out = hist[out_sel];

endmodule
