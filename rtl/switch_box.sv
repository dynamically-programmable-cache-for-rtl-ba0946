// switch_box: programmable routing in front of one logical element.
//
// Each of the LE's three data inputs is taken, under configuration, from one
// of eight sources (see dpc_pkg::sb_src_e): constant zero, bit i of either
// operand byte read from the row's cache lines, the carry of the LE to the
// left (ripple chain), this LE's own forwarded history, the previous row's sum
// bit i or i-1 (rows chained in one cycle, or chained with a shift), or the
// previous row's carry out. Purely combinational.
//
// The reference design names the switch box as the routing between LEs and
// the cache line; the source list is this design's own choice.
module switch_box
  import dpc_pkg::*;
(
  input  sb_src_e [LUT_INPUTS-1:0] src,
  input  logic                     opa_bit,
  input  logic                     opb_bit,
  input  logic                     carry_in,
  input  logic                     own_hist,
  input  logic                     prev_sum,
  input  logic                     prev_shl,
  input  logic                     prev_cout,
  output logic [LUT_INPUTS-1:0]    le_in
);

  always_comb begin
    for (int k = 0; k < LUT_INPUTS; k++) begin
      unique case (src[k])
        SRC_ZERO:      le_in[k] = 1'b0;
        SRC_OPA:       le_in[k] = opa_bit;
        SRC_OPB:       le_in[k] = opb_bit;
        SRC_CARRY:     le_in[k] = carry_in;
        SRC_OWN_HIST:  le_in[k] = own_hist;
        SRC_PREV_SUM:  le_in[k] = prev_sum;
        SRC_PREV_SHL:  le_in[k] = prev_shl;
        SRC_PREV_COUT: le_in[k] = prev_cout;
        default:       le_in[k] = 1'b0;
      endcase
    end
  end

endmodule
