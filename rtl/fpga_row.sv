// fpga_row: one FPGA row of the DPC, eight LE + switch-box pairs on one byte.
//
// LE i works on bit i of the row's two operand bytes. The carries ripple from
// LE 0 to LE 7, so with full-adder LUTs the row is an 8-bit adder; with other
// LUT contents it is a byte-wide logic unit, comparator or multiplexer. The
// row carry-in comes from the configuration (0, 1, or the previous row's
// carry out, plain or inverted), which lets two rows form a 16-bit adder. The
// previous row's sum byte and carry out are also offered to the switch boxes,
// so rows configured with different operations can be chained inside a
// single clock cycle.
//
// Interface: `cfg` is the row configuration selected this cycle, `opa`/`opb`
// the operand bytes, `prev_*` the previous row's combinational outputs, `en`
// advances the LE histories. `sum`/`cout` are combinational, `hist` registered.
//
// The reference row has eight LEs and switch boxes under a cache line; the
// byte-slice organisation and the chaining between rows are this design's.
module fpga_row
  import dpc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  row_cfg_t               cfg,
  input  logic [LES_PER_ROW-1:0] opa,
  input  logic [LES_PER_ROW-1:0] opb,
  input  logic [LES_PER_ROW-1:0] prev_sum,
  input  logic                   prev_cout,
  output logic [LES_PER_ROW-1:0] sum,
  output logic                   cout,
  output logic [LES_PER_ROW-1:0] hist
);

  logic row_cin;

  always_comb begin
    unique case (cfg.cin_sel)
      CIN_ZERO:      row_cin = 1'b0;
      CIN_ONE:       row_cin = 1'b1;
      CIN_PREV_COUT: row_cin = prev_cout;
      CIN_PREV_NCO:  row_cin = ~prev_cout;
      default:       row_cin = 1'b0;
    endcase
  end

  for (genvar i = 0; i < LES_PER_ROW; i++) begin : g_le
    logic                  cin;
    logic                  c;
    logic                  s;
    logic                  h;
    logic [LUT_INPUTS-1:0] le_in;

    if (i == 0) begin : g_first
      assign cin = row_cin;
    end else begin : g_chain
      assign cin = g_le[i-1].c;
    end

    switch_box u_sb (
      .src       (cfg.le[i].src),
      .opa_bit   (opa[i]),
      .opb_bit   (opb[i]),
      .carry_in  (cin),
      .own_hist  (h),
      .prev_sum  (prev_sum[i]),
      .prev_shl  ((i == 0) ? 1'b0 : prev_sum[(i == 0) ? 0 : i-1]),
      .prev_cout (prev_cout),
      .le_in     (le_in)
    );

    logic_element u_le (
      .clk       (clk),
      .rst_n     (rst_n),
      .en        (en),
      .din       (le_in),
      .sum_lut   (cfg.le[i].sum_lut),
      .carry_lut (cfg.le[i].carry_lut),
      .out_sel   (cfg.le[i].out_sel),
      .sum       (s),
      .carry     (c),
      .hist_out  (h)
    );

    assign sum[i]  = s;
    assign hist[i] = h;
  end

  assign cout = g_le[LES_PER_ROW-1].c;

endmodule
