// vr_select: virtualization registers (VRs) of one FPGA row.
//
// A row keeps up to three configurations in the first three cache lines of
// its group; each of those lines is a VR. A line counts as a configuration
// only while its tag entry carries the configuration flag, so data traffic
// can reclaim it. Every clock cycle the decoder names one VR context, and this
// block hands that configuration to the row, which lets the fabric switch
// between stored configurations from one cycle to the next without any
// configuration-write cycle. `cfg_ok` is low when the named slot is out of
// range or holds no configuration; the row then does not execute.
//
// Purely combinational. Three VRs per row follow the reference design; keeping
// them in the row's own first cache lines is this design's reading of "part of
// the cache lines".
module vr_select
  import dpc_pkg::*;
(
  input  line_t [NUM_VR-1:0] vr_line,   // contents of the row's VR lines
  input  logic  [NUM_VR-1:0] vr_valid,  // configuration flag of each VR line
  input  logic  [VR_BITS-1:0] ctx,      // context named by the decoder
  output row_cfg_t           cfg,
  output logic               cfg_ok
);

  always_comb begin
    cfg    = '0;
    cfg_ok = 1'b0;
    for (int v = 0; v < NUM_VR; v++) begin
      if (ctx == VR_BITS'(v)) begin
        cfg    = row_cfg_t'(vr_line[v][ROW_CFG_BITS-1:0]);
        cfg_ok = vr_valid[v];
      end
    end
  end

endmodule
