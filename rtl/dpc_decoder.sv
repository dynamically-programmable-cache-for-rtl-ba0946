// dpc_decoder: DPC instruction decoder on the I-cache bus.
//
// Every cycle the decoder may receive one instruction (valid/ready handshake)
// and turns it into one of:
//   OP_EXEC - an execute command for the FPGA fabric: which rows run, which
//             virtualization-register context they use, and a byte-position
//             offset added to the rows' operand addresses (so one stored
//             configuration can walk through the data in its lines);
//   OP_CFG  - a configuration write: a row configuration carried by the
//             instruction is written into VR slot `slot` of row `row`, i.e.
//             into cache line vr_line_index(row, slot);
//   OP_NOP  - nothing.
// An execute is taken in the cycle it is presented. A configuration write is
// handed to the cache controller and taken when the controller acknowledges
// it, which is the same cycle unless a dirty line has to be written back
// first. A configuration write naming a slot beyond the third is dropped.
//
// Combinational. The reference design has the decoder take instructions from
// the I-cache bus every cycle and drive configuration bits into the array; the
// instruction encoding (dpc_pkg) is this design's own.
module dpc_decoder
  import dpc_pkg::*;
(
  input  logic                  ibus_valid,
  input  logic [IBUS_BITS-1:0]  ibus_data,
  output logic                  ibus_ready,
  // fabric execute command
  output logic                  exec,
  output logic [VR_BITS-1:0]    exec_ctx,
  output logic [NUM_ROWS-1:0]   exec_rows,
  output logic [POS_BITS-1:0]   exec_offset,
  // configuration write towards the cache controller
  output logic                  cfg_req,
  output logic [INDEX_BITS-1:0] cfg_index,
  output line_t                 cfg_line,
  input  logic                  cfg_ack
);

  op_e                op;
  logic [ROW_BITS-1:0] row;
  logic [VR_BITS-1:0]  slot;
  logic                slot_ok;

  always_comb begin
    op      = op_e'(ibus_data[IBUS_BITS-1 -: 2]);
    row     = ibus_data[IBUS_BITS-3 -: ROW_BITS];
    slot    = ibus_data[IBUS_BITS-3-ROW_BITS -: VR_BITS];
    slot_ok = (slot < VR_BITS'(NUM_VR));

    exec        = ibus_valid && (op == OP_EXEC);
    exec_rows   = ibus_data[NUM_ROWS-1:0];
    exec_ctx    = ibus_data[NUM_ROWS +: VR_BITS];
    exec_offset = ibus_data[NUM_ROWS+VR_BITS +: POS_BITS];

    cfg_req   = ibus_valid && (op == OP_CFG) && slot_ok;
    cfg_index = vr_line_index(row, slot);
    cfg_line  = line_t'(ibus_data[ROW_CFG_BITS-1:0]);

    ibus_ready = cfg_req ? cfg_ack : 1'b1;
  end

endmodule
