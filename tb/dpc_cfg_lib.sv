// dpc_cfg_lib: testbench helpers that build FPGA row configurations.
// LUT contents are derived from a named 3-input function f(x, y, z), where
// x, y, z are the LE inputs chosen by switch-box sources 0, 1, 2.
package dpc_cfg_lib;
  import dpc_pkg::*;

  typedef enum {
    F_ZERO,      // 0
    F_XOR3,      // x ^ y ^ z            (adder sum)
    F_MAJ,       // majority             (adder carry)
    F_XNB3,      // x ^ ~y ^ z           (subtract / conditional negate sum)
    F_MAJNB,     // majority(x, ~y, z)   (subtract carry)
    F_AND,       // x & y
    F_PASSX,     // x
    F_EQCHAIN,   // z & (x == y)         (equality along the carry chain)
    F_CNEG_C     // (x ^ ~y) & z         (conditional negate carry)
  } fn_e;

  function automatic logic [7:0] lut(fn_e f);
    logic [7:0] l;
    for (int i = 0; i < 8; i++) begin
      logic x, y, z;
      {z, y, x} = 3'(i);
      case (f)
        F_XOR3:    l[i] = x ^ y ^ z;
        F_MAJ:     l[i] = (x & y) | (x & z) | (y & z);
        F_XNB3:    l[i] = x ^ ~y ^ z;
        F_MAJNB:   l[i] = (x & ~y) | (x & z) | (~y & z);
        F_AND:     l[i] = x & y;
        F_PASSX:   l[i] = x;
        F_EQCHAIN: l[i] = z & (x ~^ y);
        F_CNEG_C:  l[i] = (x ^ ~y) & z;
        default:   l[i] = 1'b0;
      endcase
    end
    return l;
  endfunction

  // All eight LEs alike; source 2 is the carry chain unless given.
  function automatic row_cfg_t row_cfg(sb_src_e sx, sb_src_e sy, fn_e fs, fn_e fc,
                                       cin_sel_e cs, sb_src_e sz = SRC_CARRY);
    row_cfg_t c = '0;
    for (int i = 0; i < LES_PER_ROW; i++) begin
      c.le[i].src       = {sz, sy, sx};
      c.le[i].sum_lut   = lut(fs);
      c.le[i].carry_lut = lut(fc);
      c.le[i].out_sel   = 2'd0;
    end
    c.cin_sel = cs;
    return c;
  endfunction

  function automatic row_cfg_t with_ops(row_cfg_t c, int a_pos, int b_pos, int d_pos, bit store);
    c.opa      = pos_t'(POS_BITS'(a_pos));
    c.opb      = pos_t'(POS_BITS'(b_pos));
    c.dst      = pos_t'(POS_BITS'(d_pos));
    c.store_en = store;
    return c;
  endfunction

  // Instruction words for the I-cache bus.
  function automatic logic [IBUS_BITS-1:0] i_exec(logic [NUM_ROWS-1:0] rows, int ctx, int offset);
    logic [IBUS_BITS-1:0] i = '0;
    i[255:254] = OP_EXEC;
    i[15:0]    = rows;
    i[17:16]   = 2'(ctx);
    i[26:18]   = 9'(offset);
    return i;
  endfunction

  function automatic logic [IBUS_BITS-1:0] i_cfg(int row, int slot, row_cfg_t c);
    logic [IBUS_BITS-1:0] i = '0;
    i[255:254] = OP_CFG;
    i[253:250] = 4'(row);
    i[249:248] = 2'(slot);
    i[ROW_CFG_BITS-1:0] = c;
    return i;
  endfunction
endpackage
