// addr_remap: reconfigurable bit-shuffle unit that forwards accesses to the
// new location of data moved by a layout transform.
//
// A transform of a power-of-two sized matrix or cube is a permutation of the
// index fields of the element address, so the remapping is a bit shuffle:
//   transpose  [row:ly][col:lx]                 -> [col:lx][row:ly]
//   blocking   [bi:ly-lk][qi:lk][bj:lx-lk][qj:lk] -> [bi][bj][qi][qj]
//   rot z-x-y  [z:lz][y:ly][x:lx]                -> [y][x][z]
//   rot y-x-z  [z:lz][y:ly][x:lx]                -> [z][x][y]
// The transpose and blocking shuffles are the ones of the HAMLeT remapping
// figure; the two rotations follow the same rule for the cube layouts.
// The field widths are run-time values (the configuration), so each field is
// cut out with shifts and masks rather than fixed wiring.
//
// Bits above the transformed region select the region: an address whose
// upper bits equal those of cfg_src hits, and its upper bits are replaced by
// those of cfg_dst (the two are equal for an in-place view, where the upper
// bits pass straight through as in the figure). Both bases must be aligned to
// the region size. Addresses that miss, or any address while cfg_valid is
// low, pass through unchanged.
//
// Purely combinational: addr_o is valid in the same cycle as addr_i.
module addr_remap
  import hamlet_pkg::*;
(
  input  logic  cfg_valid,
  input  op_e   cfg_op,
  input  addr_t cfg_src,
  input  addr_t cfg_dst,
  input  lsz_t  cfg_lx,
  input  lsz_t  cfg_ly,
  input  lsz_t  cfg_lz,
  input  addr_t addr_i,
  output addr_t addr_o,
  output logic  hit_o
);

  function automatic addr_t field(input addr_t a, input int unsigned lsb, input int unsigned w);
    addr_t m = (w >= ADDR_W) ? '1 : ((addr_t'(1) << w) - 1);
    return (a >> lsb) & m;
  endfunction

  int unsigned lx, ly, lz, tot;
  addr_t       off, perm, hi_mask;

  always_comb begin
    lx  = int'(cfg_lx);
    ly  = int'(cfg_ly);
    lz  = (cfg_op == OP_ROT_ZXY || cfg_op == OP_ROT_YXZ) ? int'(cfg_lz) : 0;
    tot = lx + ly + lz;
    hi_mask = (tot >= ADDR_W) ? '0 : ~((addr_t'(1) << tot) - 1);
    off  = addr_i & ~hi_mask;
    perm = off;
    unique case (cfg_op)
      OP_TRANSPOSE:
        perm = (field(off, 0, lx) << ly) | field(off, lx, ly);
      OP_BLOCK: begin
        // qj = off[lk-1:0], bj = next lx-lk, qi = next lk, bi = top ly-lk
        perm = (field(off, lx + LOG_K, ly - LOG_K) << (lx + LOG_K))   // bi
             | (field(off, LOG_K, lx - LOG_K)       << (2 * LOG_K))   // bj
             | (field(off, lx, LOG_K)               << LOG_K)         // qi
             |  field(off, 0, LOG_K);                                 // qj
      end
      OP_ROT_ZXY:
        perm = (field(off, lx, ly) << (lx + lz))
             | (field(off, 0, lx)  << lz)
             |  field(off, lx + ly, lz);
      OP_ROT_YXZ:
        perm = (field(off, lx + ly, lz) << (lx + ly))
             | (field(off, 0, lx)       << ly)
             |  field(off, lx, ly);
      default: perm = off;
    endcase
    hit_o  = cfg_valid && ((addr_i & hi_mask) == (cfg_src & hi_mask));
    addr_o = hit_o ? ((cfg_dst & hi_mask) | perm) : addr_i;
  end

endmodule
