// tb_addr_remap: checks the bit-shuffle remapping unit against index
// arithmetic. For random region sizes of each operation, random element
// coordinates are turned into a source address, and the unit's output must
// equal the destination address computed from the coordinates of the target
// layout (row-major -> column-major, blocked, z-x-y and y-x-z orders).
// Addresses outside the region, and any address while the configuration is
// not valid, must pass through unchanged. The unit is combinational.
module tb_addr_remap;
  import hamlet_pkg::*;

  int unsigned checks = 0, failures = 0;

  logic  cfg_valid, hit_o;
  op_e   cfg_op;
  addr_t cfg_src, cfg_dst, addr_i, addr_o;
  lsz_t  cfg_lx, cfg_ly, cfg_lz;

  addr_remap dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input addr_t got, input addr_t want, input logic hit, input logic want_hit, input string what);
    checks++;
    if (got !== want || hit !== want_hit) begin
      failures++;
      if (failures < 10) $display("%s: got %h hit %b, want %h hit %b", what, got, hit, want, want_hit);
    end
  endtask

  initial begin
    cfg_valid = 1'b0; cfg_op = OP_TRANSPOSE; cfg_src = '0; cfg_dst = '0;
    cfg_lx = '0; cfg_ly = '0; cfg_lz = '0; addr_i = '0;
    for (int n = 0; n < 4000; n++) begin
      op_e op;
      int unsigned lx, ly, lz, tot;
      addr_t nx, ny, nz, x, y, z, s, d;
      op = op_e'(n % 4);
      lx = LOG_K + $urandom % 6;        // 16 .. 512
      ly = LOG_K + $urandom % 6;
      lz = (op == OP_ROT_ZXY || op == OP_ROT_YXZ) ? 1 + $urandom % 6 : 0;
      tot = lx + ly + lz;
      nx = addr_t'(1) << lx; ny = addr_t'(1) << ly; nz = addr_t'(1) << lz;
      cfg_op = op; cfg_lx = lsz_t'(lx); cfg_ly = lsz_t'(ly); cfg_lz = lsz_t'($urandom % 7);
      if (lz != 0) cfg_lz = lsz_t'(lz);
      cfg_src = addr_t'($urandom % 16 + 1) << 24;
      cfg_dst = (n % 8 == 0) ? cfg_src : addr_t'($urandom % 16 + 32) << 24;
      cfg_valid = 1'b1;
      x = addr_t'($urandom) % nx; y = addr_t'($urandom) % ny; z = addr_t'($urandom) % nz;
      s = cfg_src + (z * ny + y) * nx + x;
      case (op)
        OP_TRANSPOSE: d = x * ny + y;
        OP_BLOCK:     d = (((y / K) * (nx / K) + x / K) * K + y % K) * K + x % K;
        OP_ROT_ZXY:   d = (y * nx + x) * nz + z;
        default:      d = (z * nx + x) * ny + y;
      endcase
      addr_i = s;
      #1 expect_eq(addr_o, cfg_dst + d, hit_o, 1'b1, op.name());
      // just past the region
      addr_i = cfg_src + (addr_t'(1) << tot) + addr_t'($urandom % 64);
      #1 expect_eq(addr_o, addr_i, hit_o, 1'b0, "outside");
      // unconfigured
      cfg_valid = 1'b0;
      addr_i = s;
      #1 expect_eq(addr_o, s, hit_o, 1'b0, "not valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
