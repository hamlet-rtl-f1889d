// tb_hamlet_top: end-to-end test of the accelerator at its default sizes
// (R = 256-element pages, 8 vaults, 4 layers), against the behavioural DRAM
// model.
//
// It runs one command of each kind: a 256 x 512 matrix transpose, blocking of
// a 32 x 512 matrix into 16 x 16 blocks, and the two cube rotations
// (x-y-z -> z-x-y on 256 x 2 x 256, x-y-z -> y-x-z on 256 x 256 x 2). Each
// command covers two or more tiles, so the double buffering is exercised.
// Source elements hold a hash of their address; after done, every destination
// element is compared with the value the index arithmetic of the layout says
// belongs there. Then host addresses inside and outside the transformed
// region are sent through the remapping port and checked.
//
// Mechanisms counted (each must occur): fill-crossbar conflicts, write-back
// stalls, request back-pressure, fill waiting for a bank, fill and drain in
// the same cycle, diagonal and plain SRAM storage, remap hits and misses.
module tb_hamlet_top;
  import hamlet_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  logic                  cmd_valid, cmd_ready, busy, done;
  cmd_t                  cmd;
  logic [N_VAULT-1:0]    rq_valid, rq_ready, rd_valid, rd_ready, wr_valid, wr_ready;
  rdreq_t [N_VAULT-1:0]  rq;
  rdbeat_t [N_VAULT-1:0] rd;
  wrbeat_t [N_VAULT-1:0] wr;
  addr_t                 host_addr_i, host_addr_o;
  logic                  host_hit_o;

  hamlet_top u_top (.*);

  dram_model #(.STALL_PCT(10)) u_dram (
    .clk, .rst_n, .rq_valid, .rq_ready, .rq, .rd_valid, .rd_ready, .rd,
    .wr_valid, .wr_ready, .wr
  );

  // ---------------------------------------------------------- mechanism counters
  int unsigned n_fill_conflict = 0, n_wb_stall = 0, n_rq_bp = 0, n_bank_wait = 0;
  int unsigned n_overlap = 0, n_skew = 0, n_plain = 0, n_remap_hit = 0, n_remap_miss = 0;
  longint unsigned n_rd_beats = 0, n_wr_beats = 0;

  always_ff @(posedge clk) if (rst_n) begin
    if ((rd_valid & ~rd_ready) != '0)                         n_fill_conflict++;
    if ((u_top.dx_valid & ~u_top.dx_ready) != '0)            n_wb_stall++;
    if (u_top.c_rq_valid && !u_top.c_rq_ready)               n_rq_bp++;
    if (u_top.u_ctrl.f_st == 2'd1 && u_top.u_ctrl.h_st[u_top.u_ctrl.f_half] != 2'd0) n_bank_wait++;
    if (u_top.fw_fire != '0 && u_top.dr_en != '0)           n_overlap++;
    n_rd_beats <= n_rd_beats + $countones(rd_valid & rd_ready);
    n_wr_beats <= n_wr_beats + $countones(wr_valid & wr_ready);
  end

  // ---------------------------------------------------------- watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- helpers
  function automatic elem_t val(input addr_t a, input int unsigned seed);
    logic [63:0] h;
    h = (64'(a) + 64'(seed)) * 64'h9E37_79B9_7F4A_7C15;
    return elem_t'(h[63:32] ^ h[31:0]);
  endfunction

  // Destination offset of the source element at (z, y, x) for each operation.
  function automatic addr_t dst_off(input op_e op, input int unsigned lx, input int unsigned ly,
                                    input int unsigned lz, input addr_t z, input addr_t y, input addr_t x);
    addr_t nx = addr_t'(1) << lx, ny = addr_t'(1) << ly, nz = addr_t'(1) << lz;
    case (op)
      OP_TRANSPOSE: return x * ny + y;
      OP_BLOCK:     return (((y / K) * (nx / K) + x / K) * K + y % K) * K + x % K;
      OP_ROT_ZXY:   return (y * nx + x) * nz + z;
      default:      return (z * nx + x) * ny + y;
    endcase
  endfunction

  task automatic run(input op_e op, input addr_t src, input addr_t dst,
                     input int unsigned lx, input int unsigned ly, input int unsigned lz,
                     input int unsigned seed);
    addr_t nx = addr_t'(1) << lx, ny = addr_t'(1) << ly, nz = addr_t'(1) << lz;
    longint unsigned t0, t1, rb0, wb0;
    int unsigned bad = 0;
    if (op == OP_TRANSPOSE || op == OP_BLOCK) nz = 1;
    // source data
    for (addr_t i = 0; i < nx * ny * nz; i++) u_dram.mem[src + i] = val(src + i, seed);
    @(negedge clk);
    cmd.op = op; cmd.src = src; cmd.dst = dst;
    cmd.lx = lsz_t'(lx); cmd.ly = lsz_t'(ly); cmd.lz = lsz_t'(lz);
    cmd_valid = 1'b1;
    do @(posedge clk); while (!cmd_ready);
    t0 = u_dram.cycle; rb0 = n_rd_beats; wb0 = n_wr_beats;
    @(negedge clk);
    cmd_valid = 1'b0;
    if (u_top.skew_en) n_skew++; else n_plain++;
    while (!done) @(posedge clk);
    t1 = u_dram.cycle;
    @(negedge clk);
    // destination data
    for (addr_t z = 0; z < nz; z++)
      for (addr_t y = 0; y < ny; y++)
        for (addr_t x = 0; x < nx; x++) begin
          addr_t s = src + (z * ny + y) * nx + x;
          addr_t d = dst + dst_off(op, lx, ly, (op == OP_ROT_ZXY || op == OP_ROT_YXZ) ? lz : 0, z, y, x);
          checks++;
          if (u_dram.peek(d) !== val(s, seed)) begin
            failures++;
            if (bad++ < 5) $display("op %s: dst[%h] = %h, want %h (from %h)", op.name(), d, u_dram.peek(d), val(s, seed), s);
          end
        end
    // beat accounting: every source and destination page moved exactly once
    checks++;
    if (n_rd_beats - rb0 != longint'(nx * ny * nz / LANES) || n_wr_beats - wb0 != longint'(nx * ny * nz / LANES)) begin
      failures++;
      $display("op %s: moved %0d read / %0d write beats, want %0d", op.name(), n_rd_beats - rb0, n_wr_beats - wb0, nx * ny * nz / LANES);
    end
    // a vault bus moves one beat per cycle: a lower bound on the run time
    checks++;
    if (t1 - t0 < longint'(nx * ny * nz / LANES / N_VAULT)) begin
      failures++;
      $display("op %s: %0d cycles is below the bus limit", op.name(), t1 - t0);
    end
    $display("op %-12s %0dx%0dx%0d: %0d cycles, %.2f beats/cycle each way (bus limit %0d)",
             op.name(), nx, ny, nz, t1 - t0, real'(nx * ny * nz / LANES) / real'(t1 - t0), N_VAULT);
    // remapping: sample addresses inside and outside the region
    for (int n = 0; n < 64; n++) begin
      addr_t z = addr_t'($urandom) % nz, y = addr_t'($urandom) % ny, x = addr_t'($urandom) % nx;
      addr_t s = src + (z * ny + y) * nx + x;
      host_addr_i = s;
      #1;
      checks += 2;
      if (!host_hit_o || host_addr_o !== dst + dst_off(op, lx, ly, (op == OP_ROT_ZXY || op == OP_ROT_YXZ) ? lz : 0, z, y, x)) begin
        failures++;
        $display("remap %h -> %h (hit %b)", s, host_addr_o, host_hit_o);
      end else n_remap_hit++;
      if (u_dram.peek(host_addr_o) !== val(s, seed)) failures++;
      host_addr_i = src + nx * ny * nz + addr_t'(n);
      #1;
      checks++;
      if (host_hit_o || host_addr_o !== host_addr_i) failures++;
      else n_remap_miss++;
    end
  endtask

  task automatic need(input string what, input int unsigned n);
    checks++;
    $display("mechanism %-22s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism %s never happened", what);
    end
  endtask

  initial begin
    cmd_valid = 1'b0;
    cmd = '0;
    host_addr_i = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    checks++;
    if (!cmd_ready || busy) failures++;

    run(OP_TRANSPOSE, 32'h0010_0000, 32'h0020_0000, 9, 8, 0, 1);
    run(OP_BLOCK,     32'h0030_0000, 32'h0040_0000, 9, 5, 0, 2);
    run(OP_ROT_ZXY,   32'h0050_0000, 32'h0060_0000, 8, 1, 8, 3);
    run(OP_ROT_YXZ,   32'h0070_0000, 32'h0080_0000, 8, 8, 1, 4);

    $display("row buffer: %0d hits, %0d misses", u_dram.row_hits, u_dram.row_misses);
    need("fill xbar conflict", n_fill_conflict);
    need("write-back stall", n_wb_stall);
    need("request backpressure", n_rq_bp);
    need("fill waits for bank", n_bank_wait);
    need("fill/drain overlap", n_overlap);
    need("diagonal storage", n_skew);
    need("plain storage", n_plain);
    need("remap hit", n_remap_hit);
    need("remap miss", n_remap_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
