// tb_hamlet_ctrl: checks the control unit on its own, with the SRAM, the
// crossbars and the vaults replaced by testbench code.
//
// For a transpose (256 x 512, two tiles), a blocking (32 x 512, four tiles)
// and a z-x-y cube rotation (256 x 2 x 256) the test
//   * accepts page read requests with random back-pressure and checks that
//     each source page is requested exactly once and that its tag carries
//     the tile row the page belongs to;
//   * answers each request with BEATS SRAM-write reports (fw_fire) on the
//     block that row maps to, in the bank named by the tag;
//   * grants the write-back beats with random back-pressure and checks that
//     every destination page of the region is written exactly once per beat;
//   * checks done, busy and the remapping configuration afterwards, and that
//     filling one bank overlapped draining the other.
module tb_hamlet_ctrl;
  import hamlet_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  logic                 cmd_valid, cmd_ready, busy, done;
  cmd_t                 cmd;
  logic                 rq_valid, rq_ready;
  vault_t               rq_vault;
  rdreq_t               rq;
  logic [N_VAULT-1:0]   fw_fire, fw_half;
  logic                 skew_en;
  logic [3:0]           log_rpb;
  logic [N_VAULT-1:0]   dr_en;
  logic                 dr_bank;
  saddr_t [N_VAULT-1:0][LANES-1:0] dr_addr;
  logic [N_VAULT-1:0]   dx_valid, dx_ready;
  vault_t [N_VAULT-1:0] dx_vault;
  logic [N_VAULT-1:0][LOG_LANES-1:0] dx_rot;
  layer_t [N_VAULT-1:0] dx_layer;
  row_t [N_VAULT-1:0]   dx_row;
  bidx_t [N_VAULT-1:0]  dx_beat;
  logic                 rm_valid;
  cmd_t                 rm_cmd;

  hamlet_ctrl dut (.*);

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected tile row of every source page, and beats written per destination page
  int unsigned src_row [addr_t];
  int unsigned src_seen [addr_t];
  int unsigned dst_beats [addr_t];
  logic [BEATS-1:0] dst_mask [addr_t];
  int unsigned fill_q [$];         // {half, block} per outstanding beat
  int unsigned overlap = 0;

  always_ff @(posedge clk) begin
    rq_ready <= ($urandom % 4) != 0;
    dx_ready <= N_VAULT'($urandom);
  end

  // requests and fill-write reports
  always_ff @(posedge clk) if (rst_n) begin
    fw_fire <= '0;
    fw_half <= '0;
    if (rq_valid && rq_ready) begin
      loc_t  l;
      addr_t a;
      int unsigned row;
      l.vault = rq_vault; l.layer = rq.layer; l.row = rq.row;
      a = loc_addr(l);
      row = int'(rq.tag[LOG_R-1:0]);
      checks++;
      if (!src_row.exists(a) || src_row[a] != row || src_seen.exists(a)) begin
        failures++;
        if (failures < 10) $display("unexpected request page %h row %0d", a, row);
      end
      src_seen[a] = 1;
      for (int b = 0; b < BEATS; b++) fill_q.push_back(int'(rq.tag[LOG_R]) * 256 + (row >> log_rpb));
    end
    // up to two SRAM writes per cycle, on different blocks
    if (fill_q.size() > 0) begin
      int unsigned e;
      e = fill_q.pop_front();
      fw_fire[e % 256] <= 1'b1;
      fw_half[e % 256] <= 1'(e >> 8);
      if (fill_q.size() > 0 && fill_q[0] % 256 != e % 256) begin
        e = fill_q.pop_front();
        fw_fire[e % 256] <= 1'b1;
        fw_half[e % 256] <= 1'(e >> 8);
      end
    end
    if (dr_en != 0 && fw_fire != 0) overlap++;
    // write-back beats
    for (int b = 0; b < N_VAULT; b++)
      if (dx_valid[b] && dx_ready[b]) begin
        loc_t  l;
        addr_t a;
        l.vault = dx_vault[b]; l.layer = dx_layer[b]; l.row = dx_row[b];
        a = loc_addr(l);
        checks++;
        if (!dst_mask.exists(a) || dst_mask[a][dx_beat[b]]) begin
          failures++;
          if (failures < 10) $display("unexpected write page %h beat %0d", a, dx_beat[b]);
        end else dst_mask[a][dx_beat[b]] = 1'b1;
      end
  end

  task automatic run(input op_e op, input addr_t src, input addr_t dst,
                     input int unsigned lx, input int unsigned ly, input int unsigned lz);
    addr_t nx = addr_t'(1) << lx, ny = addr_t'(1) << ly, nz = addr_t'(1) << lz;
    int unsigned rows = (op == OP_BLOCK) ? K : R;
    int unsigned ncyc = 0;
    src_row.delete(); src_seen.delete(); dst_mask.delete();
    if (op != OP_ROT_ZXY) nz = 1;
    // every source page and the tile row it fills
    for (addr_t z = 0; z < nz; z++)
      for (addr_t y = 0; y < ny; y++)
        for (addr_t x = 0; x < nx; x += R) begin
          addr_t a = src + (z * ny + y) * nx + x;
          src_row[a] = (op == OP_ROT_ZXY) ? int'(z % R) : int'(y % rows);
        end
    for (addr_t p = 0; p < nx * ny * nz; p += R) dst_mask[dst + p] = '0;
    @(negedge clk);
    cmd = '{op: op, src: src, dst: dst, lx: lsz_t'(lx), ly: lsz_t'(ly), lz: lsz_t'(lz)};
    cmd_valid = 1'b1;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk);
    cmd_valid = 1'b0;
    checks++;
    if (!busy) failures++;
    while (!done) begin
      @(posedge clk);
      ncyc++;
    end
    @(negedge clk);
    checks += 3;
    if (busy || !cmd_ready) failures++;
    if (src_seen.num() != src_row.num()) begin failures++; $display("%0d of %0d pages read", src_seen.num(), src_row.num()); end
    if (!rm_valid || rm_cmd != cmd) failures++;
    foreach (dst_mask[a]) begin
      checks++;
      if (dst_mask[a] != '1) begin
        failures++;
        if (failures < 10) $display("page %h written beats %b", a, dst_mask[a]);
      end
    end
    $display("%s done in %0d cycles", op.name(), ncyc);
  endtask

  initial begin
    cmd_valid = 0; cmd = '0; fw_fire = '0; fw_half = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    checks++;
    if (rm_valid || busy || !cmd_ready) failures++;
    run(OP_TRANSPOSE, 32'h0010_0000, 32'h0020_0000, 9, 8, 0);
    run(OP_BLOCK,     32'h0030_0000, 32'h0040_0000, 9, 5, 0);
    run(OP_ROT_ZXY,   32'h0050_0000, 32'h0060_0000, 8, 1, 8);
    checks++;
    if (overlap == 0) begin failures++; $display("fill and drain never overlapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
