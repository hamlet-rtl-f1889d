// hamlet_ctrl: the HAMLeT control unit.
//
// It accepts one layout-transform command (operation, source and
// destination base, log2 sizes) and runs it tile by tile. Every transform
// here is done with the same three steps the document describes: read whole
// DRAM pages into the SRAM blocks, reorganise locally, write whole pages back.
//
//   transpose      tile = R x R elements: R source pages (rows) in, R
//                  destination pages (columns of the tile) out.
//   blocking       tile = K source pages of R elements (K = sqrt(R)); each
//                  K x K block becomes one destination page.
//   cube rotation  tile = R x R elements of the plane spanned by the source's
//                  and the target's fast dimensions, then as transpose.
//
// One tile fills all N_VAULT SRAM blocks' bank 0 while the previous tile is
// drained from bank 1, and so on alternately (double buffering).
//
// Fill side: one page read request per cycle (rq_*), address
// S0 + i * 2^lss for tile row i, to the vault that page_loc() names (the
// row order keeps vaults from streaming into the same SRAM block). The
// request tag {bank, i} comes back with every beat; the top routes the beat
// through the crossbar to SRAM block i / RPB (RPB = tile rows per block) and
// reports each SRAM write on fw_fire/fw_half so this unit can tell when a
// bank is full. For transpose-like tiles the beat is stored rotated by
// i mod LANES lanes (diagonal storage), for blocking it is stored as is.
//
// Drain side: destination pages are written N_VAULT at a time ("slots").
// At step u every SRAM block serves exactly one slot: block b serves slot
// s = (b - u/SPB) mod N_VAULT, which sends beat t = (u + SPB*s) mod BEATS of
// its page (SPB = BEATS/N_VAULT). Beat t of any destination page lies in
// block t/SPB, so the blocks never conflict on their SRAMs, and while the
// blocks keep in step the slots' pages (in different vaults for the usual
// strides) never meet at a vault. Each block reads its SRAM (dr_en[b],
// per-lane addresses dr_addr[b]) as soon as its previous beat has been
// accepted (dx_ready[b]) and it is less than DRIFT steps ahead of the
// slowest block. The registered metadata dx_* lines up with the SRAM output
// one cycle later and is offered to the write-back crossbar.
//
// The three loops over tiles (c outer, a, b inner) and all strides are
// powers of two derived from the command. Completion raises done for one
// cycle and loads the remapping configuration (rm_*).
//
// What follows the document: tile sizes (R x R, K x R), whole-page transfers,
// double buffering, a command with a few parameters. The slot/step
// schedule, the diagonal storage (which does the local reordering inside
// each block, so the crossbar only carries beats between vaults and
// blocks), the request order, the tags and the loop/stride encoding are
// this design's own.
module hamlet_ctrl
  import hamlet_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // command
  input  logic                          cmd_valid,
  output logic                          cmd_ready,
  input  cmd_t                          cmd,
  output logic                          busy,
  output logic                          done,
  // fill: page read requests
  output logic                          rq_valid,
  input  logic                          rq_ready,
  output vault_t                        rq_vault,
  output rdreq_t                        rq,
  // fill: SRAM writes performed by the top, per block
  input  logic [N_VAULT-1:0]            fw_fire,
  input  logic [N_VAULT-1:0]            fw_half,
  output logic                          skew_en,
  output logic [3:0]                    log_rpb,
  // drain: SRAM reads, per block
  output logic [N_VAULT-1:0]            dr_en,
  output logic                          dr_bank,
  output saddr_t [N_VAULT-1:0][LANES-1:0] dr_addr,
  // drain: per block beat metadata, aligned with the SRAM read data
  output logic [N_VAULT-1:0]            dx_valid,
  output vault_t [N_VAULT-1:0]          dx_vault,
  output logic [N_VAULT-1:0][LOG_LANES-1:0] dx_rot,
  output layer_t [N_VAULT-1:0]          dx_layer,
  output row_t [N_VAULT-1:0]            dx_row,
  output bidx_t [N_VAULT-1:0]           dx_beat,
  input  logic [N_VAULT-1:0]            dx_ready,
  // remapping configuration, valid after the first completed command
  output logic                          rm_valid,
  output cmd_t                          rm_cmd
);

  localparam int unsigned SPB = BEATS / N_VAULT;   // drain steps per block (4)

  typedef enum logic [1:0] {H_EMPTY, H_FILL, H_FULL, H_DRAIN} hstate_e;
  typedef enum logic [1:0] {F_IDLE, F_WAIT, F_ISSUE} fstate_e;

  // ---------------------------------------------------------------- command
  cmd_t        c_q;
  logic        run_q;
  logic [5:0]  lss, lds, lsa, lda, lsb, ldb, lsc, ldc, lna, lnb, lnc, lrows, ldp;
  logic        skew_q;
  logic [3:0]  lrpb_q;

  // Derived loop description of a command (all log2 values).
  typedef struct packed {
    logic [5:0] lss, lds, lsa, lda, lsb, ldb, lsc, ldc, lna, lnb, lnc, lrows, ldp;
    logic       skew;
    logic [3:0] lrpb;
  } plan_t;

  function automatic plan_t make_plan(input cmd_t c);
    plan_t p;
    p = '0;
    p.skew  = 1'b1;
    p.lrows = 6'(LOG_R);
    p.ldp   = 6'(LOG_R);
    p.lrpb  = 4'(LOG_R - LOG_NV);
    p.lsb   = 6'(LOG_R);
    p.lnb   = c.lx - 6'(LOG_R);
    unique case (c.op)
      OP_TRANSPOSE: begin
        p.lss = c.lx;             p.lds = c.ly;
        p.lsa = 6'(LOG_R) + c.lx; p.lda = 6'(LOG_R);  p.lna = c.ly - 6'(LOG_R);
        p.ldb = 6'(LOG_R) + c.ly;
      end
      OP_BLOCK: begin
        p.skew  = 1'b0;
        p.lrows = 6'(LOG_K);
        p.ldp   = 6'(LOG_K);
        p.lrpb  = 4'(LOG_K - LOG_NV);
        p.lss = c.lx;             p.lds = 6'(LOG_R);
        p.lsa = 6'(LOG_K) + c.lx; p.lda = 6'(LOG_K) + c.lx; p.lna = c.ly - 6'(LOG_K);
        p.ldb = 6'(LOG_K + LOG_R);
      end
      OP_ROT_ZXY: begin
        p.lss = c.ly + c.lx;      p.lds = c.lz;
        p.lsa = 6'(LOG_R) + c.ly + c.lx; p.lda = 6'(LOG_R); p.lna = c.lz - 6'(LOG_R);
        p.ldb = 6'(LOG_R) + c.lz;
        p.lsc = c.lx;             p.ldc = c.lx + c.lz;   p.lnc = c.ly;
      end
      default: begin // OP_ROT_YXZ
        p.lss = c.lx;             p.lds = c.ly;
        p.lsa = 6'(LOG_R) + c.lx; p.lda = 6'(LOG_R);  p.lna = c.ly - 6'(LOG_R);
        p.ldb = 6'(LOG_R) + c.ly;
        p.lsc = c.lx + c.ly;      p.ldc = c.lx + c.ly;   p.lnc = c.lz;
      end
    endcase
    return p;
  endfunction

  plan_t plan_d;
  assign plan_d = make_plan(cmd);

  assign cmd_ready = !run_q;
  assign busy      = run_q;
  assign skew_en   = skew_q;
  assign log_rpb   = lrpb_q;

  function automatic addr_t lim(input logic [5:0] l);
    return (addr_t'(1) << l) - addr_t'(1);
  endfunction

  // ---------------------------------------------------------------- banks
  hstate_e     h_st   [2];
  logic [15:0] h_cnt  [2];    // beats written into the bank
  addr_t       h_d0   [2];    // destination origin of the tile in the bank
  logic [15:0] h_need;        // beats per tile
  assign h_need = 16'(1) << (lrows + 6'(LOG_BEATS));

  localparam int unsigned FWN_W = $clog2(N_VAULT + 1);
  logic [FWN_W-1:0] fw_n [2];  // SRAM writes per bank this cycle
  always_comb begin
    fw_n[0] = '0;
    fw_n[1] = '0;
    for (int unsigned b = 0; b < N_VAULT; b++)
      if (fw_fire[b]) fw_n[fw_half[b]] = fw_n[fw_half[b]] + FWN_W'(1);
  end

  // ---------------------------------------------------------------- fill
  fstate_e f_st;
  logic    f_half;
  addr_t   f_a, f_b, f_c, f_i;
  addr_t   f_s0, f_d0;
  logic    f_row_last, f_tile_last, f_start;

  always_comb begin
    f_s0 = c_q.src + (f_c << lsc) + (f_a << lsa) + (f_b << lsb);
    f_d0 = c_q.dst + (f_c << ldc) + (f_a << lda) + (f_b << ldb);
  end

  // Request order. Pages that stream from different vaults at the same time
  // should be bound for different SRAM blocks, or the fill crossbar makes
  // one of them wait. Blocking tiles (RPB < N_VAULT) visit the rows
  // block-interleaved: row = (n mod N_VAULT) * RPB + n / N_VAULT for the
  // n-th request. Transpose-like tiles go further and tie each vault to one
  // block for QPB requests in a row: the n-th request, with v = n mod
  // N_VAULT, j = n / N_VAULT, asks vault v' = v ^ const for a row of block
  // (v + j / QPB) mod N_VAULT. Tile rows are 2^kp pages apart and the vault
  // is an XOR fold of the page index (page_loc), so the low LOG_NV bits of
  // the row within its block pick the vault through a rotation by
  // kp mod LOG_NV. The row is found by undoing that rotation. Every (v, j)
  // names a different row, so all rows are requested exactly once,
  // whatever the source address.
  localparam int unsigned QPB = RPB_MAX / N_VAULT;   // rows per (block, vault) (4)
  addr_t       f_row, f_row_blk;
  logic [31:0] fr_v, fr_j, fr_x, fr_hi, fr_sh;
  logic [5:0]  fr_kp;
  vault_t      fr_c, fr_lo;

  always_comb begin
    fr_kp = lss - 6'(LOG_R);
    fr_sh = int'(fr_kp) % LOG_NV;
    fr_v  = int'(f_i) % N_VAULT;
    fr_j  = int'(f_i) / N_VAULT;
    fr_x  = (fr_v + fr_j / QPB) % N_VAULT;
    fr_hi = fr_x * RPB_MAX + (fr_j % QPB) * N_VAULT;
    fr_c  = fold_vault(page_t'(fr_hi) << fr_kp) ^ vault_t'(fr_v);
    for (int unsigned m = 0; m < LOG_NV; m++) fr_lo[m] = fr_c[(m + fr_sh) % LOG_NV];
    f_row_blk = ((f_i & addr_t'(N_VAULT - 1)) << lrpb_q) | (f_i >> LOG_NV);
    f_row = skew_q ? addr_t'(fr_hi) | addr_t'(fr_lo) : f_row_blk;
  end

  loc_t  rq_loc;
  assign rq_loc     = page_loc(f_s0 + (f_row << lss));
  assign rq_valid   = (f_st == F_ISSUE);
  assign rq_vault   = rq_loc.vault;
  assign rq.layer   = rq_loc.layer;
  assign rq.row     = rq_loc.row;
  assign rq.tag     = {f_half, f_row[LOG_R-1:0]};
  assign f_row_last = (f_i == lim(lrows));
  assign f_tile_last = (f_b == lim(lnb)) && (f_a == lim(lna)) && (f_c == lim(lnc));
  assign f_start    = (f_st == F_WAIT) && (h_st[f_half] == H_EMPTY);

  // ---------------------------------------------------------------- drain
  // Each block walks the step sequence with its own counter d_n[b] = group *
  // BEATS + step, and may run up to DRIFT-1 steps ahead of the slowest
  // block. A vault that is busy for a cycle then holds up only the block
  // whose beat is bound for it. With DRIFT = 1 the blocks move in lockstep
  // and never offer two beats for one vault. More slack lets two blocks
  // serve the same slot across a change of u/SPB, and then the write-back
  // crossbar makes one of them wait. 2 was the best setting against the
  // behavioural DRAM model with random back-pressure.
  localparam int unsigned DN_W = 16;
  localparam int unsigned DRIFT = 2;
  logic                d_active, d_half, d_finish;
  logic [N_VAULT-1:0]  d_issue, d_end;
  logic [DN_W-1:0]     d_n [N_VAULT];
  logic [DN_W-1:0]     d_min, d_last;
  addr_t               d_tiles, d_total;
  logic [N_VAULT-1:0]  pend_q, pend_left;

  assign d_last = DN_W'((32'(1) << (ldp - 6'(LOG_NV))) * BEATS);   // steps per tile
  always_comb begin
    d_min = d_n[0];
    for (int unsigned b = 1; b < N_VAULT; b++)
      if (d_n[b] < d_min) d_min = d_n[b];
    for (int unsigned b = 0; b < N_VAULT; b++) begin
      d_end[b]   = (d_n[b] == d_last);
      d_issue[b] = d_active && !d_end[b] && (!pend_q[b] || dx_ready[b]) &&
                   (d_n[b] < d_min + DN_W'(DRIFT));
    end
  end

  assign pend_left = pend_q & ~dx_ready;
  assign d_finish  = d_active && (d_end == '1) && (pend_left == '0);
  assign dr_en     = d_issue;
  assign dr_bank   = d_half;
  assign dx_valid  = pend_q;

  // Per-block read address and beat metadata for its step d_n[b].
  vault_t [N_VAULT-1:0]             n_vault;
  logic [N_VAULT-1:0][LOG_LANES-1:0] n_rot;
  layer_t [N_VAULT-1:0]             n_layer;
  row_t   [N_VAULT-1:0]             n_row;
  bidx_t  [N_VAULT-1:0]             n_beat;

  logic [31:0] s, t, j, lr, rpb;
  addr_t       pa;
  loc_t        pl;

  always_comb begin
    s = 0; t = 0; j = 0; lr = 0; pa = '0; pl = '0;
    rpb = 1 << lrpb_q;
    for (int unsigned b = 0; b < N_VAULT; b++) begin
      s   = (b + N_VAULT - ((int'(d_n[b]) % BEATS) / SPB)) % N_VAULT;
      t   = (int'(d_n[b]) % BEATS + SPB * s) % BEATS;
      j   = (int'(d_n[b]) / BEATS) * N_VAULT + s;
      pa  = h_d0[d_half] + (addr_t'(j) << lds);
      pl  = page_loc(pa);
      n_vault[b] = pl.vault;
      n_layer[b] = pl.layer;
      n_row[b]   = pl.row;
      n_beat[b]  = bidx_t'(t);
      n_rot[b]   = skew_q ? LOG_LANES'(j % LANES) : '0;
      for (int unsigned l = 0; l < LANES; l++) begin
        if (skew_q) begin
          // lane l holds row LANES*t + ((l - j) mod LANES) of column j
          lr = (LANES * t + ((l + LANES - (j % LANES)) % LANES)) % rpb;
          dr_addr[b][l] = saddr_t'(lr * BEATS + j / LANES);
        end else begin
          // block row q = t*LANES/K, source beat j*(K/LANES) + t mod (K/LANES)
          lr = ((t * LANES) / K) % rpb;
          dr_addr[b][l] = saddr_t'(lr * BEATS + j * (K / LANES) + t % (K / LANES));
        end
      end
    end
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q      <= '0;
      run_q    <= 1'b0;
      done     <= 1'b0;
      {lss, lds, lsa, lda, lsb, ldb, lsc, ldc, lna, lnb, lnc, lrows, ldp} <= '0;
      skew_q   <= 1'b0;
      lrpb_q   <= '0;
      f_st     <= F_IDLE;
      f_half   <= 1'b0;
      {f_a, f_b, f_c, f_i} <= '0;
      for (int h = 0; h < 2; h++) begin
        h_st[h]  <= H_EMPTY;
        h_cnt[h] <= '0;
        h_d0[h]  <= '0;
      end
      d_active <= 1'b0;
      d_half   <= 1'b0;
      for (int b = 0; b < N_VAULT; b++) d_n[b] <= '0;
      d_tiles  <= '0;
      d_total  <= '0;
      pend_q   <= '0;
      dx_vault <= '0;
      dx_rot   <= '0;
      dx_layer <= '0;
      dx_row   <= '0;
      dx_beat  <= '0;
      rm_valid <= 1'b0;
      rm_cmd   <= '0;
    end else begin
      done <= 1'b0;

      // command accept
      if (cmd_valid && cmd_ready) begin
        c_q    <= cmd;
        run_q  <= 1'b1;
        {lss, lds, lsa, lda, lsb, ldb, lsc, ldc, lna, lnb, lnc, lrows, ldp} <=
          {plan_d.lss, plan_d.lds, plan_d.lsa, plan_d.lda, plan_d.lsb, plan_d.ldb,
           plan_d.lsc, plan_d.ldc, plan_d.lna, plan_d.lnb, plan_d.lnc, plan_d.lrows, plan_d.ldp};
        skew_q <= plan_d.skew;
        lrpb_q <= plan_d.lrpb;
        d_total <= lim(plan_d.lna + plan_d.lnb + plan_d.lnc);
        f_st   <= F_WAIT;
        f_half <= 1'b0;
        {f_a, f_b, f_c, f_i} <= '0;
        d_half  <= 1'b0;
        d_tiles <= '0;
      end

      // bank fill counting
      for (int h = 0; h < 2; h++)
        if (h_st[h] == H_FILL) begin
          if (h_cnt[h] + 16'(fw_n[h]) == h_need) h_st[h] <= H_FULL;
          h_cnt[h] <= h_cnt[h] + 16'(fw_n[h]);
        end

      // fill sequencing
      if (f_start) begin
        h_st[f_half]  <= H_FILL;
        h_cnt[f_half] <= '0;
        h_d0[f_half]  <= f_d0;
        f_i  <= '0;
        f_st <= F_ISSUE;
      end
      if (rq_valid && rq_ready) begin
        f_i <= f_i + addr_t'(1);
        if (f_row_last) begin
          f_half <= !f_half;
          f_st   <= f_tile_last ? F_IDLE : F_WAIT;
          if (f_b != lim(lnb)) f_b <= f_b + addr_t'(1);
          else begin
            f_b <= '0;
            if (f_a != lim(lna)) f_a <= f_a + addr_t'(1);
            else begin
              f_a <= '0;
              f_c <= f_c + addr_t'(1);
            end
          end
        end
      end

      // drain sequencing
      if (!d_active && run_q && h_st[d_half] == H_FULL) begin
        h_st[d_half] <= H_DRAIN;
        d_active <= 1'b1;
        for (int b = 0; b < N_VAULT; b++) d_n[b] <= '0;
      end
      for (int b = 0; b < N_VAULT; b++) begin
        if (d_issue[b]) begin
          pend_q[b]   <= 1'b1;
          dx_vault[b] <= n_vault[b];
          dx_rot[b]   <= n_rot[b];
          dx_layer[b] <= n_layer[b];
          dx_row[b]   <= n_row[b];
          dx_beat[b]  <= n_beat[b];
          d_n[b]      <= d_n[b] + DN_W'(1);
        end else begin
          pend_q[b] <= pend_left[b];
        end
      end
      if (d_finish) begin
        d_active     <= 1'b0;
        h_st[d_half] <= H_EMPTY;
        d_half       <= !d_half;
        d_tiles      <= d_tiles + addr_t'(1);
        if (d_tiles == d_total) begin
          run_q    <= 1'b0;
          done     <= 1'b1;
          rm_valid <= 1'b1;
          rm_cmd   <= c_q;
        end
      end
    end
  end

  // Sizes a command must respect: every tiled dimension at least one tile.
  a_cmd_size: assert property (@(posedge clk) disable iff (!rst_n) (cmd_valid && cmd_ready) |->
      (cmd.lx >= 6'(LOG_R) &&
       (cmd.op == OP_BLOCK ? cmd.ly >= 6'(LOG_K) :
        cmd.op == OP_ROT_ZXY ? cmd.lz >= 6'(LOG_R) : cmd.ly >= 6'(LOG_R))))
    else $error("hamlet_ctrl: command dimensions smaller than one tile");

  // Writes only go to a bank that is being filled.
  for (genvar b = 0; b < N_VAULT; b++) begin : g_chk
    a_fill_bank: assert property (@(posedge clk) disable iff (!rst_n) fw_fire[b] |-> (h_st[fw_half[b]] == H_FILL))
      else $error("hamlet_ctrl: write into bank %0d not being filled", fw_half[b]);
  end

endmodule
