// hamlet_pkg: sizes, types and helper functions shared by the HAMLeT
// layout-transform accelerator.
//
// The default sizes are those of the L4-B8-T256 stack: 4 DRAM layers,
// 8 vaults (one independent TSV bus each), 256 TSV data bits per vault and
// 8 kb DRAM pages. Elements are 32 bits, the SRAM word width of the
// 8 kb / 8-vault SRAM configuration (8 blocks of 64 kB, 32 bits wide).
// A page therefore holds R = 256 elements and crosses a TSV bus in
// BEATS = 32 beats of LANES = 8 elements.
//
// Addresses are element addresses (byte address / 4). The page-to-vault
// mapping below is this design's own choice: the low three page-index bits,
// XOR-folded with the higher ones, select the vault so that pages at
// power-of-two strides still spread over all vaults; the page index above
// those bits, taken mod N_LAYER, selects the layer, so consecutive page
// groups visit the layers of a vault in round-robin order; the quotient is
// the DRAM row.
//
// Other stacks: change N_VAULT, N_LAYER and TSV_W. N_VAULT and TSV_W must
// stay powers of two, with BEATS >= N_VAULT and K >= LANES; N_LAYER may be
// any number (the layer is the page index above the vault bits mod N_LAYER).
package hamlet_pkg;

  localparam int unsigned ELEM_W    = 32;
  localparam int unsigned TSV_W     = 256;
  localparam int unsigned PAGE_BITS = 8192;
  localparam int unsigned N_VAULT   = 8;
  localparam int unsigned N_LAYER   = 4;
  localparam int unsigned ADDR_W    = 32;     // element address width

  localparam int unsigned LANES  = TSV_W / ELEM_W;       // elements per beat   (8)
  localparam int unsigned R      = PAGE_BITS / ELEM_W;   // elements per page   (256)
  localparam int unsigned BEATS  = R / LANES;            // beats per page      (32)
  localparam int unsigned K      = 16;                   // sqrt(R): block edge for matrix blocking
  localparam int unsigned LOG_R  = $clog2(R);
  localparam int unsigned LOG_K  = $clog2(K);
  localparam int unsigned LOG_NV = $clog2(N_VAULT);
  localparam int unsigned LOG_NL = $clog2(N_LAYER);
  localparam int unsigned LOG_BEATS = $clog2(BEATS);
  localparam int unsigned LOG_LANES = $clog2(LANES);

  // Rows of one tile held by each SRAM block (one half): R*R / (N_VAULT*R).
  localparam int unsigned RPB_MAX = R / N_VAULT;                 // 32
  localparam int unsigned SRAM_DEPTH = RPB_MAX * BEATS;          // words per lane per bank (1024)
  localparam int unsigned SRAM_AW = $clog2(SRAM_DEPTH);

  localparam int unsigned PAGE_W = ADDR_W - LOG_R;               // page index width
  localparam int unsigned HI_W   = PAGE_W - LOG_NV;              // page index above the vault bits
  localparam int unsigned ROW_W  = HI_W - ($clog2(N_LAYER + 1) - 1); // DRAM row width: HI_W - floor(log2 N_LAYER)
  localparam int unsigned TAG_W  = 1 + LOG_R;                    // {half, tile row}

  typedef logic [ELEM_W-1:0]           elem_t;
  typedef elem_t [LANES-1:0]           beat_t;   // one TSV beat, lane 0 = lowest address
  typedef logic [ADDR_W-1:0]           addr_t;
  typedef logic [PAGE_W-1:0]           page_t;
  typedef logic [LOG_NV-1:0]           vault_t;
  typedef logic [LOG_NL-1:0]           layer_t;
  typedef logic [ROW_W-1:0]            row_t;
  typedef logic [LOG_BEATS-1:0]        bidx_t;
  typedef logic [SRAM_AW-1:0]          saddr_t;
  typedef logic [TAG_W-1:0]            tag_t;
  typedef logic [5:0]                  lsz_t;    // log2 of a dimension

  typedef enum logic [1:0] {
    OP_TRANSPOSE = 2'd0,   // n_c x n_r row-major -> column-major
    OP_BLOCK     = 2'd1,   // row-major -> K x K blocked, blocks row-major
    OP_ROT_ZXY   = 2'd2,   // cube x-y-z order -> z-x-y order
    OP_ROT_YXZ   = 2'd3    // cube x-y-z order -> y-x-z order
  } op_e;

  // Layout transform command. lx is the fast (contiguous) dimension of the
  // source: n_r for a matrix, n_x for a cube; ly is n_c or n_y; lz is n_z.
  typedef struct packed {
    op_e   op;
    addr_t src;
    addr_t dst;
    lsz_t  lx;
    lsz_t  ly;
    lsz_t  lz;
  } cmd_t;

  // DRAM location of one page.
  typedef struct packed {
    vault_t vault;
    layer_t layer;
    row_t   row;
  } loc_t;

  // Page read request toward a vault.
  typedef struct packed {
    layer_t layer;
    row_t   row;
    tag_t   tag;
  } rdreq_t;

  // Beat returned by a vault for a page read.
  typedef struct packed {
    tag_t  tag;
    bidx_t beat;
    beat_t data;
  } rdbeat_t;

  // Beat written into a vault.
  typedef struct packed {
    layer_t layer;
    row_t   row;
    bidx_t  beat;
    beat_t  data;
  } wrbeat_t;

  function automatic vault_t fold_vault(input page_t p);
    vault_t v = '0;
    for (int unsigned i = 0; i < PAGE_W; i += LOG_NV)
      for (int unsigned b = 0; b < LOG_NV; b++)
        if (i + b < PAGE_W) v[b] = v[b] ^ p[i+b];
    return v;
  endfunction

  // Above the vault bits, the page index counts (row, layer) pairs with the
  // layer fastest: layer = index mod N_LAYER, row = index / N_LAYER (a bit
  // slice when N_LAYER is a power of two).
  function automatic loc_t page_loc(input addr_t a);
    page_t           p;
    logic [HI_W-1:0] h;
    loc_t            l;
    p = page_t'(a >> LOG_R);   // the element offset within the page is dropped
    h = p[PAGE_W-1:LOG_NV];
    l.vault = fold_vault(p);
    l.layer = layer_t'(h % HI_W'(N_LAYER));
    l.row   = row_t'(h / HI_W'(N_LAYER));
    return l;
  endfunction

  // Inverse of page_loc: first element address of the page.
  function automatic addr_t loc_addr(input loc_t l);
    page_t           p;
    logic [HI_W-1:0] h;
    h = HI_W'(l.row) * HI_W'(N_LAYER) + HI_W'(l.layer);
    p = {h, {LOG_NV{1'b0}}};
    p[LOG_NV-1:0] = l.vault ^ fold_vault(p);
    return {p, {LOG_R{1'b0}}};
  endfunction

  // Rotate a beat: result lane k = input lane (k + n) mod LANES.
  function automatic beat_t rot_down(input beat_t b, input int unsigned n);
    beat_t o;
    for (int unsigned k = 0; k < LANES; k++) o[k] = b[(k + n) % LANES];
    return o;
  endfunction

endpackage
