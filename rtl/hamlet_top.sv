// hamlet_top: the HAMLeT layout-transform accelerator in the logic layer of a
// 3D-stacked DRAM.
//
// Blocks: the control unit (hamlet_ctrl), one dual-bank SRAM block per vault
// (sram_block), the crossbar switch used in both directions (xbar: vault ->
// SRAM for the fill, SRAM -> vault for the write-back) and the address
// remapping unit (addr_remap) that redirects later accesses to the moved data.
//
// Ports toward the stack, one set per vault (the DRAM memory controller and
// vault controllers that sit behind them are outside this design):
//   rq_*  page read request {layer, row, tag}; valid/ready.
//   rd_*  returned read beat {tag, beat index, 8 elements}; valid/ready.
//         The vault answers a request with all BEATS beats of the page and
//         echoes the tag; beats may arrive in any order and interleave
//         between vaults.
//   wr_*  write beat {layer, row, beat index, 8 elements}; valid/ready.
//         A page is complete once its BEATS beats have been accepted.
// Command port: cmd_valid/cmd_ready with a cmd_t; busy stays high until the
// last beat of the transform has been handed to a vault, then done pulses.
// Host address port: host_addr_i is translated combinationally to
// host_addr_o through the remapping set by the last completed command
// (host_hit_o tells whether it applied).
//
// Per-block glue kept here: the fill beat is rotated by (tile row mod LANES)
// lanes before the SRAM write when the tile is stored diagonally, and the
// SRAM output is rotated back by the column index before the write-back.
// Fill-side SRAM writes take one cycle; the crossbar adds no register.
module hamlet_top
  import hamlet_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  cmd_t                    cmd,
  output logic                    busy,
  output logic                    done,
  output logic [N_VAULT-1:0]      rq_valid,
  input  logic [N_VAULT-1:0]      rq_ready,
  output rdreq_t [N_VAULT-1:0]    rq,
  input  logic [N_VAULT-1:0]      rd_valid,
  output logic [N_VAULT-1:0]      rd_ready,
  input  rdbeat_t [N_VAULT-1:0]   rd,
  output logic [N_VAULT-1:0]      wr_valid,
  input  logic [N_VAULT-1:0]      wr_ready,
  output wrbeat_t [N_VAULT-1:0]   wr,
  input  addr_t                   host_addr_i,
  output addr_t                   host_addr_o,
  output logic                    host_hit_o
);

  // ---------------------------------------------------------- control unit
  logic                    c_rq_valid, c_rq_ready;
  vault_t                  c_rq_vault;
  rdreq_t                  c_rq;
  logic [N_VAULT-1:0]      fw_fire, fw_half;
  logic                    skew_en;
  logic [3:0]              log_rpb;
  logic [N_VAULT-1:0]      dr_en;
  logic                    dr_bank;
  saddr_t [N_VAULT-1:0][LANES-1:0] dr_addr;
  logic [N_VAULT-1:0]      dx_valid, dx_ready;
  vault_t [N_VAULT-1:0]    dx_vault;
  logic [N_VAULT-1:0][LOG_LANES-1:0] dx_rot;
  layer_t [N_VAULT-1:0]    dx_layer;
  row_t [N_VAULT-1:0]      dx_row;
  bidx_t [N_VAULT-1:0]     dx_beat;
  logic                    rm_valid;
  cmd_t                    rm_cmd;

  hamlet_ctrl u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .busy, .done,
    .rq_valid (c_rq_valid), .rq_ready (c_rq_ready), .rq_vault (c_rq_vault), .rq (c_rq),
    .fw_fire, .fw_half, .skew_en, .log_rpb,
    .dr_en, .dr_bank, .dr_addr,
    .dx_valid, .dx_vault, .dx_rot, .dx_layer, .dx_row, .dx_beat, .dx_ready,
    .rm_valid, .rm_cmd
  );

  // Page read requests go to the vault that holds the page.
  always_comb begin
    for (int unsigned v = 0; v < N_VAULT; v++) begin
      rq_valid[v] = c_rq_valid && (c_rq_vault == vault_t'(v));
      rq[v]       = c_rq;
    end
  end
  assign c_rq_ready = rq_ready[c_rq_vault];

  // ---------------------------------------------------------- fill crossbar
  localparam int unsigned RDB_W = $bits(rdbeat_t);
  logic [N_VAULT-1:0][LOG_NV-1:0] fx_dest;
  logic [N_VAULT-1:0][RDB_W-1:0]  fx_in, fx_out;
  logic [N_VAULT-1:0]             fx_valid;

  always_comb begin
    for (int unsigned v = 0; v < N_VAULT; v++) begin
      // destination block = tile row / rows per block
      fx_dest[v] = LOG_NV'(rd[v].tag[LOG_R-1:0] >> log_rpb);
      fx_in[v]   = rd[v];
    end
  end

  xbar #(.N_IN(N_VAULT), .N_OUT(N_VAULT), .DATA_W(RDB_W)) u_fill_xbar (
    .clk, .rst_n,
    .in_valid (rd_valid), .in_dest (fx_dest), .in_data (fx_in), .in_ready (rd_ready),
    .out_valid (fx_valid), .out_data (fx_out), .out_ready ({N_VAULT{1'b1}})
  );

  // ---------------------------------------------------------- SRAM blocks
  localparam int unsigned WRB_W = $bits(wrbeat_t);
  logic [N_VAULT-1:0][WRB_W-1:0] dx_in, dx_out;

  for (genvar b = 0; b < N_VAULT; b++) begin : g_blk
    rdbeat_t     fb;
    logic [31:0] row, lr;
    saddr_t      waddr;
    beat_t       wdata, rdata;

    always_comb begin
      fb    = rdbeat_t'(fx_out[b]);
      row   = int'(fb.tag[LOG_R-1:0]);
      lr    = row % (1 << log_rpb);
      waddr = saddr_t'(lr * BEATS + int'(fb.beat));
      // element e of the beat goes to lane (e + row) mod LANES when skewed
      wdata = skew_en ? rot_down(fb.data, (LANES - row % LANES) % LANES) : fb.data;
    end

    assign fw_fire[b] = fx_valid[b];
    assign fw_half[b] = fb.tag[LOG_R];

    sram_block u_sram (
      .clk, .rst_n,
      .wr_en   (fx_valid[b]),
      .wr_bank (fb.tag[LOG_R]),
      .wr_addr (waddr),
      .wr_data (wdata),
      .rd_en   (dr_en[b]),
      .rd_bank (dr_bank),
      .rd_addr (dr_addr[b]),
      .rd_data (rdata)
    );

    wrbeat_t ob;
    always_comb begin
      ob.layer = dx_layer[b];
      ob.row   = dx_row[b];
      ob.beat  = dx_beat[b];
      ob.data  = rot_down(rdata, int'(dx_rot[b]));
      dx_in[b] = ob;
    end
  end

  // ---------------------------------------------------------- write-back crossbar
  logic [N_VAULT-1:0] wx_valid;
  xbar #(.N_IN(N_VAULT), .N_OUT(N_VAULT), .DATA_W(WRB_W)) u_wb_xbar (
    .clk, .rst_n,
    .in_valid (dx_valid), .in_dest (dx_vault), .in_data (dx_in), .in_ready (dx_ready),
    .out_valid (wx_valid), .out_data (dx_out), .out_ready (wr_ready)
  );

  always_comb begin
    for (int unsigned v = 0; v < N_VAULT; v++) begin
      wr_valid[v] = wx_valid[v];
      wr[v]       = wrbeat_t'(dx_out[v]);
    end
  end

  // ---------------------------------------------------------- address remapping
  addr_remap u_remap (
    .cfg_valid (rm_valid),
    .cfg_op    (rm_cmd.op),
    .cfg_src   (rm_cmd.src),
    .cfg_dst   (rm_cmd.dst),
    .cfg_lx    (rm_cmd.lx),
    .cfg_ly    (rm_cmd.ly),
    .cfg_lz    (rm_cmd.lz),
    .addr_i    (host_addr_i),
    .addr_o    (host_addr_o),
    .hit_o     (host_hit_o)
  );

endmodule
