// dram_model: behavioural model of the DRAM side of the stack as the
// accelerator sees it: the memory controller, the vault controllers and the
// DRAM layers behind each vault's TSV bus. Not synthesizable; testbench only.
//
// Storage is one sparse array of 32-bit elements indexed by element
// address; a page location {vault, layer, row} is turned back into an
// address with loc_addr(). Each vault serves its read requests in order:
// a request becomes ready LAT_HIT cycles after it is accepted when its row is
// already open in that layer, LAT_MISS cycles otherwise (precharge +
// activate), and then streams its BEATS beats, one per cycle, on rd_*.
// While one page streams, the next request's activation proceeds, so
// requests to different layers of a vault overlap (the round-robin layer
// interleaving). Writes are accepted one beat per cycle per vault.
// Row-buffer hits and misses are counted per read page and per write beat. Optional random
// back-pressure on rq_ready and wr_ready (STALL_PCT percent of cycles).
module dram_model
  import hamlet_pkg::*;
#(
  parameter int unsigned LAT_HIT   = 12,
  parameter int unsigned LAT_MISS  = 36,
  parameter int unsigned QDEPTH    = 4,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_VAULT-1:0]      rq_valid,
  output logic [N_VAULT-1:0]      rq_ready,
  input  rdreq_t [N_VAULT-1:0]    rq,
  output logic [N_VAULT-1:0]      rd_valid,
  input  logic [N_VAULT-1:0]      rd_ready,
  output rdbeat_t [N_VAULT-1:0]   rd,
  input  logic [N_VAULT-1:0]      wr_valid,
  output logic [N_VAULT-1:0]      wr_ready,
  input  wrbeat_t [N_VAULT-1:0]   wr
);

  elem_t mem [addr_t];

  longint unsigned cycle = 0;
  int unsigned row_hits = 0, row_misses = 0, rd_pages = 0, wr_beats = 0;

  typedef struct {
    rdreq_t          r;
    longint unsigned t_ready;
  } pend_t;

  pend_t       q   [N_VAULT][$];
  int unsigned cur_beat [N_VAULT];
  row_t        open_row [N_VAULT][N_LAYER];
  logic        open_vld [N_VAULT][N_LAYER];
  longint unsigned busy_until [N_VAULT];

  function automatic elem_t peek(input addr_t a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic int unsigned access_lat(input int unsigned v, input rdreq_t r);
    if (open_vld[v][r.layer] && open_row[v][r.layer] == r.row) begin
      row_hits++;
      return LAT_HIT;
    end
    row_misses++;
    open_vld[v][r.layer] = 1'b1;
    open_row[v][r.layer] = r.row;
    return LAT_MISS;
  endfunction

  initial begin
    for (int v = 0; v < N_VAULT; v++) begin
      cur_beat[v] = 0;
      busy_until[v] = 0;
      for (int l = 0; l < N_LAYER; l++) begin
        open_vld[v][l] = 1'b0;
        open_row[v][l] = '0;
      end
    end
  end

  // Ready signals and read beats, driven from registered model state.
  always_comb begin
    for (int v = 0; v < N_VAULT; v++) begin
      rd_valid[v] = 1'b0;
      rd[v]       = '0;
      if (q[v].size() > 0 && cycle >= q[v][0].t_ready) begin
        loc_t  l;
        addr_t a;
        l.vault = vault_t'(v);
        l.layer = q[v][0].r.layer;
        l.row   = q[v][0].r.row;
        a = loc_addr(l) + addr_t'(cur_beat[v] * LANES);
        rd_valid[v] = 1'b1;
        rd[v].tag   = q[v][0].r.tag;
        rd[v].beat  = bidx_t'(cur_beat[v]);
        for (int k = 0; k < LANES; k++) rd[v].data[k] = peek(a + addr_t'(k));
      end
    end
  end

  logic [N_VAULT-1:0] stall_rq, stall_wr;
  always_ff @(posedge clk) begin
    for (int v = 0; v < N_VAULT; v++) begin
      stall_rq[v] <= ($urandom % 100) < STALL_PCT;
      stall_wr[v] <= ($urandom % 100) < STALL_PCT;
    end
  end

  always_comb begin
    for (int v = 0; v < N_VAULT; v++) begin
      rq_ready[v] = rst_n && !stall_rq[v] && (q[v].size() < QDEPTH);
      wr_ready[v] = rst_n && !stall_wr[v];
    end
  end

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int v = 0; v < N_VAULT; v++) begin
        // read beat handshake
        if (rd_valid[v] && rd_ready[v]) begin
          if (cur_beat[v] == BEATS - 1) begin
            cur_beat[v] = 0;
            void'(q[v].pop_front());
            rd_pages++;
          end else cur_beat[v] = cur_beat[v] + 1;
        end
        // new request: activation overlaps the page that is streaming
        if (rq_valid[v] && rq_ready[v]) begin
          pend_t p;
          longint unsigned start;
          p.r = rq[v];
          start = (busy_until[v] > cycle) ? busy_until[v] : cycle;
          p.t_ready = cycle + access_lat(v, rq[v]);
          if (p.t_ready < start) p.t_ready = start;
          busy_until[v] = p.t_ready + BEATS;
          q[v].push_back(p);
        end
        // write beat
        if (wr_valid[v] && wr_ready[v]) begin
          loc_t  l;
          addr_t a;
          l.vault = vault_t'(v);
          l.layer = wr[v].layer;
          l.row   = wr[v].row;
          a = loc_addr(l) + addr_t'(int'(wr[v].beat) * LANES);
          for (int k = 0; k < LANES; k++) mem[a + addr_t'(k)] = wr[v].data[k];
          void'(access_lat(v, rdreq_t'({wr[v].layer, wr[v].row, tag_t'(0)})));
          wr_beats++;
        end
      end
    end
  end

endmodule
