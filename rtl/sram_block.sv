// sram_block: the dual-bank SRAM buffer that sits next to one vault.
//
// The two banks double-buffer a transform: one bank is filled from the DRAM
// while the other is read out toward the DRAM, so that data keeps flowing.
// Each bank is LANES words wide (one TSV beat) and built from LANES
// independent 32-bit lanes. A write stores a whole beat at one address;
// a read gives every lane its own address, which lets the controller pick
// one element from each of LANES different tile rows in one cycle (the
// diagonal storage used for the local transpose).
//
// At the defaults a bank is 8 lanes x 1024 words x 32 bits = 32 kB and the
// block is 64 kB, the per-vault size of the 8 kb-page, 8-vault SRAM
// configuration. The lane width and the dual-bank organisation follow the
// document; the per-lane read addressing is this design's own choice.
//
// Timing: one write port and one read port, both synchronous. rd_data is
// registered and appears the cycle after rd_en; it holds its value while
// rd_en is low. A read and a write in the same cycle must use different
// banks (checked by an assertion): the controller never reads the bank it
// is filling.
module sram_block
  import hamlet_pkg::*;
#(
  parameter int unsigned N_LANES = LANES,
  parameter int unsigned DEPTH   = SRAM_DEPTH,
  parameter int unsigned W       = ELEM_W
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  wr_en,
  input  logic                                  wr_bank,
  input  logic [$clog2(DEPTH)-1:0]              wr_addr,
  input  logic [N_LANES-1:0][W-1:0]             wr_data,
  input  logic                                  rd_en,
  input  logic                                  rd_bank,
  input  logic [N_LANES-1:0][$clog2(DEPTH)-1:0] rd_addr,
  output logic [N_LANES-1:0][W-1:0]             rd_data
);

  for (genvar l = 0; l < N_LANES; l++) begin : g_lane
    logic [W-1:0] mem [2*DEPTH];

    always_ff @(posedge clk)
      if (wr_en) mem[{wr_bank, wr_addr}] <= wr_data[l];

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)     rd_data[l] <= '0;
      else if (rd_en) rd_data[l] <= mem[{rd_bank, rd_addr[l]}];
  end

  a_banks_apart: assert property (@(posedge clk) disable iff (!rst_n) (wr_en && rd_en) |-> (wr_bank != rd_bank))
    else $error("sram_block: read and write hit the same bank");

endmodule
