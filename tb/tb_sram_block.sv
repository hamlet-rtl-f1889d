// tb_sram_block: checks the per-vault dual-bank SRAM at its default size
// (8 lanes x 2 banks x 1024 words x 32 bits).
//
// Random beats are written while random per-lane reads are made from the
// other bank, against a reference array. Checked: read data one cycle after
// rd_en, each lane honouring its own address, data holding while rd_en is
// low, and the two banks being independent (the same address in both banks
// holds different data).
module tb_sram_block;
  import hamlet_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  logic                 wr_en, wr_bank, rd_en, rd_bank;
  saddr_t               wr_addr;
  saddr_t [LANES-1:0]   rd_addr;
  beat_t                wr_data, rd_data;

  sram_block dut (.*);

  elem_t ref_mem [2][LANES][SRAM_DEPTH];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  beat_t want;
  logic  want_vld;

  initial begin
    wr_en = 0; rd_en = 0; wr_bank = 0; rd_bank = 1; wr_addr = '0; rd_addr = '0; wr_data = '0;
    want_vld = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill both banks completely
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < SRAM_DEPTH; a++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = b[0]; wr_addr = saddr_t'(a);
        for (int l = 0; l < LANES; l++) begin
          wr_data[l] = $urandom;
          ref_mem[b][l][a] = wr_data[l];
        end
      end
    @(negedge clk);
    wr_en = 0;
    // random traffic: writes to one bank, per-lane reads of the other
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      // check the read issued in the previous cycle (or the held value)
      if (want_vld) begin
        checks++;
        if (rd_data !== want) begin
          failures++;
          if (failures < 10) $display("cycle %0d: read %h, want %h", n, rd_data, want);
        end
      end
      wr_bank = $urandom % 2;
      rd_bank = !wr_bank;
      wr_en = ($urandom % 2) == 0;
      wr_addr = saddr_t'($urandom);
      for (int l = 0; l < LANES; l++) wr_data[l] = $urandom;
      rd_en = ($urandom % 4) != 0;
      for (int l = 0; l < LANES; l++) rd_addr[l] = saddr_t'($urandom);
      if (rd_en) begin
        for (int l = 0; l < LANES; l++) want[l] = ref_mem[rd_bank][l][rd_addr[l]];
        want_vld = 1;
      end
      if (wr_en)
        for (int l = 0; l < LANES; l++) ref_mem[wr_bank][l][wr_addr] = wr_data[l];
    end
    @(negedge clk);
    wr_en = 0; rd_en = 0;
    // banks are independent: the same address differs between banks
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      rd_en = 1; rd_bank = a[0];
      for (int l = 0; l < LANES; l++) rd_addr[l] = saddr_t'(a);
      for (int l = 0; l < LANES; l++) want[l] = ref_mem[a % 2][l][a];
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== want) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
