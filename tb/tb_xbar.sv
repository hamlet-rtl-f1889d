// tb_xbar: checks the crossbar switch with random traffic.
//
// Every input sends a numbered stream of payloads, each to a random output;
// outputs apply random back-pressure. The scoreboard checks that every
// payload arrives exactly once, at the output it named, and in the order it
// was sent from its input. A second phase offers one full permutation per
// cycle with all outputs ready and checks that all N payloads pass in that
// same cycle (no needless stall). Conflicts (two inputs for one output) must
// occur and be resolved fairly: no input waits more than N_IN grants of its
// output while that output was ready.
module tb_xbar;
  localparam int unsigned N = 8;
  localparam int unsigned DW = 32;
  localparam int unsigned PER_INPUT = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  logic [N-1:0]                in_valid, in_ready, out_valid, out_ready;
  logic [N-1:0][$clog2(N)-1:0] in_dest;
  logic [N-1:0][DW-1:0]        in_data, out_data;

  xbar #(.N_IN(N), .N_OUT(N), .DATA_W(DW)) dut (.*);

  // payload: {input[7:0], dest[7:0], sequence[15:0]}
  int unsigned seq   [N];
  int unsigned expct [N][N];   // lowest sequence number still allowed at output o from input i
  logic        got [N][PER_INPUT];
  int unsigned received = 0, conflicts = 0, waited [N], max_wait = 0;
  logic        phase2 = 1'b0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] pay(input int unsigned i, input int unsigned d, input int unsigned s);
    return {8'(i), 8'(d), 16'(s)};
  endfunction

  // drive inputs
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) begin
        seq[i] = 0; waited[i] = 0;
        in_valid[i] <= 1'b0;
      end
    end else if (!phase2) begin
      for (int i = 0; i < N; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          seq[i]++;
          waited[i] = 0;
          in_valid[i] <= 1'b0;
        end else if (in_valid[i] && out_ready[in_dest[i]]) begin
          waited[i]++;
          if (waited[i] > max_wait) max_wait = waited[i];
        end
        if ((!in_valid[i] || in_ready[i]) && seq[i] + (in_valid[i] && in_ready[i] ? 0 : 0) < PER_INPUT) begin
          int unsigned d;
          d = $urandom % 3 == 0 ? 0 : $urandom % N;   // output 0 is popular
          in_valid[i] <= 1'b1;
          in_dest[i]  <= $clog2(N)'(d);
          in_data[i]  <= pay(i, d, seq[i]);
        end
      end
    end
  end

  always_ff @(posedge clk) if (!phase2) out_ready <= N'($urandom);

  // scoreboard
  always_ff @(posedge clk) if (rst_n && !phase2) begin
    int unsigned nreq [N];
    for (int o = 0; o < N; o++) nreq[o] = 0;
    for (int i = 0; i < N; i++) if (in_valid[i]) nreq[in_dest[i]]++;
    for (int o = 0; o < N; o++) if (nreq[o] > 1) conflicts++;
    for (int o = 0; o < N; o++)
      if (out_valid[o] && out_ready[o]) begin
        int unsigned i, d, s;
        i = out_data[o][31:24]; d = out_data[o][23:16]; s = out_data[o][15:0];
        checks++;
        received++;
        // right output, never seen before, and later than the last payload
        // of the same input at this output
        if (d != o || i >= N || s >= PER_INPUT || got[i][s] || (expct[i][o] != 0 && s < expct[i][o])) begin
          failures++;
          if (failures < 10) $display("output %0d got input %0d dest %0d seq %0d", o, i, d, s);
        end else begin
          got[i][s] = 1'b1;
          expct[i][o] = s + 1;
        end
      end
  end

  initial begin
    for (int i = 0; i < N; i++) for (int o = 0; o < N; o++) expct[i][o] = 0;
    for (int i = 0; i < N; i++) for (int s = 0; s < PER_INPUT; s++) got[i][s] = 1'b0;
    in_valid = '0; in_dest = '0; in_data = '0; out_ready = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: random traffic until all payloads sent and drained
    forever begin
      @(posedge clk);
      if (received == N * PER_INPUT) break;
    end
    // every payload arrived
    for (int i = 0; i < N; i++) for (int s = 0; s < PER_INPUT; s++) begin
      checks++;
      if (!got[i][s]) failures++;
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("no conflict happened"); end
    checks++;
    if (max_wait > N - 1) begin failures++; $display("an input waited %0d cycles", max_wait); end
    // phase 2: permutations pass in one cycle
    @(negedge clk);
    phase2 = 1'b1;
    out_ready = '1;
    for (int n = 0; n < 50; n++) begin
      int unsigned perm [N];
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < N; i++) begin
        in_valid[i] = 1'b1;
        in_dest[i]  = $clog2(N)'(perm[i]);
        in_data[i]  = pay(i, perm[i], 1000 + n);
      end
      #0.5;
      checks++;
      if (in_ready != '1 || out_valid != '1) failures++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (out_data[perm[i]] != pay(i, perm[i], 1000 + n)) failures++;
      end
      @(negedge clk);
    end
    in_valid = '0;
    $display("conflict cycles %0d, longest wait %0d", conflicts, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
