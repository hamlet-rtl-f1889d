// xbar: N_IN x N_OUT crossbar switch with a round-robin arbiter per output.
//
// Each input offers one payload with the index of the output it is for
// (in_valid/in_dest/in_data). Every output picks one of the inputs that
// request it, starting the search one past the input it granted last, and
// grants it only when its own out_ready is high; in_ready of the granted
// input is raised in the same cycle (valid/ready handshake, a transfer
// happens when both are high). Inputs that lose wait, which is how the
// switch back-pressures on a conflict. Different outputs switch
// independently, so up to min(N_IN, N_OUT) payloads move per cycle.
//
// The switch itself is combinational from inputs to outputs; only the
// round-robin pointers are registered. The document reuses the crossbar
// that already exists in the stack's logic layer; its arbitration policy is
// this design's own choice.
module xbar #(
  parameter int unsigned N_IN   = 8,
  parameter int unsigned N_OUT  = 8,
  parameter int unsigned DATA_W = 256
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [N_IN-1:0]                  in_valid,
  input  logic [N_IN-1:0][$clog2(N_OUT)-1:0] in_dest,
  input  logic [N_IN-1:0][DATA_W-1:0]      in_data,
  output logic [N_IN-1:0]                  in_ready,
  output logic [N_OUT-1:0]                 out_valid,
  output logic [N_OUT-1:0][DATA_W-1:0]     out_data,
  input  logic [N_OUT-1:0]                 out_ready
);

  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [N_OUT-1:0][IW-1:0] ptr_q;   // input granted last, per output
  logic [N_OUT-1:0][IW-1:0] sel;
  logic [N_OUT-1:0]         any;

  always_comb begin
    in_ready  = '0;
    out_valid = '0;
    out_data  = '0;
    sel       = ptr_q;
    any       = '0;
    for (int unsigned o = 0; o < N_OUT; o++) begin
      for (int unsigned d = 1; d <= N_IN; d++) begin
        if (!any[o] && in_valid[(int'(ptr_q[o]) + d) % N_IN] &&
            int'(in_dest[(int'(ptr_q[o]) + d) % N_IN]) == o) begin
          any[o] = 1'b1;
          sel[o] = IW'((int'(ptr_q[o]) + d) % N_IN);
        end
      end
      out_valid[o] = any[o];
      out_data[o]  = in_data[sel[o]];
      if (any[o] && out_ready[o]) in_ready[sel[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else
      for (int unsigned o = 0; o < N_OUT; o++)
        if (any[o] && out_ready[o]) ptr_q[o] <= sel[o];
  end

  // An input is granted by at most one output (it names exactly one).
  for (genvar i = 0; i < N_IN; i++) begin : g_chk
    a_grant_needs_request: assert property (@(posedge clk) disable iff (!rst_n) in_ready[i] |-> in_valid[i])
      else $error("xbar: grant without request on input %0d", i);
  end

endmodule
