// switch_allocator: switch allocation (SA) of the single-cycle router.
//
// Each input port holds at most one head flit and, with one virtual channel
// per port, asks for exactly one output (req_valid, req_port). For every
// output a round-robin arbiter picks one of the inputs that ask for it,
// provided the output can take a flit this cycle (out_ready). Because an
// input asks for one output only, the per-output grants never grant an
// input twice. Outputs: per-input grant and, per output, whether it is used
// and which input drives it (the crossbar select). Combinational, with the
// round-robin pointers updated at the clock edge of a grant.
// The network description names this stage only; the round-robin
// policy is this design's choice.
module switch_allocator
  import mpnoc_pkg::*;
#(
  parameter int unsigned N = NUM_PORTS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0]         req_valid,
  input  port_id_t             req_port [N],
  input  logic [N-1:0]         out_ready,
  output logic [N-1:0]         in_grant,
  output logic [N-1:0]         out_valid,
  output port_id_t             out_sel  [N]
);
  logic [N-1:0] req_matrix [N];   // [output][input]
  logic [N-1:0] gnt_matrix [N];

  always_comb begin
    for (int o = 0; o < N; o++) begin
      for (int i = 0; i < N; i++) begin
        req_matrix[o][i] = req_valid[i] && (req_port[i] == port_id_t'(o)) && out_ready[o];
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    rr_arbiter #(.N(N)) u_arb (
      .clk     (clk),
      .rst     (rst),
      .req     (req_matrix[o]),
      .advance (1'b1),
      .grant   (gnt_matrix[o])
    );
  end

  always_comb begin
    in_grant = '0;
    for (int o = 0; o < N; o++) begin
      out_valid[o] = |gnt_matrix[o];
      out_sel[o]   = '0;
      for (int i = 0; i < N; i++) begin
        if (gnt_matrix[o][i]) begin
          out_sel[o]  = port_id_t'(i);
          in_grant[i] = 1'b1;
        end
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_chk
    a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt_matrix[o]));
  end
endmodule
