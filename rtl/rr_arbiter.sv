// rr_arbiter: round-robin arbiter over N requesters.
//
// Grants the first requester at or after the priority pointer, searching
// upward with wrap-around. When `advance` is high and a grant is made, the
// pointer moves to the requester just after the winner, so a winner has the
// lowest priority in the next round. One-hot grant, combinational from req.
module rr_arbiter #(
  parameter int unsigned N = 9
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] ptr;
  logic [IW-1:0] win;
  logic          any;

  always_comb begin
    grant = '0;
    win   = '0;
    any   = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (!any && req[idx]) begin
        any        = 1'b1;
        win        = IW'(idx);
        grant[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (advance && any) ptr <= (win == IW'(N - 1)) ? '0 : win + 1'b1;
  end
endmodule
