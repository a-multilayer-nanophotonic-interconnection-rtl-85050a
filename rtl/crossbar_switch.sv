// crossbar_switch: the router's electrical crossbar.
//
// N inputs by N outputs of W bits. Output o carries input sel[o] when
// en[o] is high and is zero otherwise. Purely combinational; the select
// comes from the switch allocator in the same cycle.
module crossbar_switch
  import mpnoc_pkg::*;
#(
  parameter int unsigned N = NUM_PORTS,
  parameter int unsigned W = FLIT_W
) (
  input  logic [W-1:0] in_data [N],
  input  port_id_t     sel     [N],
  input  logic [N-1:0] en,
  output logic [W-1:0] out_data[N]
);
  always_comb begin
    for (int o = 0; o < N; o++) begin
      out_data[o] = '0;
      for (int i = 0; i < N; i++) begin
        if (en[o] && sel[o] == port_id_t'(i)) out_data[o] = in_data[i];
      end
    end
  end
endmodule
