// route_compute: route computation (RC) for one router input.
//
// A flit for this tile leaves on the local port named in its header (cores
// 0..3 or the memory/IO port 4). Any other flit crosses the optical crossbar
// in a single hop: it leaves on the optical output whose layer holds the
// slice from this tile's cluster to the destination's cluster, i.e. router
// port NUM_LOCAL + (src_cluster XOR dst_cluster). Purely combinational.
// That packets reach any tile in one optical hop follows the network
// description; the port numbering and the layer mapping are this design's.
module route_compute
  import mpnoc_pkg::*;
(
  input  tile_id_t my_tile,
  input  flit_t    flit,
  output port_id_t out_port,
  output logic     is_optical
);
  always_comb begin
    if (flit.dst_tile == my_tile) begin
      out_port   = flit.dst_port;
      is_optical = 1'b0;
    end else begin
      out_port   = port_id_t'(NUM_LOCAL) +
                   port_id_t'(layer_of(cluster_of(my_tile), cluster_of(flit.dst_tile)));
      is_optical = 1'b1;
    end
  end
endmodule
