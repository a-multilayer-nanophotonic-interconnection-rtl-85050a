// mpnoc_pkg: sizes, flit format and tile/cluster arithmetic shared by the
// multilayer photonic network-on-chip.
//
// The network joins 64 tiles (4 cores each, 256 cores) placed on an 8x8 grid.
// The grid is cut into four clusters of 16 tiles by quadrant. Every ordered
// pair of clusters (source, destination) owns one 16x16 optical crossbar
// slice, so there are 16 slices, spread over 4 optical layers.
//
// Tile numbering (this design's choice): tile = 8*y + x on the 8x8 grid.
// Cluster = {y[2], x[2]} so cluster 0 is top-left, 1 top-right, 2 bottom-left,
// 3 bottom-right. The index of a tile inside its cluster is {y[1:0], x[1:0]}.
//
// Layer / optical port mapping (this design's choice, consistent with the
// layer plan where one layer carries the bundles 0<->1 and 2<->3): the slice
// from cluster s to cluster d lies on optical port/layer s XOR d. Port 0 thus
// carries all intra-cluster slices. Every router has exactly one optical
// output and one optical input per layer, as the network description asks.
//
// Flit: one flit is one 256-bit phit and a packet is one flit. The header
// layout inside the 256 bits is this design's own.
package mpnoc_pkg;

  localparam int unsigned FLIT_W            = 256;  // phit = flit size
  localparam int unsigned NUM_TILES         = 64;
  localparam int unsigned NUM_CLUSTERS      = 4;
  localparam int unsigned TILES_PER_CLUSTER = 16;
  localparam int unsigned NUM_LAYERS        = 4;    // optical layers = optical ports per router
  localparam int unsigned CORES_PER_TILE    = 4;    // concentration
  localparam int unsigned NUM_LOCAL         = CORES_PER_TILE + 1;  // 4 cores + 1 memory/IO port
  localparam int unsigned NUM_PORTS         = NUM_LOCAL + NUM_LAYERS;  // 9 router ports
  localparam int unsigned BUF_DEPTH         = 64;   // flits per input port
  localparam int unsigned WAVELENGTHS       = 64;   // per waveguide
  localparam int unsigned WAVEGUIDES        = FLIT_W / WAVELENGTHS;  // 4 per channel bundle

  // Worst-case token round trip the receiver reserves buffers for.
  localparam int unsigned RESERVE_INTER = 12;
  localparam int unsigned RESERVE_INTRA = 8;
  // Longest optical link traversal, in cycles.
  localparam int unsigned LINK_LAT_INTER = 4;
  localparam int unsigned LINK_LAT_INTRA = 2;

  typedef logic [5:0] tile_id_t;
  typedef logic [1:0] cluster_id_t;
  typedef logic [3:0] cl_idx_t;     // tile index inside a cluster
  typedef logic [3:0] port_id_t;    // router port 0..8

  localparam int unsigned PAYLOAD_W = FLIT_W - 2 * ($bits(tile_id_t) + $bits(port_id_t));

  typedef struct packed {
    tile_id_t               dst_tile;
    port_id_t               dst_port;  // local port 0..4 at the destination tile
    tile_id_t               src_tile;
    port_id_t               src_port;
    logic [PAYLOAD_W-1:0]   payload;
  } flit_t;

  function automatic cluster_id_t cluster_of(tile_id_t t);
    return {t[5], t[2]};
  endfunction

  function automatic cl_idx_t index_in_cluster(tile_id_t t);
    return {t[4:3], t[1:0]};
  endfunction

  function automatic tile_id_t tile_of(cluster_id_t c, cl_idx_t i);
    return {c[1], i[3:2], c[0], i[1:0]};
  endfunction

  // Optical port (= layer) that carries traffic from cluster s to cluster d.
  function automatic logic [1:0] layer_of(cluster_id_t s, cluster_id_t d);
    return s ^ d;
  endfunction

endpackage
