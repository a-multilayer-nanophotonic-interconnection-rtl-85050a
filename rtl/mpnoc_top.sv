// mpnoc_top: the multilayer photonic network-on-chip for 256 cores.
//
// 64 tiles of 4 cores sit on an 8x8 grid and form four clusters of 16 tiles
// (quadrants). Each tile has one electrical_router. All traffic between
// tiles crosses a decomposed optical crossbar in one hop: for every ordered
// cluster pair (s, d) there is one 16x16 crossbar_slice whose 16 MWSR
// channels are the home channels of the 16 tiles of cluster d. The slice
// (s, d) lies on optical layer s XOR d; router optical port p of a tile in
// cluster c writes slice (c, c^p) and reads slice (c^p, c). Layer 0 holds
// the four intra-cluster slices, layer 1 the bundles 0<->1 and 2<->3,
// layer 2 the bundles 0<->2 and 1<->3, layer 3 the bundles 0<->3 and 1<->2,
// so every router has one optical input and one optical output per layer
// and every layer carries four slices.
//
// Ports are per tile and per local port: cores 0..3 and the memory/IO port
// 4 inject with a valid/ready handshake and receive with a valid/ready
// handshake (see electrical_router). Event vectors are brought out for
// observation: token captures (per home channel) and waits at each optical output, token
// withholding and overflow at each optical input, unused tokens per home
// channel, and switch conflicts per router port.
//
// End-to-end latency without contention, from a core's flit entering the
// source buffer to it leaving the destination router: source router 1,
// token wait, E/O 1, optical link (1..LINK_LAT), O/E 1, destination router 1
// cycle. 16 slices on 4 layers, 256-bit channels, one hop between any two
// tiles and token-slot arbitration follow the network description; the
// tile and layer numbering is this design's choice.
module mpnoc_top
  import mpnoc_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst,
  input  logic  [NUM_LOCAL-1:0]        in_valid  [NUM_TILES],
  input  flit_t                        in_flit   [NUM_TILES][NUM_LOCAL],
  output logic  [NUM_LOCAL-1:0]        in_ready  [NUM_TILES],
  output logic  [NUM_LOCAL-1:0]        out_valid [NUM_TILES],
  output flit_t                        out_flit  [NUM_TILES][NUM_LOCAL],
  input  logic  [NUM_LOCAL-1:0]        out_ready [NUM_TILES],
  output logic  [TILES_PER_CLUSTER-1:0] ev_token_captured [NUM_TILES][NUM_LAYERS],
  output logic  [NUM_LAYERS-1:0]       ev_token_wait     [NUM_TILES],
  output logic  [NUM_LAYERS-1:0]       ev_token_withheld [NUM_TILES],
  output logic  [NUM_LAYERS-1:0]       ev_rx_overflow    [NUM_TILES],
  output logic  [NUM_PORTS-1:0]        ev_sa_blocked     [NUM_TILES],
  output logic  [TILES_PER_CLUSTER-1:0] ev_token_lost    [NUM_CLUSTERS*NUM_CLUSTERS]
);
  localparam int unsigned N = TILES_PER_CLUSTER;

  // router-side optical signals, per tile and layer
  logic  [N-1:0]          tok_req   [NUM_TILES][NUM_LAYERS];
  logic  [N-1:0]          tok_grant [NUM_TILES][NUM_LAYERS];
  logic  [N-1:0]          launch    [NUM_TILES][NUM_LAYERS];
  flit_t                  tx_flit   [NUM_TILES][NUM_LAYERS][N];
  logic  [NUM_LAYERS-1:0] rx_valid  [NUM_TILES];
  flit_t                  rx_flit   [NUM_TILES][NUM_LAYERS];
  logic  [NUM_LAYERS-1:0] token_out [NUM_TILES];

  for (genvar t = 0; t < NUM_TILES; t++) begin : g_tile
    electrical_router u_router (
      .clk               (clk),
      .rst               (rst),
      .tile_id           (tile_id_t'(t)),
      .local_in_valid    (in_valid[t]),
      .local_in_flit     (in_flit[t]),
      .local_in_ready    (in_ready[t]),
      .local_out_valid   (out_valid[t]),
      .local_out_flit    (out_flit[t]),
      .local_out_ready   (out_ready[t]),
      .opt_tok_req       (tok_req[t]),
      .opt_tok_grant     (tok_grant[t]),
      .opt_launch        (launch[t]),
      .opt_tx_flit       (tx_flit[t]),
      .opt_rx_valid      (rx_valid[t]),
      .opt_rx_flit       (rx_flit[t]),
      .opt_token_out     (token_out[t]),
      .ev_token_captured (ev_token_captured[t]),
      .ev_token_wait     (ev_token_wait[t]),
      .ev_token_withheld (ev_token_withheld[t]),
      .ev_rx_overflow    (ev_rx_overflow[t]),
      .ev_sa_blocked     (ev_sa_blocked[t])
    );
  end

  for (genvar s = 0; s < NUM_CLUSTERS; s++) begin : g_src
    for (genvar d = 0; d < NUM_CLUSTERS; d++) begin : g_dst
      localparam int unsigned LAYER = s ^ d;
      logic  [N-1:0] s_req    [N];
      logic  [N-1:0] s_grant  [N];
      logic  [N-1:0] s_launch [N];
      flit_t         s_tx     [N][N];
      logic  [N-1:0] s_tok_in;
      logic  [N-1:0] s_rx_v;
      flit_t         s_rx     [N];

      for (genvar i = 0; i < N; i++) begin : g_idx
        localparam int unsigned WT = int'(tile_of(cluster_id_t'(s), cl_idx_t'(i)));  // writer tile
        localparam int unsigned RT = int'(tile_of(cluster_id_t'(d), cl_idx_t'(i)));  // reader tile
        assign s_req[i]                = tok_req[WT][LAYER];
        assign s_launch[i]             = launch[WT][LAYER];
        assign s_tx[i]                 = tx_flit[WT][LAYER];
        assign tok_grant[WT][LAYER]    = s_grant[i];
        assign s_tok_in[i]             = token_out[RT][LAYER];
        assign rx_valid[RT][LAYER]     = s_rx_v[i];
        assign rx_flit[RT][LAYER]      = s_rx[i];
      end

      crossbar_slice #(.INTRA(s == d)) u_slice (
        .clk        (clk),
        .rst        (rst),
        .tok_req    (s_req),
        .tok_grant  (s_grant),
        .launch     (s_launch),
        .tx_flit    (s_tx),
        .token_in   (s_tok_in),
        .rx_valid   (s_rx_v),
        .rx_flit    (s_rx),
        .token_lost (ev_token_lost[s*NUM_CLUSTERS+d])
      );
    end
  end
endmodule
