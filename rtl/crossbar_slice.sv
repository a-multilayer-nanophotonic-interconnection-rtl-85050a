// crossbar_slice: cycle-level behavioural model of one 16x16 slice of the
// decomposed optical crossbar (optical hardware; see mwsr_channel).
//
// The slice joins the 16 tiles of a source cluster (writers) to the 16
// tiles of a destination cluster (readers). It is made of 16 MWSR home
// channels, one per reader; every writer can request and write each of
// them. Arrays are indexed [writer][reader] for the token lines and the
// launch strobes and the flit buses (each writer has its own modulators,
// hence its own flit, on every home channel); each reader has one token
// injection line and one received flit. An intra-cluster slice (INTRA=1) is physically shorter: its
// longest link is LINK_LAT_INTRA cycles instead of LINK_LAT_INTER.
// Sixteen slices of 16x16 on four layers, one home channel per reader and
// the shorter intra-cluster channels follow the network description; the
// latency values inside the 1-4 cycle range are this model's choice.
module crossbar_slice
  import mpnoc_pkg::*;
#(
  parameter bit INTRA = 1'b0
) (
  input  logic                          clk,
  input  logic                          rst,
  // writers (tiles of the source cluster)
  input  logic [TILES_PER_CLUSTER-1:0]  tok_req   [TILES_PER_CLUSTER],
  output logic [TILES_PER_CLUSTER-1:0]  tok_grant [TILES_PER_CLUSTER],
  input  logic [TILES_PER_CLUSTER-1:0]  launch    [TILES_PER_CLUSTER],
  input  flit_t                         tx_flit   [TILES_PER_CLUSTER][TILES_PER_CLUSTER],
  // readers (tiles of the destination cluster)
  input  logic [TILES_PER_CLUSTER-1:0]  token_in,
  output logic [TILES_PER_CLUSTER-1:0]  rx_valid,
  output flit_t                         rx_flit   [TILES_PER_CLUSTER],
  output logic [TILES_PER_CLUSTER-1:0]  token_lost
);
  localparam int unsigned N      = TILES_PER_CLUSTER;
  localparam int unsigned MAXLAT = INTRA ? LINK_LAT_INTRA : LINK_LAT_INTER;

  for (genvar r = 0; r < N; r++) begin : g_ch
    logic [N-1:0] req_r, grant_r, launch_r;
    flit_t        tx_r [N];
    for (genvar w = 0; w < N; w++) begin : g_w
      assign req_r[w]        = tok_req[w][r];
      assign launch_r[w]     = launch[w][r];
      assign tx_r[w]         = tx_flit[w][r];
      assign tok_grant[w][r] = grant_r[w];
    end
    mwsr_channel #(.NW(N), .MAXLAT(MAXLAT)) u_ch (
      .clk        (clk),
      .rst        (rst),
      .token_in   (token_in[r]),
      .req        (req_r),
      .grant      (grant_r),
      .launch     (launch_r),
      .tx_data    (tx_r),
      .rx_valid   (rx_valid[r]),
      .rx_data    (rx_flit[r]),
      .token_lost (token_lost[r])
    );
  end
endmodule
