// optical_tx_port: the sending side of one optical output of a router.
//
// Flits switched to this optical output wait in NSLOT slots (the optical
// arbitration stage, OA). Every waiting slot raises the token request line
// of its destination's home channel, one of the 16 channels of the crossbar
// slice this output writes, so the port can compete for several home
// channels at once. Among slots bound for the same destination only the
// oldest requests, which keeps flits to one destination in order. When the
// arbitration waveguide hands over a channel's token (tok_grant, same
// cycle), the requesting slot's flit moves into that slot's E/O register
// and, during the next cycle, drives the modulators of that home channel
// (launch[j] with tx_flit[j]). Flits on different channels may launch in the
// same cycle, since each channel has its own modulators. A captured token
// entitles the sender to exactly one flit. A slot is free again in its
// capture cycle, so a new flit may enter at once (in_ready).
//
// One-token-one-flit, the OA -> EO order and several concurrent requests
// from the four cores of a tile follow the network description; the slot
// count (one per core), the age order per destination and the lowest-free-
// slot allocation are this design's choices.
module optical_tx_port
  import mpnoc_pkg::*;
#(
  parameter int unsigned NSLOT = CORES_PER_TILE
) (
  input  logic                          clk,
  input  logic                          rst,
  // from the router crossbar
  input  logic                          in_valid,
  input  flit_t                         in_flit,
  output logic                          in_ready,
  // arbitration waveguide (one line per home channel of the slice)
  output logic [TILES_PER_CLUSTER-1:0]  tok_req,
  input  logic [TILES_PER_CLUSTER-1:0]  tok_grant,
  // data waveguide bundles (E/O stage outputs, one per home channel)
  output logic [TILES_PER_CLUSTER-1:0]  launch,
  output flit_t                         tx_flit [TILES_PER_CLUSTER],
  // event strobes for observation
  output logic [TILES_PER_CLUSTER-1:0]  captured,
  output logic                          waiting
);
  localparam int unsigned N = TILES_PER_CLUSTER;

  logic [NSLOT-1:0] slot_v;
  flit_t            slot_f [NSLOT];
  cl_idx_t          slot_d [NSLOT];
  logic [NSLOT-1:0] older  [NSLOT];   // older[s][t]: slot t was filled before slot s
  logic [NSLOT-1:0] req_s, cap_s, free_s;
  logic [NSLOT-1:0] eo_v;
  flit_t            eo_f   [NSLOT];
  cl_idx_t          eo_d   [NSLOT];
  logic             alloc;
  logic [NSLOT-1:0] alloc_s;

  // the oldest waiting slot for each destination requests its token
  always_comb begin
    tok_req = '0;
    for (int s = 0; s < int'(NSLOT); s++) begin
      req_s[s] = slot_v[s];
      for (int t = 0; t < int'(NSLOT); t++)
        if (slot_v[t] && older[s][t] && slot_d[t] == slot_d[s]) req_s[s] = 1'b0;
      if (req_s[s]) tok_req[slot_d[s]] = 1'b1;
    end
  end

  always_comb
    for (int s = 0; s < int'(NSLOT); s++) cap_s[s] = req_s[s] && tok_grant[slot_d[s]];

  assign captured = tok_grant & tok_req;
  assign waiting  = |(req_s & ~cap_s);
  assign free_s   = ~slot_v | cap_s;
  assign in_ready = |free_s;

  // lowest free slot takes the incoming flit
  always_comb begin
    alloc_s = '0;
    for (int s = int'(NSLOT) - 1; s >= 0; s--) if (free_s[s]) alloc_s = NSLOT'(1) << s;
  end
  assign alloc = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      slot_v <= '0;
      eo_v   <= '0;
    end else begin
      eo_v   <= cap_s;
      slot_v <= (slot_v & ~cap_s) | (alloc ? alloc_s : '0);
    end
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < int'(NSLOT); s++) begin
      if (cap_s[s]) begin
        eo_f[s] <= slot_f[s];
        eo_d[s] <= slot_d[s];
      end
      if (alloc && alloc_s[s]) begin
        slot_f[s] <= in_flit;
        slot_d[s] <= index_in_cluster(in_flit.dst_tile);
        older[s]  <= slot_v & ~cap_s;      // every slot still waiting is older
      end else if (alloc) begin
        older[s]  <= older[s] & ~alloc_s;  // the new flit is younger than all
      end
    end
  end

  always_comb begin
    launch = '0;
    for (int j = 0; j < int'(N); j++) tx_flit[j] = '0;
    for (int s = 0; s < int'(NSLOT); s++) begin
      if (eo_v[s]) begin
        launch[eo_d[s]]  = 1'b1;
        tx_flit[eo_d[s]] = eo_f[s];
      end
    end
  end

  a_grant_only_when_asked: assert property (@(posedge clk) disable iff (rst)
    (tok_grant & ~tok_req) == '0);
endmodule
