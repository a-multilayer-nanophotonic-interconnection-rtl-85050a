// electrical_router: the single-cycle electrical router of one tile.
//
// Nine ports: four cores (ports 0..3, each core with its L1 and the shared
// L2 behind it), one memory/IO port (4) and one optical port per layer
// (5..8). Each local input has a 64-flit input buffer; each optical input is
// an optical_rx_port (O/E register, 64-flit buffer, token generation). The
// head flit of every buffer goes through route computation; the switch
// allocator grants each output to one requester; the crossbar moves the
// granted flits, all in one cycle. Local outputs are registered with a
// valid/ready handshake toward the core or memory/IO; optical outputs go to
// an optical_tx_port that holds up to four flits waiting for their
// destinations' tokens and then drives the E/O stage of each home channel.
//
// Timing: a flit written into an input buffer at edge t is switched in the
// next cycle and is in the output register (or the optical arbitration
// register) after edge t+1: one router cycle. Local ingress: in_ready is
// the buffer's not-full, a flit is accepted when in_valid && in_ready.
//
// The component list (input buffers, RC, SA, crossbar, E/O and O/E toward
// four optical layers, token interfaces, memory/IO port) and the single
// cycle follow the router description; with one virtual channel per port
// there is no virtual channel allocation. Port numbering, round-robin
// allocation and handshakes are this design's choices.
module electrical_router
  import mpnoc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  tile_id_t                      tile_id,
  // local ports: cores 0..3 and memory/IO
  input  logic  [NUM_LOCAL-1:0]         local_in_valid,
  input  flit_t                         local_in_flit  [NUM_LOCAL],
  output logic  [NUM_LOCAL-1:0]         local_in_ready,
  output logic  [NUM_LOCAL-1:0]         local_out_valid,
  output flit_t                         local_out_flit [NUM_LOCAL],
  input  logic  [NUM_LOCAL-1:0]         local_out_ready,
  // optical outputs, one per layer
  output logic  [TILES_PER_CLUSTER-1:0] opt_tok_req    [NUM_LAYERS],
  input  logic  [TILES_PER_CLUSTER-1:0] opt_tok_grant  [NUM_LAYERS],
  output logic  [TILES_PER_CLUSTER-1:0] opt_launch     [NUM_LAYERS],
  output flit_t                         opt_tx_flit    [NUM_LAYERS][TILES_PER_CLUSTER],
  // optical inputs, one per layer (this tile's home channels)
  input  logic  [NUM_LAYERS-1:0]        opt_rx_valid,
  input  flit_t                         opt_rx_flit    [NUM_LAYERS],
  output logic  [NUM_LAYERS-1:0]        opt_token_out,
  // observation
  output logic  [TILES_PER_CLUSTER-1:0] ev_token_captured [NUM_LAYERS],
  output logic  [NUM_LAYERS-1:0]        ev_token_wait,
  output logic  [NUM_LAYERS-1:0]        ev_token_withheld,
  output logic  [NUM_LAYERS-1:0]        ev_rx_overflow,
  output logic  [NUM_PORTS-1:0]         ev_sa_blocked
);
  logic [NUM_PORTS-1:0] head_valid;
  flit_t                head_flit [NUM_PORTS];
  logic [NUM_PORTS-1:0] pop;
  port_id_t             req_port  [NUM_PORTS];
  logic [NUM_PORTS-1:0] is_opt;
  logic [NUM_PORTS-1:0] out_ready;
  logic [NUM_PORTS-1:0] in_grant;
  logic [NUM_PORTS-1:0] xb_valid;
  port_id_t             xb_sel    [NUM_PORTS];
  logic [FLIT_W-1:0]    xb_in     [NUM_PORTS];
  logic [FLIT_W-1:0]    xb_out    [NUM_PORTS];

  // ---------------- input side ----------------
  for (genvar i = 0; i < NUM_LOCAL; i++) begin : g_lin
    logic full, empty;
    logic [$clog2(BUF_DEPTH+1)-1:0] count;
    logic [FLIT_W-1:0] rd;
    flit_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk     (clk),
      .rst     (rst),
      .push    (local_in_valid[i] && !full),
      .wr_data (local_in_flit[i]),
      .pop     (pop[i]),
      .rd_data (rd),
      .empty   (empty),
      .full    (full),
      .count   (count)
    );
    assign local_in_ready[i] = !full;
    assign head_valid[i]     = !empty;
    assign head_flit[i]      = flit_t'(rd);
  end

  for (genvar p = 0; p < NUM_LAYERS; p++) begin : g_oin
    optical_rx_port #(
      .DEPTH   (BUF_DEPTH),
      .RESERVE ((p == 0) ? RESERVE_INTRA : RESERVE_INTER)
    ) u_rx (
      .clk            (clk),
      .rst            (rst),
      .rx_valid       (opt_rx_valid[p]),
      .rx_flit        (opt_rx_flit[p]),
      .token_out      (opt_token_out[p]),
      .head_valid     (head_valid[NUM_LOCAL+p]),
      .head_flit      (head_flit[NUM_LOCAL+p]),
      .pop            (pop[NUM_LOCAL+p]),
      .overflow       (ev_rx_overflow[p]),
      .token_withheld (ev_token_withheld[p])
    );
  end

  // ---------------- route computation ----------------
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_rc
    route_compute u_rc (
      .my_tile    (tile_id),
      .flit       (head_flit[i]),
      .out_port   (req_port[i]),
      .is_optical (is_opt[i])
    );
    assign xb_in[i] = head_flit[i];
  end

  // ---------------- switch allocation and crossbar ----------------
  switch_allocator #(.N(NUM_PORTS)) u_sa (
    .clk       (clk),
    .rst       (rst),
    .req_valid (head_valid),
    .req_port  (req_port),
    .out_ready (out_ready),
    .in_grant  (in_grant),
    .out_valid (xb_valid),
    .out_sel   (xb_sel)
  );
  assign pop           = in_grant;
  assign ev_sa_blocked = head_valid & ~in_grant;

  crossbar_switch #(.N(NUM_PORTS), .W(FLIT_W)) u_xb (
    .in_data  (xb_in),
    .sel      (xb_sel),
    .en       (xb_valid),
    .out_data (xb_out)
  );

  // ---------------- output side ----------------
  for (genvar o = 0; o < NUM_LOCAL; o++) begin : g_lout
    assign out_ready[o] = !local_out_valid[o] || local_out_ready[o];
    always_ff @(posedge clk) begin
      if (rst)                     local_out_valid[o] <= 1'b0;
      else if (xb_valid[o])        local_out_valid[o] <= 1'b1;
      else if (local_out_ready[o]) local_out_valid[o] <= 1'b0;
      if (xb_valid[o]) local_out_flit[o] <= flit_t'(xb_out[o]);
    end
  end

  for (genvar p = 0; p < NUM_LAYERS; p++) begin : g_oout
    optical_tx_port u_tx (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (xb_valid[NUM_LOCAL+p]),
      .in_flit   (flit_t'(xb_out[NUM_LOCAL+p])),
      .in_ready  (out_ready[NUM_LOCAL+p]),
      .tok_req   (opt_tok_req[p]),
      .tok_grant (opt_tok_grant[p]),
      .launch    (opt_launch[p]),
      .tx_flit   (opt_tx_flit[p]),
      .captured  (ev_token_captured[p]),
      .waiting   (ev_token_wait[p])
    );
  end

  // A flit never asks for a port that does not exist.
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_chk
    a_valid_port: assert property (@(posedge clk) disable iff (rst)
      !head_valid[i] || (req_port[i] < port_id_t'(NUM_PORTS)));
    a_optical_route: assert property (@(posedge clk) disable iff (rst)
      !head_valid[i] || (is_opt[i] == (req_port[i] >= port_id_t'(NUM_LOCAL))));
  end
endmodule
