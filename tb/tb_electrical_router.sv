// tb_electrical_router: one tile router (tile 13: grid x=5, y=1, so
// cluster 1, index 5 inside the cluster) in a test harness that plays the
// cores, the memory/IO port and the four optical layers.
// Directed part: the latency of a lone flit core->core (2 cycles from
// offer to output), optical input->core (3 cycles from the detector) and
// core->optical request (2 cycles). Random part: all five local inputs and
// all four home channels inject at once; the harness grants tokens at random
// and answers each token the router emits with at most one flit, cores
// accept at random. Every flit must leave exactly once on the output worked
// out from its header (own tile: the named local port; other tile: optical
// layer = cluster(13) XOR cluster(destination), on the channel of the
// destination's in-cluster index), in order per input/output pair (per
// input, layer and destination tile on an optical output, which may send
// flits to different tiles out of order).
module tb_electrical_router;
  import mpnoc_pkg::*;
  localparam int MY = 13;
  localparam int NL = NUM_LOCAL, NP = NUM_PORTS, NLY = NUM_LAYERS, NC = TILES_PER_CLUSTER;
  logic clk = 0, rst = 1;
  tile_id_t tile_id;
  logic [NL-1:0] local_in_valid, local_in_ready, local_out_valid, local_out_ready;
  flit_t local_in_flit [NL];
  flit_t local_out_flit [NL];
  logic [NC-1:0] opt_tok_req [NLY];
  logic [NC-1:0] opt_tok_grant [NLY];
  logic [NC-1:0] opt_launch [NLY];
  flit_t opt_tx_flit [NLY][NC];
  logic [NLY-1:0] opt_rx_valid, opt_token_out;
  flit_t opt_rx_flit [NLY];
  logic [NC-1:0] ev_token_captured [NLY];
  logic [NLY-1:0] ev_token_wait, ev_token_withheld, ev_rx_overflow;
  logic [NP-1:0] ev_sa_blocked;
  int checks = 0, failures = 0;
  int multi = 0;

  electrical_router dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cl(int t);
    return 2 * ((t / 8) >= 4 ? 1 : 0) + ((t % 8) >= 4 ? 1 : 0);
  endfunction
  function automatic int cidx(int t);
    return 4 * ((t / 8) % 4) + (t % 4);
  endfunction
  // expected router output for a flit
  function automatic int exp_out(flit_t f);
    if (int'(f.dst_tile) == MY) return int'(f.dst_port);
    return NL + (cl(MY) ^ cl(int'(f.dst_tile)));
  endfunction

  flit_t q [NP][NP][$];   // [input][output]
  int seq = 0, sent = 0, recv = 0, blocked = 0;
  bit random_phase = 0;

  function automatic flit_t make_flit(int in_port, bit to_me);
    flit_t f;
    f = {8{$urandom()}};
    f.dst_tile = to_me ? tile_id_t'(MY) : tile_id_t'($urandom_range(0, 63));
    f.dst_port = port_id_t'($urandom_range(0, NL - 1));
    f.src_port = port_id_t'(in_port);
    f.payload[31:0] = seq++;
    return f;
  endfunction

  task automatic take(int o, flit_t f);
    int in_p, k;
    in_p = int'(f.src_port);
    checks++;
    k = -1;
    if (in_p < NP)
      for (int m = 0; m < q[in_p][o].size() && k < 0; m++)
        if (o < NL || q[in_p][o][m].dst_tile == f.dst_tile) k = m;
    if (k < 0 || q[in_p][o][k] != f) begin
      failures++;
      if (failures < 10) $display("output %0d: unexpected flit from input %0d (seq %0d)", o, in_p, f.payload[31:0]);
    end else begin
      q[in_p][o].delete(k);
    end
    recv++;
  endtask

  // optical input side: flits answering tokens
  // a token is answered (or lost) a fixed 6 cycles after it leaves, as on
  // a real channel where an unused token falls off the waveguide
  logic [5:0] tok_pipe [NLY];

  initial begin
    tile_id = tile_id_t'(MY);
    local_in_valid = '0; local_out_ready = '1; opt_rx_valid = '0;
    for (int i = 0; i < NL; i++) local_in_flit[i] = '0;
    for (int p = 0; p < NLY; p++) begin opt_tok_grant[p] = '0; opt_rx_flit[p] = '0; tok_pipe[p] = '0; end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);

    // ---- directed latency: core 0 -> core 3 of this tile
    begin
      flit_t f; int c;
      @(negedge clk);
      f = make_flit(0, 1); f.dst_port = 3;
      local_in_flit[0] = f; local_in_valid[0] = 1;
      @(negedge clk); local_in_valid[0] = 0;
      c = 1;
      while (!local_out_valid[3] && c < 20) begin @(negedge clk); c++; end
      checks++;
      if (c != 2 || local_out_flit[3] != f) begin failures++; $display("core->core latency %0d (exp 2)", c); end
    end
    // ---- directed latency: home channel layer 2 -> memory/IO port
    begin
      flit_t f; int c;
      @(negedge clk);
      f = make_flit(NL + 2, 1); f.dst_port = 4;
      opt_rx_flit[2] = f; opt_rx_valid[2] = 1;
      @(negedge clk); opt_rx_valid[2] = 0;
      c = 1;
      while (!local_out_valid[4] && c < 20) begin @(negedge clk); c++; end
      checks++;
      if (c != 3 || local_out_flit[4] != f) begin failures++; $display("optical->local latency %0d (exp 3)", c); end
    end
    // ---- directed: core 1 -> tile 63 (cluster 3): layer 1^3 = 2, channel cidx(63) = 15
    begin
      flit_t f; int c;
      @(negedge clk);
      f = make_flit(1, 0); f.dst_tile = 63;
      local_in_flit[1] = f; local_in_valid[1] = 1;
      @(negedge clk); local_in_valid[1] = 0;
      c = 1;
      while (opt_tok_req[2] == '0 && c < 20) begin @(negedge clk); c++; end
      checks++;
      if (c != 2 || opt_tok_req[2] != NC'(1) << cidx(63)) begin failures++; $display("core->optical request after %0d, %b", c, opt_tok_req[2]); end
      opt_tok_grant[2] = opt_tok_req[2];
      @(negedge clk);
      opt_tok_grant[2] = '0;
      checks++;
      if (opt_launch[2] != NC'(1) << cidx(63) || opt_tx_flit[2][cidx(63)] != f) begin failures++; $display("launch wrong"); end
    end
    repeat (5) @(posedge clk);

    // ---- random traffic
    random_phase = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      bit gen;
      gen = (cyc < 7000);
      @(negedge clk);
      // local inputs: keep offering until accepted
      for (int i = 0; i < NL; i++) begin
        if (!local_in_valid[i] && gen && $urandom_range(0, 99) < 40)
          begin local_in_flit[i] = make_flit(i, $urandom_range(0, 1)); local_in_valid[i] = 1; end
      end
      // optical inputs: use tokens the router granted
      for (int p = 0; p < NLY; p++) begin
        opt_rx_valid[p] = 0;
        if (tok_pipe[p][5] && gen && $urandom_range(0, 99) < 70) begin
          opt_rx_flit[p] = make_flit(NL + p, 1);
          opt_rx_valid[p] = 1;
          q[NL + p][exp_out(opt_rx_flit[p])].push_back(opt_rx_flit[p]);
          sent++;
        end
      end
      local_out_ready = NL'($urandom()) | NL'($urandom());
      #1;
      for (int p = 0; p < NLY; p++) opt_tok_grant[p] = ($urandom_range(0, 99) < 60) ? opt_tok_req[p] : '0;
      #1;
      blocked += $countones(ev_sa_blocked);
      @(posedge clk);
      // sample handshakes at the clock edge
      for (int i = 0; i < NL; i++) if (local_in_valid[i] && local_in_ready[i]) begin
        q[i][exp_out(local_in_flit[i])].push_back(local_in_flit[i]);
        sent++;
        local_in_valid[i] <= 0;
      end
      for (int o = 0; o < NL; o++) if (local_out_valid[o] && local_out_ready[o]) take(o, local_out_flit[o]);
      for (int p = 0; p < NLY; p++) begin
        tok_pipe[p] = {tok_pipe[p][4:0], opt_token_out[p]};
        if ($countones(opt_launch[p]) > 1) multi++;
        for (int j = 0; j < NC; j++) if (opt_launch[p][j]) begin
          checks++;
          if (cidx(int'(opt_tx_flit[p][j].dst_tile)) != j) begin
            failures++; $display("layer %0d launched on channel %0d for tile %0d", p, j, opt_tx_flit[p][j].dst_tile);
          end
          take(NL + p, opt_tx_flit[p][j]);
        end
      end
    end
    for (int i = 0; i < NP; i++) for (int o = 0; o < NP; o++) begin
      checks++;
      if (q[i][o].size() != 0) begin failures++; $display("input %0d output %0d: %0d flits never left", i, o, q[i][o].size()); end
    end
    checks++;
    if (recv < 3000 || blocked == 0 || multi == 0) begin failures++; $display("too little traffic: %0d delivered, %0d conflicts", recv, blocked); end
    $display("router: %0d flits sent, %0d delivered, %0d allocation conflicts, %0d multi-channel launches", sent, recv, blocked, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
