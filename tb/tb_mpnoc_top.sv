// tb_mpnoc_top: end-to-end test of the whole 64-tile, 256-core network at
// its full size (no parameter is changed).
//
// 1. Zero-load latency. Lone flits between chosen tiles must arrive after
//    7 + MAXLAT - lat(w) cycles, where MAXLAT is the longest link of the
//    slice (4 inter-cluster, 2 intra-cluster) and lat(w) = 1 + w*MAXLAT/16
//    is the token latency of the sender's position w in its cluster;
//    a flit between two cores of one tile takes 2 cycles.
// 2. Uniform random traffic from all 256 cores and 64 memory/IO ports
//    with randomly stalling sinks.
// 3. Hot spot: every tile of the chip sends to one core whose sink is held
//    off for a while, so that its home channels run out of buffer space and
//    the receiver must withhold tokens; then the sink is released.
// Every flit must reach the tile and port its header names exactly once,
// with its data. The events the design is built around are counted and each
// must happen at least once: token capture, waiting for a token, token
// withheld for lack of buffer space, unused token slots, switch allocation
// conflicts, same-tile delivery without the optics, intra- and
// inter-cluster delivery, delivery to the memory/IO port, sink back-pressure.
module tb_mpnoc_top;
  import mpnoc_pkg::*;
  localparam int NT = NUM_TILES, NL = NUM_LOCAL, NLY = NUM_LAYERS;
  logic clk = 0, rst = 1;
  logic  [NL-1:0] in_valid  [NT];
  flit_t          in_flit   [NT][NL];
  logic  [NL-1:0] in_ready  [NT];
  logic  [NL-1:0] out_valid [NT];
  flit_t          out_flit  [NT][NL];
  logic  [NL-1:0] out_ready [NT];
  logic  [TILES_PER_CLUSTER-1:0] ev_token_captured [NT][NLY];
  logic  [NLY-1:0] ev_token_wait     [NT];
  logic  [NLY-1:0] ev_token_withheld [NT];
  logic  [NLY-1:0] ev_rx_overflow    [NT];
  logic  [NUM_PORTS-1:0] ev_sa_blocked [NT];
  logic  [TILES_PER_CLUSTER-1:0] ev_token_lost [NUM_CLUSTERS*NUM_CLUSTERS];
  int checks = 0, failures = 0;

  mpnoc_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cl(int t);
    return 2 * ((t / 8) >= 4 ? 1 : 0) + ((t % 8) >= 4 ? 1 : 0);
  endfunction
  function automatic int cidx(int t);
    return 4 * ((t / 8) % 4) + (t % 4);
  endfunction

  // scoreboard: outstanding flits by sequence number
  flit_t outstanding [int];
  int    sent_cycle  [int];
  int seq = 0, cyc = 0, delivered = 0;
  int n_captured = 0, n_wait = 0, n_withheld = 0, n_lost = 0, n_blocked = 0;
  int n_local = 0, n_intra = 0, n_inter = 0, n_io = 0, n_backpressure = 0, n_overflow = 0;
  int last_latency = -1;
  // traffic control
  int  inj_pct = 0;
  bit  hotspot = 0;
  bit  stall_hot = 0;
  int  sink_pct = 100;

  function automatic flit_t make_flit(int src, int port, int dst, int dport);
    flit_t f;
    f = {8{$urandom()}};
    f.dst_tile = tile_id_t'(dst);
    f.dst_port = port_id_t'(dport);
    f.src_tile = tile_id_t'(src);
    f.src_port = port_id_t'(port);
    f.payload[31:0] = seq;
    outstanding[seq] = f;
    seq++;
    return f;
  endfunction

  // delivery and event monitor
  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      for (int t = 0; t < NT; t++) begin
        for (int p = 0; p < NLY; p++) n_captured += $countones(ev_token_captured[t][p]);
        n_wait     += $countones(ev_token_wait[t]);
        n_withheld += $countones(ev_token_withheld[t]);
        n_overflow += $countones(ev_rx_overflow[t]);
        n_blocked  += $countones(ev_sa_blocked[t]);
        for (int o = 0; o < NL; o++) begin
          if (out_valid[t][o] && !out_ready[t][o]) n_backpressure++;
          if (out_valid[t][o] && out_ready[t][o]) begin
            flit_t f;
            int s;
            f = out_flit[t][o];
            s = int'(f.payload[31:0]);
            checks++;
            if (!outstanding.exists(s) || outstanding[s] != f || int'(f.dst_tile) != t || int'(f.dst_port) != o) begin
              failures++;
              if (failures < 10) $display("tile %0d port %0d: unexpected flit seq %0d", t, o, s);
            end else begin
              outstanding.delete(s);
              last_latency = cyc - sent_cycle[s];
              if (int'(f.src_tile) == t) n_local++;
              else if (cl(int'(f.src_tile)) == cl(t)) n_intra++;
              else n_inter++;
              if (o == NL - 1) n_io++;
            end
            delivered++;
          end
        end
      end
      for (int k = 0; k < NUM_CLUSTERS * NUM_CLUSTERS; k++) n_lost += $countones(ev_token_lost[k]);
    end
  end

  // sources: one per tile and local port, hold a flit until accepted
  always @(negedge clk) begin
    if (!rst) begin
      for (int t = 0; t < NT; t++) begin
        for (int p = 0; p < NL; p++) begin
          if (in_valid[t][p] && in_ready_q[t][p]) in_valid[t][p] = 0;
          if (!in_valid[t][p] && inj_pct > 0 && $urandom_range(0, 999) < inj_pct) begin
            int d, dp;
            if (hotspot) begin d = 0; dp = 0; end
            else begin d = $urandom_range(0, NT - 1); dp = $urandom_range(0, NL - 1); end
            in_flit[t][p] = make_flit(t, p, d, dp);
            in_valid[t][p] = 1;
            sent_cycle[seq - 1] = cyc + 1;
          end
        end
        for (int o = 0; o < NL; o++)
          out_ready[t][o] = (stall_hot && t == 0 && o == 0) ? 1'b0 : ($urandom_range(0, 99) < sink_pct);
      end
    end
  end
  // handshake seen at the last clock edge
  logic [NL-1:0] in_ready_q [NT];
  always @(posedge clk) for (int t = 0; t < NT; t++) in_ready_q[t] <= in_ready[t] & in_valid[t];

  task automatic lone_flit(int src, int dst, int dport, int exp_lat);
    flit_t f;
    @(negedge clk);
    #1;
    f = make_flit(src, 0, dst, dport);
    in_flit[src][0] = f;
    in_valid[src][0] = 1;
    sent_cycle[seq - 1] = cyc + 1;
    repeat (30) @(posedge clk);
    checks++;
    if (outstanding.exists(int'(f.payload[31:0])) || last_latency != exp_lat) begin
      failures++;
      $display("lone flit %0d -> %0d: latency %0d, expected %0d", src, dst, last_latency, exp_lat);
    end
  endtask

  function automatic int zero_load(int src, int dst);
    int maxlat, w;
    if (src == dst) return 2;
    maxlat = (cl(src) == cl(dst)) ? LINK_LAT_INTRA : LINK_LAT_INTER;
    w = cidx(src);
    return 7 + maxlat - (1 + (w * maxlat) / TILES_PER_CLUSTER);
  endfunction

  initial begin
    for (int t = 0; t < NT; t++) begin
      in_valid[t] = '0; out_ready[t] = '1; in_ready_q[t] = '0;
      for (int p = 0; p < NL; p++) in_flit[t][p] = '0;
    end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (20) @(posedge clk);

    // 1. zero-load latency
    lone_flit(0, 63, 1, zero_load(0, 63));    // inter, far writer
    lone_flit(63, 0, 2, zero_load(63, 0));    // inter, near writer
    lone_flit(0, 27, 3, zero_load(0, 27));    // intra
    lone_flit(36, 36, 4, zero_load(36, 36));  // same tile, to memory/IO
    lone_flit(45, 9, 0, zero_load(45, 9));    // inter, middle writer
    $display("zero-load latencies: 0->63 %0d, 63->0 %0d, 0->27 %0d, same tile %0d cycles",
             zero_load(0, 63), zero_load(63, 0), zero_load(0, 27), zero_load(36, 36));

    // 2. uniform random traffic
    inj_pct = 150; sink_pct = 90;
    repeat (1500) @(posedge clk);
    inj_pct = 0;
    repeat (300) @(posedge clk);
    checks++;
    if (outstanding.size() != 0) begin failures++; $display("uniform: %0d flits not delivered", outstanding.size()); end

    // 3. hot spot with a stalled sink
    sink_pct = 100; hotspot = 1; stall_hot = 1; inj_pct = 8;
    repeat (400) @(posedge clk);
    inj_pct = 0;
    repeat (100) @(posedge clk);
    stall_hot = 0;
    repeat (3000) @(posedge clk);
    hotspot = 0;
    checks++;
    if (outstanding.size() != 0) begin failures++; $display("hot spot: %0d flits not delivered", outstanding.size()); end

    // mechanisms
    checks++; if (n_overflow != 0) begin failures++; $display("input buffer overflow %0d", n_overflow); end
    checks++; if (n_captured == 0) begin failures++; $display("no token captured"); end
    checks++; if (n_wait == 0) begin failures++; $display("no sender waited for a token"); end
    checks++; if (n_withheld == 0) begin failures++; $display("no token withheld"); end
    checks++; if (n_lost == 0) begin failures++; $display("no unused token slot"); end
    checks++; if (n_blocked == 0) begin failures++; $display("no allocation conflict"); end
    checks++; if (n_local == 0) begin failures++; $display("no same-tile delivery"); end
    checks++; if (n_intra == 0) begin failures++; $display("no intra-cluster delivery"); end
    checks++; if (n_inter == 0) begin failures++; $display("no inter-cluster delivery"); end
    checks++; if (n_io == 0) begin failures++; $display("no memory/IO delivery"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("no sink back-pressure"); end
    checks++; if (n_captured != n_intra + n_inter) begin failures++; $display("captures %0d != optical deliveries %0d", n_captured, n_intra + n_inter); end
    $display("delivered %0d flits (same tile %0d, intra-cluster %0d, inter-cluster %0d, to memory/IO %0d)",
             delivered, n_local, n_intra, n_inter, n_io);
    $display("events: tokens captured %0d, token waits %0d, tokens withheld %0d, unused token slots %0d, allocation conflicts %0d, sink stalls %0d",
             n_captured, n_wait, n_withheld, n_lost, n_blocked, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
