// tb_mpnoc_traffic: saturation throughput of the full network under the
// seven synthetic traffic patterns used to evaluate the design: uniform
// random, bit-complement, bit-reversal, transpose, tornado, neighbor and
// perfect shuffle, defined on the 6-bit tile number (x = t[2:0],
// y = t[5:3] on the 8x8 grid):
//   bitcomp   d = ~s
//   bitrev    d = s with its 6 bits reversed
//   transpose (x, y) -> (y, x)
//   tornado   (x, y) -> ((x+3) mod 8, (y+3) mod 8)
//   neighbor  (x, y) -> ((x+1) mod 8, (y+1) mod 8)
//   shuffle   d = s rotated left by one bit
// Every core always has a flit ready (saturation); core c of the source
// sends to core c of the destination. After a warm-up the accepted flits
// are counted over a window and reported per tile per cycle; 1.0 is one
// flit per cycle, the rate of one home channel; flits that stay in their
// own tile (a tile the pattern maps onto itself) are reported apart. Checked:
// every flit arrives at the right tile and core with its data, and
// bit-reversal, which gives each home channel a single sender, runs at
// (nearly) full rate.
module tb_mpnoc_traffic;
  import mpnoc_pkg::*;
  localparam int NT = NUM_TILES, NL = NUM_LOCAL, NLY = NUM_LAYERS;
  localparam int WARM = 300, WINDOW = 1000, DRAIN = 1500;
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

  typedef enum int {UNIFORM, BITCOMP, BITREV, TRANSPOSE, TORNADO, NEIGHBOR, SHUFFLE} pattern_e;
  pattern_e pattern;
  bit  injecting = 0, measuring = 0;
  int  accepted = 0, accepted_opt = 0, seq = 0, overflow = 0;
  flit_t outstanding [int];

  function automatic int dest(pattern_e p, int s);
    int x, y;
    x = s % 8; y = s / 8;
    case (p)
      BITCOMP:   return (~s) & 63;
      BITREV: begin
        int r; r = 0;
        for (int b = 0; b < 6; b++) if (s[b]) r |= 1 << (5 - b);
        return r;
      end
      TRANSPOSE: return 8 * x + y;
      TORNADO:   return 8 * ((y + 3) % 8) + (x + 3) % 8;
      NEIGHBOR:  return 8 * ((y + 1) % 8) + (x + 1) % 8;
      SHUFFLE:   return ((s << 1) | (s >> 5)) & 63;
      default:   return $urandom_range(0, NT - 1);
    endcase
  endfunction

  logic [NL-1:0] accepted_q [NT];
  always @(posedge clk) for (int t = 0; t < NT; t++) accepted_q[t] <= in_ready[t] & in_valid[t];

  always @(negedge clk) begin
    if (!rst) begin
      for (int t = 0; t < NT; t++) begin
        for (int c = 0; c < CORES_PER_TILE; c++) begin
          if (in_valid[t][c] && accepted_q[t][c]) in_valid[t][c] = 0;
          if (!in_valid[t][c] && injecting) begin
            flit_t f;
            f = {8{$urandom()}};
            f.dst_tile = tile_id_t'(dest(pattern, t));
            f.dst_port = port_id_t'(c);
            f.src_tile = tile_id_t'(t);
            f.src_port = port_id_t'(c);
            f.payload[31:0] = seq;
            outstanding[seq] = f;
            seq++;
            in_flit[t][c] = f;
            in_valid[t][c] = 1;
          end
        end
      end
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      for (int t = 0; t < NT; t++) begin
        overflow += $countones(ev_rx_overflow[t]);
        for (int o = 0; o < NL; o++) begin
          if (out_valid[t][o]) begin
            flit_t f;
            int s;
            f = out_flit[t][o];
            s = int'(f.payload[31:0]);
            checks++;
            if (!outstanding.exists(s) || outstanding[s] != f || int'(f.dst_tile) != t || int'(f.dst_port) != o) begin
              failures++;
              if (failures < 10) $display("tile %0d port %0d: unexpected flit %0d", t, o, s);
            end else outstanding.delete(s);
            if (measuring) begin
              accepted++;
              if (int'(f.src_tile) != t) accepted_opt++;
            end
          end
        end
      end
    end
  end

  initial begin
    for (int t = 0; t < NT; t++) begin
      in_valid[t] = '0; out_ready[t] = '1; accepted_q[t] = '0;
      for (int p = 0; p < NL; p++) in_flit[t][p] = '0;
    end
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (10) @(posedge clk);
    for (int pi = 0; pi <= int'(SHUFFLE); pi++) begin
      real thr;
      int  senders;
      pattern = pattern_e'(pi);
      accepted = 0;
      accepted_opt = 0;
      // tiles whose traffic crosses the optical crossbar
      senders = 0;
      for (int t = 0; t < NT; t++) if (pattern == UNIFORM || dest(pattern, t) != t) senders++;
      injecting = 1;
      repeat (WARM) @(posedge clk);
      measuring = 1;
      repeat (WINDOW) @(posedge clk);
      measuring = 0;
      injecting = 0;
      repeat (DRAIN) @(posedge clk);
      thr = real'(accepted_opt) / real'(WINDOW * senders);
      $display("pattern %-9s: %0.3f flits/cycle per sending tile across the optics (%0d sending tiles), %0.3f flits/cycle/tile in all",
               pattern.name(), thr, senders, real'(accepted) / real'(WINDOW * NT));
      checks++;
      if (outstanding.size() != 0) begin
        failures++; $display("  %0d flits not delivered", outstanding.size());
        outstanding.delete();
      end
      if (pattern == BITREV) begin
        checks++;
        if (thr < 0.95) begin failures++; $display("  bit-reversal below full rate"); end
      end
      checks++;
      if (thr <= 0.0) begin failures++; $display("  nothing delivered"); end
    end
    checks++;
    if (overflow != 0) begin failures++; $display("input buffer overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
