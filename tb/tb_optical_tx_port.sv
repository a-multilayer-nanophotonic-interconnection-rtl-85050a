// tb_optical_tx_port: the sending side of an optical output.
// A random stream of flits to random tiles of the destination cluster is
// offered; the test plays the arbitration waveguide and grants each
// requested token with a random probability. A reference model keeps the
// waiting flits in arrival order (at most four). Checked every cycle: the
// request lines are exactly the destinations of the waiting flits, a grant
// frees a place in the same cycle (in_ready), the oldest waiting flit for
// each granted channel is launched on that channel exactly one cycle after
// capture and nowhere else, several channels can launch in one cycle, and
// with a token every cycle one flit per cycle gets through.
module tb_optical_tx_port;
  import mpnoc_pkg::*;
  localparam int N = TILES_PER_CLUSTER;
  localparam int NSLOT = CORES_PER_TILE;
  logic clk = 0, rst = 1;
  logic in_valid, in_ready;
  flit_t in_flit;
  flit_t tx_flit [N];
  logic [N-1:0] tok_req, tok_grant, launch, captured;
  logic waiting;
  int checks = 0, failures = 0;
  int grant_pct;
  int launched, multi;

  optical_tx_port dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(tile_id_t t);
    return int'(t[4:3]) * 4 + int'(t[1:0]);
  endfunction

  flit_t        wait_q[$];        // waiting flits, oldest first
  logic [N-1:0] exp_launch;
  flit_t        exp_flit [N];
  logic         in_ready_q = 1'b1;
  int           launched_at_4000 = 0;

  initial begin
    in_valid = 0; in_flit = '0; tok_grant = '0; grant_pct = 30; launched = 0; multi = 0;
    exp_launch = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      logic [N-1:0] exp_req, got;
      int nl;
      if (cyc == 4000) grant_pct = 100;
      @(negedge clk);
      if (!in_valid || in_ready_q) begin
        in_valid = ($urandom_range(0, 99) < 70) || cyc >= 4000;
        in_flit  = {8{$urandom()}};
        // a few destinations only, so that flits often share one
        if (cyc < 2000) in_flit.dst_tile[1:0] = 2'b00;
      end
      #1;
      exp_req = '0;
      foreach (wait_q[k]) exp_req[idx(wait_q[k].dst_tile)] = 1'b1;
      checks++;
      if (tok_req != exp_req) begin
        failures++; $display("cyc %0d: tok_req %b, expected %b", cyc, tok_req, exp_req);
      end
      tok_grant = '0;
      for (int j = 0; j < N; j++)
        if (tok_req[j] && $urandom_range(0, 99) < grant_pct) tok_grant[j] = 1'b1;
      #1;
      checks++;
      if (captured != (tok_grant & exp_req)) begin
        failures++; $display("cyc %0d: captured %b wrong", cyc, captured);
      end
      checks++;
      if (waiting != ((exp_req & ~tok_grant) != '0)) begin
        failures++; $display("cyc %0d: waiting wrong", cyc);
      end
      checks++;
      if (in_ready != (wait_q.size() - $countones(tok_grant & exp_req) < NSLOT)) begin
        failures++; $display("cyc %0d: in_ready %b wrong with %0d waiting", cyc, in_ready, wait_q.size());
      end
      // launches for the captures of the previous cycle
      checks++;
      if (launch != exp_launch) begin
        failures++; $display("cyc %0d: launch %b, expected %b", cyc, launch, exp_launch);
      end
      for (int j = 0; j < N; j++) if (exp_launch[j]) begin
        checks++;
        if (tx_flit[j] != exp_flit[j]) begin failures++; $display("cyc %0d: wrong flit on channel %0d", cyc, j); end
      end
      nl = $countones(exp_launch);
      launched += nl;
      if (nl > 1) multi++;
      // model update: the oldest flit per granted channel leaves
      exp_launch = '0;
      got = '0;
      for (int k = 0; k < wait_q.size(); k++) begin
        int j;
        j = idx(wait_q[k].dst_tile);
        if (tok_grant[j] && !got[j]) begin
          got[j] = 1'b1; exp_launch[j] = 1'b1; exp_flit[j] = wait_q[k];
          wait_q.delete(k); k--;
        end
      end
      if (in_valid && in_ready) wait_q.push_back(in_flit);
      in_ready_q = in_ready;
      if (cyc == 4000) launched_at_4000 = launched;
      if (cyc == 5999) begin
        checks++;
        if (launched - launched_at_4000 < 1995) begin
          failures++; $display("throughput too low: %0d launches in 2000 cycles", launched - launched_at_4000);
        end
        checks++;
        if (multi == 0) begin failures++; $display("never launched on two channels at once"); end
      end
    end
    $display("launched %0d flits, %0d cycles with several channels at once", launched, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
