// tb_mwsr_channel: token-slot arbitration and data delivery of one MWSR
// home channel (16 writers, longest link 4 cycles).
// The reader injects tokens at random; writers request at random and, as a
// real writer would, launch a flit tagged with their number one cycle after
// each grant. A reference model keeps every injected token and knows,
// from the layout formula (writer i sees a token 1 + i*4/16 cycles after
// injection), which writers it passes each cycle: it must go to the lowest
// numbered requester of the first group that wants it, or fall off the end.
// Every flit must reach the reader MAXLAT+2 cycles after its token was
// injected, with the sender's data; every token is used or lost once.
module tb_mwsr_channel;
  import mpnoc_pkg::*;
  localparam int NW = 16, MAXLAT = 4;
  logic clk = 0, rst = 1;
  logic token_in, rx_valid, token_lost;
  logic [NW-1:0] req, grant, launch;
  flit_t tx_data [NW];
  flit_t rx_data;
  int checks = 0, failures = 0;

  mwsr_channel #(.NW(NW), .MAXLAT(MAXLAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // token state per injection cycle: 1 = travelling, 0 = used / none
  bit   live [0:9999];
  int   exp_arrival_writer [0:9999];  // writer whose flit should arrive, -1 none
  flit_t exp_arrival_data [0:9999];
  int   grants, losts, arrivals, injected;

  function automatic int lat(int i);
    return 1 + (i * MAXLAT) / NW;
  endfunction

  initial begin
    token_in = 0; req = '0; launch = '0;
    for (int i = 0; i < NW; i++) tx_data[i] = '0;
    for (int c = 0; c < 10000; c++) begin live[c] = 0; exp_arrival_writer[c] = -1; end
    grants = 0; losts = 0; arrivals = 0; injected = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      logic [NW-1:0] exp_grant;
      logic [NW-1:0] next_launch;
      @(negedge clk);
      // drive this cycle's inputs
      token_in = (c < 2900) && ($urandom_range(0, 99) < 70);
      for (int i = 0; i < NW; i++) req[i] = (c < 2900) && ($urandom_range(0, 99) < 15);
      #1;
      // reference: which writer captures which token this cycle
      exp_grant = '0;
      for (int k = 1; k <= MAXLAT; k++) begin
        if (c - k >= 0 && live[c-k]) begin
          for (int i = 0; i < NW; i++) begin
            if (lat(i) == k && req[i] && live[c-k]) begin
              exp_grant[i] = 1'b1;
              live[c-k] = 0;
              // launched next cycle, at the reader MAXLAT+2 cycles after injection
              exp_arrival_writer[c-k+MAXLAT+2] = i;
            end
          end
        end
      end
      checks++;
      if (grant != exp_grant) begin
        failures++;
        if (failures < 10) $display("cyc %0d grant %b exp %b", c, grant, exp_grant);
      end
      // lost token: injected MAXLAT cycles ago and still travelling now
      checks++;
      if (token_lost != (c - MAXLAT >= 0 && live[c-MAXLAT])) begin
        failures++;
        if (failures < 10) $display("cyc %0d token_lost %b", c, token_lost);
      end
      if (token_lost) begin losts++; if (c - MAXLAT >= 0) live[c-MAXLAT] = 0; end
      // arrival check
      checks++;
      if (rx_valid != (exp_arrival_writer[c] >= 0)) begin
        failures++;
        if (failures < 10) $display("cyc %0d rx_valid %b exp writer %0d", c, rx_valid, exp_arrival_writer[c]);
      end else if (rx_valid) begin
        checks++;
        arrivals++;
        if (rx_data != exp_arrival_data[c]) begin
          failures++;
          if (failures < 10) $display("cyc %0d wrong data", c);
        end
      end
      grants += $countones(grant);
      if (token_in) begin live[c] = 1; injected++; end
      // writers that won launch during the next cycle
      next_launch = grant;
      @(posedge clk);
      #1;
      launch = next_launch;
      for (int i = 0; i < NW; i++) begin
        if (next_launch[i]) begin
          tx_data[i] = {8{$urandom()}};
          tx_data[i].src_tile = tile_id_t'(i);
          exp_arrival_data[c + 1 - lat(i) + MAXLAT + 1] = tx_data[i];
        end
      end
    end
    checks++;
    if (grants + losts != injected) begin
      failures++; $display("tokens: %0d injected, %0d used, %0d lost", injected, grants, losts);
    end
    checks++;
    if (arrivals != grants) begin failures++; $display("%0d grants but %0d arrivals", grants, arrivals); end
    $display("channel: %0d tokens, %0d captured, %0d lost", injected, grants, losts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
