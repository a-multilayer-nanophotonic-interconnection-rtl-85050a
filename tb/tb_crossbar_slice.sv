// tb_crossbar_slice: one inter-cluster and one intra-cluster 16x16 slice.
// Every reader injects a token each cycle when the test allows it; each
// writer picks a random reader, requests its home channel and, one cycle
// after the grant, launches a flit naming writer and reader on that channel's flit bus,
// while its other channels carry random data that must be ignored. Checked: a
// grant only answers a request on the same [writer][reader] line, each flit
// reaches the reader it was sent to, with its data, MAXLAT + 2 - lat(w)
// cycles after the grant (lat(w) = 1 + w*MAXLAT/16), and the intra slice is
// faster than the inter slice for the same writer.
module tb_crossbar_slice;
  import mpnoc_pkg::*;
  localparam int N = TILES_PER_CLUSTER;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  logic [N-1:0] tok_req   [2][N];
  logic [N-1:0] tok_grant [2][N];
  logic [N-1:0] launch    [2][N];
  flit_t        tx_flit   [2][N][N];
  logic [N-1:0] token_in  [2];
  logic [N-1:0] rx_valid  [2];
  flit_t        rx_flit   [2][N];
  logic [N-1:0] token_lost[2];

  crossbar_slice #(.INTRA(1'b0)) u_inter (
    .clk(clk), .rst(rst), .tok_req(tok_req[0]), .tok_grant(tok_grant[0]), .launch(launch[0]),
    .tx_flit(tx_flit[0]), .token_in(token_in[0]), .rx_valid(rx_valid[0]), .rx_flit(rx_flit[0]),
    .token_lost(token_lost[0]));
  crossbar_slice #(.INTRA(1'b1)) u_intra (
    .clk(clk), .rst(rst), .tok_req(tok_req[1]), .tok_grant(tok_grant[1]), .launch(launch[1]),
    .tx_flit(tx_flit[1]), .token_in(token_in[1]), .rx_valid(rx_valid[1]), .rx_flit(rx_flit[1]),
    .token_lost(token_lost[1]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int target [2][N];     // reader each writer wants, -1 idle
  flit_t expq [2][N][$]; // per reader: flits expected
  int    expt [2][N][$]; // per reader: arrival cycle expected
  int delivered [2];
  int cyc;

  function automatic int lat(int w, int maxlat);
    return 1 + (w * maxlat) / N;
  endfunction

  initial begin
    for (int s = 0; s < 2; s++) begin
      token_in[s] = '0;
      for (int w = 0; w < N; w++) begin tok_req[s][w] = '0; launch[s][w] = '0; for (int r = 0; r < N; r++) tx_flit[s][w][r] = '0; target[s][w] = -1; end
      delivered[s] = 0;
    end
    repeat (2) @(posedge clk);
    rst = 0;
    for (cyc = 0; cyc < 2000; cyc++) begin
      logic [N-1:0] gl [2][N];
      flit_t pend [2][N];
      @(negedge clk);
      for (int s = 0; s < 2; s++) begin
        token_in[s] = (cyc < 1900) ? N'($urandom()) : '0;
        for (int w = 0; w < N; w++) begin
          if (target[s][w] < 0 && cyc < 1900 && $urandom_range(0, 3) == 0) target[s][w] = $urandom_range(0, N - 1);
          tok_req[s][w] = (target[s][w] >= 0) ? (N'(1) << target[s][w]) : '0;
        end
      end
      #1;
      for (int s = 0; s < 2; s++) begin
        int maxlat;
        maxlat = s ? LINK_LAT_INTRA : LINK_LAT_INTER;
        for (int w = 0; w < N; w++) begin
          gl[s][w] = tok_grant[s][w];
          checks++;
          if ((tok_grant[s][w] & ~tok_req[s][w]) != '0) begin
            failures++; $display("slice %0d writer %0d: unrequested grant", s, w);
          end
          if (tok_grant[s][w] != '0) begin
            flit_t f;
            f = {8{$urandom()}};
            f.src_tile = tile_id_t'(w);
            f.dst_tile = tile_id_t'(target[s][w]);
            pend[s][w] = f;  // launched during the next cycle
            expq[s][target[s][w]].push_back(f);
            expt[s][target[s][w]].push_back(cyc + maxlat + 2 - lat(w, maxlat));
            target[s][w] = -1;
          end
        end
        // arrivals
        for (int r = 0; r < N; r++) begin
          if (rx_valid[s][r]) begin
            checks++;
            if (expq[s][r].size() == 0) begin
              failures++; $display("slice %0d reader %0d: unexpected flit", s, r);
            end else begin
              int idx;
              idx = -1;
              for (int q = 0; q < expq[s][r].size(); q++) if (expq[s][r][q] == rx_flit[s][r]) idx = q;
              if (idx < 0 || expt[s][r][idx] != cyc) begin
                failures++;
                if (failures < 10) $display("slice %0d reader %0d cyc %0d: wrong flit or time", s, r, cyc);
              end
              if (idx >= 0) begin expq[s][r].delete(idx); expt[s][r].delete(idx); end
              delivered[s]++;
            end
          end
        end
      end
      @(posedge clk);
      #1;
      for (int s = 0; s < 2; s++) for (int w = 0; w < N; w++) begin
        launch[s][w] = gl[s][w];
        // the launched channel carries the flit; the others carry noise
        for (int r = 0; r < N; r++) tx_flit[s][w][r] = gl[s][w][r] ? pend[s][w] : flit_t'({8{$urandom()}});
      end
    end
    for (int s = 0; s < 2; s++) for (int r = 0; r < N; r++) begin
      checks++;
      if (expq[s][r].size() != 0) begin failures++; $display("slice %0d reader %0d: %0d flits lost", s, r, expq[s][r].size()); end
    end
    checks++;
    if (delivered[0] < 500 || delivered[1] < 500) begin failures++; $display("too few deliveries"); end
    $display("delivered inter %0d intra %0d", delivered[0], delivered[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
