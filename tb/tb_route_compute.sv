// tb_route_compute: exhaustive test of route computation. For every pair of
// tiles and every local destination port the expected router output is
// worked out from grid coordinates: the cluster of a tile at (x, y) on the
// 8x8 grid is 2*(y>=4) + (x>=4); a flit for this tile goes to its local port,
// any other to optical port 5 + (source cluster XOR destination cluster).
module tb_route_compute;
  import mpnoc_pkg::*;
  tile_id_t my_tile;
  flit_t    flit;
  port_id_t out_port;
  logic     is_optical;
  int checks = 0, failures = 0;

  route_compute dut (.*);

  function automatic int cl(int t);
    int x, y;
    x = t % 8; y = t / 8;
    return 2 * (y >= 4 ? 1 : 0) + (x >= 4 ? 1 : 0);
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 64; m++) begin
      for (int d = 0; d < 64; d++) begin
        for (int p = 0; p < 5; p++) begin
          int exp_port;
          my_tile = tile_id_t'(m);
          flit = '0;
          flit.dst_tile = tile_id_t'(d);
          flit.dst_port = port_id_t'(p);
          flit.payload  = {8{$urandom()}};
          #1;
          exp_port = (m == d) ? p : 5 + (cl(m) ^ cl(d));
          checks++;
          if (int'(out_port) != exp_port || is_optical != (m != d)) begin
            failures++;
            if (failures < 10) $display("tile %0d -> %0d port %0d: got %0d exp %0d", m, d, p, out_port, exp_port);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
