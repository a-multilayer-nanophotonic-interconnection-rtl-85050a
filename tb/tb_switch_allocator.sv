// tb_switch_allocator: random requests and output readiness against a
// reference round-robin model. Per output, the reference keeps a pointer;
// the winner must be the first requesting input at or after it, the pointer
// then moves past the winner. Also checked: no grant to a non-requester or a
// busy output, at most one grant per output, grants in_grant consistent.
module tb_switch_allocator;
  import mpnoc_pkg::*;
  localparam int N = NUM_PORTS;
  logic clk = 0, rst = 1;
  logic [N-1:0] req_valid, out_ready, in_grant, out_valid;
  port_id_t req_port [N];
  port_id_t out_sel  [N];
  int checks = 0, failures = 0;
  int ptr [N];

  switch_allocator dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = '0; out_ready = '0;
    for (int i = 0; i < N; i++) begin req_port[i] = '0; ptr[i] = 0; end
    repeat (2) @(posedge clk);
    rst = 0;
    for (int it = 0; it < 3000; it++) begin
      logic [N-1:0] exp_in_grant;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        req_valid[i] = ($urandom_range(0, 99) < 70);
        // skew toward a few hot outputs so conflicts are common
        req_port[i]  = port_id_t'(($urandom_range(0, 1) != 0) ? $urandom_range(0, 2) : $urandom_range(0, N - 1));
      end
      out_ready = N'($urandom()) | N'($urandom());
      #1;
      exp_in_grant = '0;
      for (int o = 0; o < N; o++) begin
        int win;
        win = -1;
        if (out_ready[o]) begin
          for (int k = 0; k < N; k++) begin
            int i;
            i = (ptr[o] + k) % N;
            if (win < 0 && req_valid[i] && int'(req_port[i]) == o) win = i;
          end
        end
        checks++;
        if ((win >= 0) != out_valid[o] || (win >= 0 && int'(out_sel[o]) != win)) begin
          failures++;
          if (failures < 10) $display("it %0d out %0d: valid=%0b sel=%0d exp win %0d", it, o, out_valid[o], out_sel[o], win);
        end
        if (win >= 0) begin
          exp_in_grant[win] = 1'b1;
          ptr[o] = (win + 1) % N;
        end
      end
      checks++;
      if (in_grant != exp_in_grant) begin
        failures++;
        if (failures < 10) $display("it %0d in_grant %b exp %b", it, in_grant, exp_in_grant);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
