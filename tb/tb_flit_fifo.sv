// tb_flit_fifo: self-checking test of the 64-flit input buffer.
// Random pushes and pops (never a push into a full or a pop from an empty
// buffer) are compared against a queue model: head data, count, full and
// empty every cycle. A fill to the brim and a drain check the depth.
module tb_flit_fifo;
  localparam int W = 256, D = 64;
  logic clk = 0, rst = 1;
  logic push, pop;
  logic [W-1:0] wr_data, rd_data;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == D)) begin
      failures++;
      $display("state mismatch: count=%0d model=%0d empty=%0b full=%0b", count, model.size(), empty, full);
    end
    if (model.size() != 0) begin
      checks++;
      if (rd_data != model[0]) begin
        failures++;
        $display("head mismatch");
      end
    end
  endtask

  task automatic step(bit do_push, bit do_pop);
    logic [W-1:0] v;
    v = {8{$urandom()}};
    push = do_push && (model.size() < D || do_pop);
    pop  = do_pop && model.size() != 0;
    wr_data = v;
    @(posedge clk);
    #1;
    if (pop) void'(model.pop_front());
    if (push) model.push_back(v);
    check_state();
  endtask

  initial begin
    push = 0; pop = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    #1 check_state();
    // fill completely, then one more push attempt is suppressed by the model
    for (int i = 0; i < D; i++) step(1, 0);
    checks++;
    if (!full) begin failures++; $display("not full after %0d pushes", D); end
    // simultaneous push and pop on a full buffer
    for (int i = 0; i < 10; i++) step(1, 1);
    // drain
    for (int i = 0; i < D; i++) step(0, 1);
    checks++;
    if (!empty) begin failures++; $display("not empty after drain"); end
    // random traffic
    for (int i = 0; i < 4000; i++) step($urandom_range(0, 99) < 55, $urandom_range(0, 99) < 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
