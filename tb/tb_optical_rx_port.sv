// tb_optical_rx_port: token generation and buffer reservation at the
// receiving side of a home channel.
// The test plays the channel: each token the port emits is answered by a
// flit exactly LOOP cycles later, as if a writer captured every token, with
// LOOP set to the worst round trip the reservation can cover
// (RESERVE - 2). With the router not reading, tokens must stop while fewer
// than RESERVE entries are free, the buffer must fill to exactly DEPTH and
// never overflow. Then the router drains it, the flits must leave in order
// with their data, and tokens must resume.
module tb_optical_rx_port;
  import mpnoc_pkg::*;
  localparam int DEPTH = BUF_DEPTH, RESERVE = RESERVE_INTER, LOOP = RESERVE - 2;
  logic clk = 0, rst = 1;
  logic rx_valid, token_out, head_valid, pop, overflow, token_withheld;
  flit_t rx_flit, head_flit;
  int checks = 0, failures = 0;
  logic [LOOP-1:0] pipe;
  flit_t sent[$];
  int tokens, flits_in, overflows;

  optical_rx_port #(.DEPTH(DEPTH), .RESERVE(RESERVE)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel model: token -> flit LOOP cycles later
  always_ff @(posedge clk) begin
    if (rst) pipe <= '0;
    else     pipe <= {pipe[LOOP-2:0], token_out};
  end
  always_comb rx_valid = pipe[LOOP-1];
  always @(negedge clk) if (!rst) rx_flit = {8{$urandom()}};
  always @(posedge clk) begin
    if (!rst) begin
      if (token_out) tokens++;
      if (rx_valid) begin flits_in++; sent.push_back(rx_flit); end
      if (overflow) overflows++;
    end
  end

  initial begin
    pop = 0; tokens = 0; flits_in = 0; overflows = 0; rx_flit = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // phase 1: no reads
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      // flits that have arrived up to and including this cycle
      hist[c] = flits_in + (rx_valid ? 1 : 0);
      // the token visible now was decided last cycle, when the flits that
      // had arrived up to two cycles ago filled the buffer and O/E register:
      // it may only leave if at least RESERVE entries were then free
      if (c >= 2) begin
        checks++;
        if (token_out && (DEPTH - hist[c-2] < RESERVE)) begin
          failures++; $display("cycle %0d: token with only %0d free", c, DEPTH - hist[c-2]);
        end
        checks++;
        if (!token_out && (DEPTH - hist[c-2] >= RESERVE)) begin
          failures++; $display("cycle %0d: token withheld with %0d free", c, DEPTH - hist[c-2]);
        end
      end
    end
    checks++;
    if (overflows != 0) begin failures++; $display("overflow seen %0d", overflows); end
    checks++;
    if (flits_in != DEPTH || tokens != DEPTH) begin
      failures++; $display("after fill: tokens %0d flits %0d, expected %0d", tokens, flits_in, DEPTH);
    end
    checks++;
    if (token_out) begin failures++; $display("token while full"); end
    // phase 2: drain everything, tokens resume
    for (int c = 0; c < 2000 && sent.size() != 0; c++) begin
      @(negedge clk);
      pop = head_valid && ($urandom_range(0, 3) != 0);
      if (pop) begin
        checks++;
        if (head_flit != sent[0]) begin failures++; $display("data mismatch"); end
        void'(sent.pop_front());
      end
      @(posedge clk);
      #1 pop = 0;
    end
    checks++;
    if (tokens <= DEPTH) begin failures++; $display("tokens did not resume"); end
    checks++;
    if (overflows != 0) begin failures++; $display("overflow in drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [300];
endmodule
