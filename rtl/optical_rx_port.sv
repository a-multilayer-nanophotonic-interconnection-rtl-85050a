// optical_rx_port: the receiving side of one optical input of a router,
// i.e. the reader of this tile's home channel on one layer.
//
// A flit arriving from the detectors (rx_valid, rx_flit) is captured in the
// O/E register and written into the 64-flit input buffer the next cycle.
// The router reads the buffer head (head_valid, head_flit, pop).
//
// Flow control is by one-bit tokens. Every cycle in which the buffer still
// has at least RESERVE free entries (entries taken by the O/E register
// count as used), the port injects one token into the arbitration waveguide
// of its home channel (token_out, registered). A writer that captures the
// token may send exactly one flit, so at most RESERVE flits can be on their
// way when the free space reaches RESERVE and the buffer cannot overflow
// as long as RESERVE covers the worst token round trip: 12 cycles for an
// inter-cluster channel, 8 for an intra-cluster one. Those reservations,
// the buffer depth and "only the destination injects a token, one per
// cycle" follow the network description; the exact free-space test is this
// design's choice.
module optical_rx_port
  import mpnoc_pkg::*;
#(
  parameter int unsigned DEPTH   = BUF_DEPTH,
  parameter int unsigned RESERVE = RESERVE_INTER
) (
  input  logic  clk,
  input  logic  rst,
  // from the detectors of the home channel
  input  logic  rx_valid,
  input  flit_t rx_flit,
  // to the arbitration waveguide
  output logic  token_out,
  // to the router
  output logic  head_valid,
  output flit_t head_flit,
  input  logic  pop,
  // observation
  output logic  overflow,
  output logic  token_withheld
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic          oe_valid;
  flit_t         oe_flit;
  logic          empty, full;
  logic [CW-1:0] count;
  logic [CW:0]   free_slots;

  always_ff @(posedge clk) begin
    if (rst) oe_valid <= 1'b0;
    else     oe_valid <= rx_valid;
    if (rx_valid) oe_flit <= rx_flit;
  end

  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(DEPTH)) u_buf (
    .clk     (clk),
    .rst     (rst),
    .push    (oe_valid && !(full && !pop)),
    .wr_data (oe_flit),
    .pop     (pop),
    .rd_data (head_flit),
    .empty   (empty),
    .full    (full),
    .count   (count)
  );

  assign head_valid     = !empty;
  assign overflow       = oe_valid && full && !pop;
  assign free_slots     = (CW+1)'(DEPTH) - (CW+1)'(count) - (CW+1)'(oe_valid);
  assign token_withheld = (free_slots < (CW+1)'(RESERVE));

  always_ff @(posedge clk) begin
    if (rst) token_out <= 1'b0;
    else     token_out <= !token_withheld;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !overflow);
endmodule
