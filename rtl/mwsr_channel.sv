// mwsr_channel: cycle-level behavioural model of one multiple-write
// single-read (MWSR) home channel of the optical crossbar. kind: behavioural
// model of optical hardware (waveguides, rings, photodetectors), written as
// synthesizable clocked logic so that the network can be simulated.
//
// Two media are modelled.
//  * Arbitration waveguide. The reader injects at most one one-bit token per
//    cycle (token_in). The token passes the NW writers in waveguide order;
//    writer i sees it TOK_LAT(i) = 1 + (i*MAXLAT)/NW cycles after injection.
//    The first writer that requests the channel when the token passes takes
//    it off the waveguide (grant, same cycle); writers further along then do
//    not see it (token slot arbitration). A token nobody takes falls off the
//    end of the waveguide (token_lost).
//  * Data waveguide bundle: FLIT_W bits, i.e. 4 waveguides of 64
//    wavelengths, bit b on waveguide b/64 and wavelength b%64. A writer that
//    captured a token launches its flit the next cycle (launch, tx_data from
//    its E/O stage); the light then travels the remaining MAXLAT+1-TOK_LAT(i)
//    cycles to the reader. Token and data travel the same loop, so every flit
//    reaches the reader MAXLAT+1 cycles after its token left stage 1,
//    whichever writer sent it, and two flits can never collide.
// Output: rx_valid/rx_data toward the reader's detectors and O/E stage.
//
// MWSR channels, one home channel per reader, one-bit token slots and
// optical link latencies of 1 to 4 cycles follow the network description;
// the waveguide order of the writers, the grouping of writers per cycle of
// latency and the shared token/data loop are this model's choices.
module mwsr_channel
  import mpnoc_pkg::*;
#(
  parameter int unsigned NW     = TILES_PER_CLUSTER,
  parameter int unsigned MAXLAT = LINK_LAT_INTER
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           token_in,
  input  logic [NW-1:0]  req,
  output logic [NW-1:0]  grant,
  input  logic [NW-1:0]  launch,
  input  flit_t          tx_data [NW],
  output logic           rx_valid,
  output flit_t          rx_data,
  output logic           token_lost
);
  function automatic int unsigned tok_lat(int unsigned i);
    return 1 + (i * MAXLAT) / NW;
  endfunction

  logic [MAXLAT:1]   tok_stage;
  logic [MAXLAT:1]   taken;
  logic [MAXLAT-1:0] pos_v;
  flit_t             pos_d [MAXLAT];
  logic [MAXLAT-1:0] ins_v;
  flit_t             ins_d [MAXLAT];

  // Token capture: in waveguide order, first requester of each stage wins.
  always_comb begin
    grant = '0;
    taken = '0;
    for (int unsigned i = 0; i < NW; i++) begin
      int unsigned k;
      k = tok_lat(i);
      if (tok_stage[k] && !taken[k] && req[i]) begin
        grant[i] = 1'b1;
        taken[k] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tok_stage <= '0;
    end else begin
      tok_stage[1] <= token_in;
      for (int k = 2; k <= int'(MAXLAT); k++) tok_stage[k] <= tok_stage[k-1] && !taken[k-1];
    end
  end
  assign token_lost = tok_stage[MAXLAT] && !taken[MAXLAT];

  // Data insertion: writer i modulates at position TOK_LAT(i)-1.
  always_comb begin
    ins_v = '0;
    for (int j = 0; j < int'(MAXLAT); j++) ins_d[j] = '0;
    for (int unsigned i = 0; i < NW; i++) begin
      if (launch[i]) begin
        ins_v[tok_lat(i)-1] = 1'b1;
        ins_d[tok_lat(i)-1] = ins_d[tok_lat(i)-1] | tx_data[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) pos_v <= '0;
    else begin
      pos_v[0] <= ins_v[0];
      for (int j = 1; j < int'(MAXLAT); j++) pos_v[j] <= pos_v[j-1] | ins_v[j];
    end
  end

  always_ff @(posedge clk) begin
    pos_d[0] <= ins_d[0];
    for (int j = 1; j < int'(MAXLAT); j++) pos_d[j] <= ins_v[j] ? ins_d[j] : pos_d[j-1];
  end

  assign rx_valid = pos_v[MAXLAT-1];
  assign rx_data  = pos_d[MAXLAT-1];

  // The token slot discipline never lets a flit land on an occupied slot.
  for (genvar j = 1; j < int'(MAXLAT); j++) begin : g_chk
    a_no_collision: assert property (@(posedge clk) disable iff (rst) !(pos_v[j-1] && ins_v[j]));
  end
endmodule
