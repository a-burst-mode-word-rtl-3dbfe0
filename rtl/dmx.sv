// dmx: word-serial demultiplexer DMX(b,x).
//
// Splits each burst arriving on the three-wire link into its row address and
// column addresses. The converter U passes every column address straight to
// the column decoder (col_req/col_ack). The row address is acknowledged at
// once and held in the row-address latch by the delay D, which only hands it
// to the row decoder (row_req/row_ack) when ari falls, i.e. when the burst
// ends and all its column addresses have been decoded. Because the row
// decoder acknowledges as soon as it has latched the address, the link can
// accept the next burst while the previous one is still being written.
// addr is the shared Y;X bus; row_addr is the held row address. The split
// into converter, delay and latch follows the published demultiplexer; the
// register standing in for the row-address latch is this design's choice.
module dmx #(
  parameter int unsigned B = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         ari,
  input  logic         aci_n,
  input  logic [B-1:0] addr,
  output logic         ao,
  output logic         col_req,
  input  logic         col_ack,
  output logic         row_req,
  input  logic         row_ack,
  output logic [B-1:0] row_addr
);
  logic g_req, g_ack;

  demux_u u_u (
    .ari, .aci_n, .ao, .ro(g_req), .ri(g_ack), .co(col_req), .ci(col_ack)
  );
  row_delay u_d (
    .clk, .rst, .gi(g_req), .go(g_ack), .po(row_req), .pi(row_ack)
  );
  row_address_latch #(.B(B)) u_lat (
    .clk, .rst, .go(g_ack), .d(addr), .q(row_addr)
  );
endmodule
