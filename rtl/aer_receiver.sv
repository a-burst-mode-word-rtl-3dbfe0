// aer_receiver: burst-mode word-serial address-event receiver.
//
// Delivers address-events to an NROWS x NCOLS array of cells. A burst on the
// link is a row address (ry high), one column address per active cell in
// that row (each a pulse of the active-low rx_n), and a terminator (ry
// low); one acknowledge ack answers every step and the row and column
// addresses share the bus addr. Column addresses are decoded as they arrive
// and collected in the column data latch (lth). When the burst ends, the
// held row address is decoded and the row decoder's eo both selects the row
// and drives every collected event onto the column lines, so the whole burst
// is written into the row in parallel. The row decoder acknowledges the row
// address at once, so the next burst is received and its columns decoded
// while this write is in progress.
//
// Each cell has a four-phase handshake: ev_req[r][c] rises for an event and
// ev_ack[r][c] must answer it; the request falls once the row select and
// column line are both low, and ev_ack must then fall.
//
// The original circuit is asynchronous. This model evaluates every
// state-holding gate once per clock, so each handshake step takes at least
// one clock; the link side must hold addr stable from before a request rises
// until it is acknowledged (bundled data). The column decoder's eo output is
// left open on purpose: only the row decoder's eo starts a write.
module aer_receiver #(
  parameter int unsigned NROWS = 64,
  parameter int unsigned NCOLS = 64,
  parameter int unsigned B     = 6
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        ry,
  input  logic                        rx_n,
  input  logic [B-1:0]                addr,
  output logic                        ack,
  output logic [NROWS-1:0][NCOLS-1:0] ev_req,
  input  logic [NROWS-1:0][NCOLS-1:0] ev_ack
);
  // b = max(log2(x), log2(y)) must fit both address kinds
  initial begin
    assert ((1 << B) >= NROWS && (1 << B) >= NCOLS)
      else $error("B too small for the array");
  end

  logic             col_req, col_ack;
  logic             row_req, row_ack, row_eo;
  logic [B-1:0]     row_addr;
  logic [NCOLS-1:0] col_sel, col_sel_ack, col_line;
  logic [NROWS-1:0] row_sel, row_sel_ack;

  dmx #(.B(B)) u_dmx (
    .clk, .rst, .ari(ry), .aci_n(rx_n), .addr, .ao(ack),
    .col_req, .col_ack, .row_req, .row_ack, .row_addr
  );

  decoder #(.M(NCOLS), .AW(B)) u_decc (
    .clk, .rst, .li(col_req), .lo(col_ack), .d(addr), .eo(),
    .sel(col_sel), .sel_ack(col_sel_ack)
  );

  decoder #(.M(NROWS), .AW(B)) u_decr (
    .clk, .rst, .li(row_req), .lo(row_ack), .d(row_addr), .eo(row_eo),
    .sel(row_sel), .sel_ack(row_sel_ack)
  );

  // column data latch: written by the column decoder, read by row_eo
  lth #(.NCOLS(NCOLS)) u_lth (
    .clk, .rst, .ci(col_sel), .co(col_sel_ack), .vi(row_eo), .vo(col_line)
  );

  // column lines run through the array to every row (BUS is wires)
  for (genvar r = 0; r < NROWS; r++) begin : g_row
    receiver_row #(.NCOLS(NCOLS)) u_row (
      .clk, .rst, .sel(row_sel[r]), .col(col_line),
      .ev_req(ev_req[r]), .ev_ack(ev_ack[r]), .ack(row_sel_ack[r])
    );
  end
endmodule
