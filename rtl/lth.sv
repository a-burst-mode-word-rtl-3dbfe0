// lth: column data latch LTH(x), one cell per column.
//
// Each cell is a column_buffer followed by a data_latch. The column decoder
// selects a cell (ci[k]) for every column address of a burst; the cell
// acknowledges on co[k] and keeps the event. The row decoder's eo, broadcast
// as vi, writes every held event onto its column line vo[k] at once. The two
// stages together give a full cycle of slack, so the next burst can be
// collected while the previous one is still being written. A column whose
// address arrives a third time before the write can take the first two has
// nowhere to go and stalls the link. The two-stage cell follows the published
// column latch; each stage is evaluated once per clock in this model.
module lth #(
  parameter int unsigned NCOLS = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NCOLS-1:0] ci,
  output logic [NCOLS-1:0] co,
  input  logic             vi,
  output logic [NCOLS-1:0] vo
);
  for (genvar k = 0; k < NCOLS; k++) begin : g_cell
    logic q;   // buffer request to latch
    logic b;   // latch acknowledge to buffer
    column_buffer u_p (.clk, .rst, .ci(ci[k]), .co(co[k]), .qo(q), .qi(b));
    data_latch    u_m (.clk, .rst, .bi(q), .bo(b), .vi, .vo(vo[k]));
  end
endmodule
