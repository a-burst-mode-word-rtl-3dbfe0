// row_cell: event-recipient interface R, one per array cell.
//
// A C-element issues the event request po when the row select ri and the
// column data line ci are both high, and withdraws it only when both are
// low, so the cell sees its row and column cleared before ending the event.
// The recipient's acknowledge pi is copied to ro, which acknowledges the row
// decoder and the column data latch together. Production rules (published
// circuit, there with active-low ri and ci):
//   ri & ci -> po+    ~ri & ~ci -> po-    ro = pi
// po is a flip-flop cleared by reset. ro is a plain wire from pi, as in the
// published cell; the clocked evaluation is this design's own choice.
module row_cell
  import aer_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic ri,
  input  logic ci,
  output logic po,
  input  logic pi,
  output logic ro
);
  always_ff @(posedge clk) begin
    if (rst) po <= 1'b0;
    else     po <= prs_next(ri & ci, ~ri & ~ci, po);
  end
  assign ro = pi;
endmodule
