// ack_wired_or: staticized wired OR along one row.
//
// Broadcasts the row select li to the N cells of the row (ro) and raises the
// row acknowledge lo as soon as at least one cell acknowledges (ri). The
// restoring pull-up is enabled only while li is low and is weaker than the
// cells' pull-downs, so lo falls only when li is low and every cell's
// acknowledge is clear; otherwise it holds. This gives the cells that have
// not yet answered time to read their column data. In this model lo is a
// flip-flop with these set/clear guards; reset clears it. The broadcast ro
// is plain wiring of li to every cell, as in the published circuit.
module ack_wired_or
  import aer_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         li,
  output logic [N-1:0] ro,
  input  logic [N-1:0] ri,
  output logic         lo
);
  logic any;
  assign any = |ri;
  assign ro  = {N{li}};

  always_ff @(posedge clk) begin
    if (rst) lo <= 1'b0;
    else     lo <= prs_next(any, ~li & ~any, lo);
  end
endmodule
