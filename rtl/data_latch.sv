// data_latch: second stage (M) of a column data latch cell.
//
// Holds one event for its column until the parallel write. bi (the buffer's
// request) sets bo, but only while no write is in progress (vi low): using
// the global vi rather than the local vo keeps a cell that is idle in the
// current write from capturing the next burst's event and pushing it into
// the row being written. The write request vi then drives the column line vo
// high in cells that hold an event; bo is released once the buffer lowers bi
// and vo is high, and vo falls after bo and vi are both low, so data cannot
// be overwritten before it is read. Production rules (published circuit):
//   ~vi & bi -> bo+    vo & ~bi -> bo-
//   bo & vi  -> vo+    ~bo & ~vi -> vo-
// bo and vo are flip-flops; reset clears both, which empties the pipeline.
module data_latch
  import aer_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic bi,
  output logic bo,
  input  logic vi,
  output logic vo
);
  always_ff @(posedge clk) begin
    if (rst) begin
      bo <= 1'b0;
      vo <= 1'b0;
    end else begin
      bo <= prs_next(~vi & bi, vo & ~bi, bo);
      vo <= prs_next(bo & vi, ~bo & ~vi, vo);
    end
  end
endmodule
