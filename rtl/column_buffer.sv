// column_buffer: first stage (P) of a column data latch cell.
//
// Two C-elements in series. The column select ci sets co (the acknowledge to
// the column decoder) once the previous event has left (qo low); co then
// requests the data latch (qo) once its acknowledge qi is low; qo clears co
// after ci falls, and qi clears qo after co is low. The column handshake
// thus completes before the data latch has even acknowledged, giving three
// quarters of a cycle of slack. Production rules (published circuit):
//   ~qo & ci -> co+    qo & ~ci -> co-
//   co & ~qi -> qo+    ~co & qi -> qo-
// Each rule is evaluated once per clock; co and qo are flip-flops cleared by
// reset.
module column_buffer
  import aer_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic ci,
  output logic co,
  output logic qo,
  input  logic qi
);
  always_ff @(posedge clk) begin
    if (rst) begin
      co <= 1'b0;
      qo <= 1'b0;
    end else begin
      co <= prs_next(~qo & ci, qo & ~ci, co);
      qo <= prs_next(co & ~qi, ~co & qi, qo);
    end
  end
endmodule
