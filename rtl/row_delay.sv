// row_delay: row-address delay (block D of the receiver).
//
// Holds back the row address of a burst until the burst ends. On the first
// half of the G handshake (gi high) it raises go, which acknowledges the row
// address to the converter and makes the row-address latch opaque. When gi
// falls (end of burst) the local node u falls and, once the row decoder's
// acknowledge pi is low, po is raised to hand the address to the row
// decoder. The decoder's pi lowers go (latch transparent again, G completes
// early so the next burst can start), u rises and po falls.
// Production rules (published circuit):
//   ~po & gi -> go+      po & pi -> go-
//   u = NAND(go, ~gi)    (combinational)
//   ~u & ~pi -> po+      u -> po-
// go and po are flip-flops updated once per clock from these guards; u is
// combinational. Signals are active high (the published circuit takes an
// active-low gi). Reset clears go and po.
module row_delay
  import aer_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic gi,
  output logic go,
  output logic po,
  input  logic pi
);
  logic u;
  assign u = ~(go & ~gi);

  always_ff @(posedge clk) begin
    if (rst) begin
      go <= 1'b0;
      po <= 1'b0;
    end else begin
      go <= prs_next(~po & gi, po & pi, go);
      po <= prs_next(~u & ~pi, u, po);
    end
  end
endmodule
