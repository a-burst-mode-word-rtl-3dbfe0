// address_latch: pipeline stage E at the input of each decoder.
//
// A C-element runs the handshake
//   *[[~ei & li]; eo+, lo+; [ei & ~li]; eo-, lo-]
// so the address is acknowledged (lo) at the same moment its decoding is
// requested (eo), which lets the sender move on while decoding proceeds.
// The address memory is opaque while eo is high. Its output is converted to
// dual rail: ent[n] = eo & bit[n], enf[n] = eo & ~bit[n]; both rails are low
// while eo is low, so the decode logic can never glitch on a changing input.
// In this clocked model eo is a flip-flop; the address register loads on every
// edge at which eo is low, so it holds the address present when eo rises.
// lo equals eo (the published cell drives an active-low _lo from the same
// node). ei is the OR of the decoder outputs' acknowledges.
module address_latch
  import aer_pkg::*;
#(
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          li,
  output logic          lo,
  output logic          eo,
  input  logic          ei,
  input  logic [AW-1:0] d,
  output logic [AW-1:0] ent,
  output logic [AW-1:0] enf
);
  logic [AW-1:0] mem;

  always_ff @(posedge clk) begin
    if (rst) begin
      eo  <= 1'b0;
      mem <= '0;
    end else begin
      eo <= prs_next(li & ~ei, ~li & ei, eo);
      if (!eo) mem <= d;
    end
  end

  assign lo  = eo;
  assign ent = {AW{eo}} & mem;
  assign enf = {AW{eo}} & ~mem;
endmodule
