// row_address_latch: latch that holds a burst's row address.
//
// It is transparent while the row-address delay's go is low and opaque while
// go is high, so the row address on the shared Y;X bus is captured when the
// row request is acknowledged and held, while column addresses pass on the
// same bus, until the row decoder has read it. In this clocked model the
// latch is a register loaded on every clock edge at which go is low, so the
// value present when go rises is the one kept. Reset clears it.
module row_address_latch #(
  parameter int unsigned B = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         go,
  input  logic [B-1:0] d,
  output logic [B-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)      q <= '0;
    else if (!go) q <= d;
  end
endmodule
