// demux_u: three-to-four-wire converter (block U of the receiver).
//
// The link carries a burst on three wires: a row request ari that stays high
// for the whole burst, an active-low column request aci_n, and one shared
// acknowledge ao. This block turns that into two four-phase channels, one to
// the row-address delay (ro/ri) and one to the column decoder (co/ci):
//   ro = ari            (row request passes straight through)
//   co = ari & ~aci_n   (NOR of aci_n and ~ari; ari guards against firing
//                        at start-up before aci_n has been driven high)
//   ao = ri & ~ci       (row ack raises ao, column ack lowers it)
// The three gates are the circuit published for this converter; it is purely
// combinational, so the module has no clock. Timing: ao follows ri/ci with
// gate delay only. ro is a plain wire from ari, as in the published circuit.
module demux_u (
  input  logic ari,
  input  logic aci_n,
  output logic ao,
  output logic ro,
  input  logic ri,
  output logic co,
  input  logic ci
);
  assign ro = ari;
  assign co = ~(aci_n | ~ari);
  assign ao = ri & ~ci;
endmodule
