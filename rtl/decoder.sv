// decoder: pipelined 1-in-M decoder DEC(m).
//
// An address_latch (stage E) accepts the address on the li/lo handshake and
// drives dual-rail data into decode_logic, which raises exactly one select
// output. The selected recipient acknowledges on sel_ack; an or_tree merges
// all M acknowledges into E's ei, which completes the handshake: E lowers eo,
// the select falls, the recipient withdraws its acknowledge, and E is ready
// for the next address. eo is brought out because the row decoder's eo also
// starts the parallel column-data transfer. The same decoder serves for rows
// and columns. Addresses at or above M select nothing and would stall the
// handshake; the sender must not issue them. The three-part structure follows
// the published decoder; the clocked evaluation is this design's own choice.
module decoder #(
  parameter int unsigned M  = 64,
  parameter int unsigned AW = 6
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          li,
  output logic          lo,
  input  logic [AW-1:0] d,
  output logic          eo,
  output logic [M-1:0]  sel,
  input  logic [M-1:0]  sel_ack
);
  logic [AW-1:0] ent, enf;
  logic          ei;

  address_latch #(.AW(AW)) u_e (
    .clk, .rst, .li, .lo, .eo, .ei, .d, .ent, .enf
  );
  decode_logic #(.M(M), .AW(AW)) u_dec (.ent, .enf, .sel);
  or_tree #(.N(M)) u_or (.a(sel_ack), .y(ei));

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(sel));
endmodule
