// decode_logic: dual-rail to one-hot decoder.
//
// Output j is the AND of AW rails: for each address bit n it takes the true
// rail ent[n] where bit n of j is one and the false rail enf[n] where it is
// zero. While any bit is invalid (both rails low) every output stays low;
// once all bits are valid exactly one output rises. Outputs at or above M are
// not built. Purely combinational. The dual-rail input and the all-low idle
// state follow the published decoder; one wide AND per output is this
// design's own gate structure.
module decode_logic #(
  parameter int unsigned M  = 64,
  parameter int unsigned AW = 6
) (
  input  logic [AW-1:0] ent,
  input  logic [AW-1:0] enf,
  output logic [M-1:0]  sel
);
  for (genvar j = 0; j < M; j++) begin : g_out
    logic [AW-1:0] rail;
    for (genvar n = 0; n < AW; n++) begin : g_bit
      if (((j >> n) & 1) != 0) begin : g_t
        assign rail[n] = ent[n];
      end else begin : g_f
        assign rail[n] = enf[n];
      end
    end
    assign sel[j] = &rail;
  end
endmodule
