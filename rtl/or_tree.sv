// or_tree: N-input OR built as a balanced tree of two-input ORs.
//
// Combines the acknowledges of a decoder's outputs (or of the array's rows)
// into one acknowledge. The inputs are padded with zeros to the next power
// of two P and placed at the leaves node[P .. 2P-1] of a heap-ordered tree;
// every inner node i is the OR of its children 2i and 2i+1, and node 1 is the
// result. Purely combinational; the tree has ceil(log2 N) levels. A tree of
// two-input ORs is the published structure; the heap layout is this design's.
module or_tree #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  output logic         y
);
  localparam int unsigned L = (N <= 1) ? 0 : $clog2(N);
  localparam int unsigned P = 1 << L;

  logic [2*P-1:1] node;

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[P + i] = a[i];
    end else begin : g_pad
      assign node[P + i] = 1'b0;
    end
  end
  for (genvar i = 1; i < P; i++) begin : g_node
    assign node[i] = node[2 * i] | node[2 * i + 1];
  end
  assign y = node[1];
endmodule
