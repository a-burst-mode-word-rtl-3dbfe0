// receiver_row: one row ROW(x) of the array interface.
//
// NCOLS row cells share the row select (broadcast by the wired OR) and each
// watches its own column data line. Every cell whose column line is high
// when the row is selected raises its event request, so all events of a
// burst reach the row in parallel. The wired OR merges the cells'
// acknowledges into the row acknowledge ack. The assertions below state the
// cell-level handshake rules.
module receiver_row #(
  parameter int unsigned NCOLS = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sel,
  input  logic [NCOLS-1:0] col,
  output logic [NCOLS-1:0] ev_req,
  input  logic [NCOLS-1:0] ev_ack,
  output logic             ack
);
  logic [NCOLS-1:0] rsel, cack;

  ack_wired_or #(.N(NCOLS)) u_or (
    .clk, .rst, .li(sel), .ro(rsel), .ri(cack), .lo(ack)
  );
  for (genvar k = 0; k < NCOLS; k++) begin : g_cell
    row_cell u_r (
      .clk, .rst, .ri(rsel[k]), .ci(col[k]),
      .po(ev_req[k]), .pi(ev_ack[k]), .ro(cack[k])
    );
    // an event starts only in a selected row and only for a driven column
    a_req_sel: assert property (@(posedge clk) disable iff (rst)
      $rose(ev_req[k]) |-> $past(sel) && $past(col[k]));
    // four-phase rule: the recipient's acknowledge follows the request
    a_ack_follows: assert property (@(posedge clk) disable iff (rst)
      $rose(ev_ack[k]) |-> $past(ev_req[k]));
  end
endmodule
