// tb_receiver_row: one array row. Random column patterns are driven onto the
// column lines with the row selected; every cell whose column line is high
// must raise its event request in the same cycle (parallel write) and no
// other cell may. Recipients acknowledge after a random delay; the row
// acknowledge must rise with the first cell acknowledge and fall only after
// the select is low and every acknowledge has cleared.
module tb_receiver_row;
  localparam int X = 8;
  logic clk = 0, rst = 1, sel, ack;
  logic [X-1:0] col, ev_req, ev_ack;
  int checks = 0, failures = 0;

  receiver_row #(.NCOLS(X)) dut (.clk, .rst, .sel, .col, .ev_req, .ev_ack, .ack);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // recipients: four-phase, random delay
  always @(posedge clk) begin
    if (rst) ev_ack <= '0;
    else for (int k = 0; k < X; k++) begin
      if (ev_req[k] && !ev_ack[k] && ($urandom % 3 == 0)) ev_ack[k] <= 1'b1;
      if (!ev_req[k] && ev_ack[k] && ($urandom % 2 == 0)) ev_ack[k] <= 1'b0;
    end
  end

  initial begin
    sel = 0; col = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 200; i++) begin
      logic [X-1:0] m;
      m = X'($urandom);
      if (m == 0) m = X'(1) << ($urandom % X);
      col = m;
      @(posedge clk); #1;
      chk(ev_req == 0, "no request without row select");
      sel = 1;
      @(posedge clk); #1;
      chk(ev_req == m, "all events of the row in the same cycle");
      while (!ack) begin
        chk(ev_req == m, "only addressed cells request");
        @(posedge clk); #1;
      end
      chk(ev_ack != 0, "ack only after a cell acknowledged");
      sel = 0; col = 0;
      while (ev_req != 0 || ev_ack != 0) begin
        @(posedge clk); #1;
        if (ev_ack != 0) chk(ack == 1, "row ack held while any cell acknowledges");
      end
      @(posedge clk); #1;
      chk(ack == 0, "row ack released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
