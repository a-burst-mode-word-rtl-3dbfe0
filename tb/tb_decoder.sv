// tb_decoder: sends random addresses through the pipelined decoder with a
// model of the selected recipients that acknowledge after a random delay.
// Checks that each address selects exactly its own output, that at most one
// output is ever high, that the address is acknowledged (lo) no later than
// the cycle its select rises (pipelining), and that every address is decoded.
module tb_decoder;
  localparam int M = 12, AW = 4;
  logic clk = 0, rst = 1, li, lo, eo;
  logic [AW-1:0] d;
  logic [M-1:0] sel, sel_ack;
  int checks = 0, failures = 0, sent = 0, seen = 0;
  int unsigned q[$];

  decoder #(.M(M), .AW(AW)) dut (.clk, .rst, .li, .lo, .d, .eo, .sel, .sel_ack);
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

  // recipients
  logic [M-1:0] prev_sel;
  always @(posedge clk) begin
    if (rst) begin
      sel_ack <= '0; prev_sel <= '0;
    end else begin
      prev_sel <= sel;
      for (int j = 0; j < M; j++) begin
        if (sel[j] && !sel_ack[j] && ($urandom % 3 == 0)) sel_ack[j] <= 1'b1;
        if (!sel[j] && sel_ack[j] && ($urandom % 2 == 0)) sel_ack[j] <= 1'b0;
      end
    end
  end
  always @(negedge clk) if (!rst) begin
    chk($countones(sel) <= 1, "one-hot");
    if ((sel & ~prev_sel) != 0) begin
      int unsigned a;
      a = q.pop_front();
      chk(sel == (M'(1) << a), "selects its own output");
      chk(lo == 1'b1, "address acknowledged by the time it is decoded");
      seen++;
    end
  end

  initial begin
    li = 0; d = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 200; i++) begin
      d = AW'($urandom % M);
      q.push_back(int'(d));
      #0 li = 1;
      while (!lo) @(posedge clk);
      #1 li = 0; d = AW'($urandom);
      while (lo) @(posedge clk);
      #1 sent++;
    end
    repeat (10) @(posedge clk);
    chk(seen == sent && sent == 200, "every address decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
