// tb_lth: column data latch. Column selects arrive in bursts (each column at
// most once per burst) from a decoder model that waits for co; a write model
// raises vi, checks that the column lines carry exactly the previous burst's
// columns, and drops vi. Bursts are collected while a write is in progress,
// which exercises the slack of the two-stage cell.
module tb_lth;
  localparam int X = 8;
  logic clk = 0, rst = 1, vi;
  logic [X-1:0] ci, co, vo;
  int checks = 0, failures = 0, writes = 0, overlap = 0;
  logic [X-1:0] bursts[$];

  lth #(.NCOLS(X)) dut (.clk, .rst, .ci, .co, .vi, .vo);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: after each burst has been collected, pulse vi
  int unsigned ready = 0;
  initial begin
    vi = 0;
    wait (!rst);
    forever begin
      @(posedge clk);
      if (ready > 0) begin
        logic [X-1:0] want;
        want = bursts.pop_front();
        ready--;
        #1 vi = 1;
        repeat (3) @(posedge clk);
        #1 chk(vo == want, "column lines carry the burst");
        repeat ($urandom % 4) @(posedge clk);
        #1 vi = 0;
        repeat (3) @(posedge clk);
        #1 chk(vo == 0, "column lines cleared");
        writes++;
      end
    end
  end

  initial begin
    ci = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int b = 0; b < 100; b++) begin
      logic [X-1:0] m;
      m = X'($urandom);
      if (m == 0) m = 1;
      for (int k = 0; k < X; k++) if (m[k]) begin
        ci[k] = 1;
        if (vi) overlap++;
        while (!co[k]) @(posedge clk);
        #1 ci[k] = 0;
        while (co[k]) @(posedge clk);
        #1;
      end
      bursts.push_back(m);
      // the write may start only after the burst's last event has reached
      // the data latch (a few gate delays in the circuit)
      repeat (3) @(posedge clk);
      #1 ready++;
    end
    wait (writes == 100);
    chk(overlap > 0, "columns collected during a write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
