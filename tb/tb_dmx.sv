// tb_dmx: the demultiplexer driven by a three-wire link model. Decoder models
// acknowledge column and row requests after random delays. Checks: every
// column address reaches the column channel while it is requested; the row
// channel is requested only after ari falls (burst end) and then carries
// that burst's row address; the next burst's row is acknowledged before the
// previous row handshake has finished (pipelining).
module tb_dmx;
  localparam int B = 5;
  logic clk = 0, rst = 1, ari, aci_n, ao, col_req, col_ack, row_req, row_ack;
  logic [B-1:0] addr, row_addr;
  int checks = 0, failures = 0, overlap = 0, cols_seen = 0, cols_sent = 0;
  logic [B-1:0] rows[$];
  logic [B-1:0] cols[$];

  dmx #(.B(B)) dut (.clk, .rst, .ari, .aci_n, .addr, .ao, .col_req, .col_ack,
                    .row_req, .row_ack, .row_addr);
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

  // column decoder model
  initial begin
    col_ack = 0;
    forever begin
      @(posedge clk);
      if (col_req && !col_ack) begin
        chk(addr == cols.pop_front(), "column address on the bus");
        cols_seen++;
        repeat ($urandom % 3) @(posedge clk);
        #1 col_ack = 1;
      end else if (!col_req && col_ack) begin
        repeat ($urandom % 2) @(posedge clk);
        #1 col_ack = 0;
      end
    end
  end

  // row decoder model: latches the row quickly, then holds ack for a while
  logic row_busy;
  initial begin
    row_ack = 0; row_busy = 0;
    forever begin
      @(posedge clk);
      if (row_req && !row_ack) begin
        chk(!ari || row_busy == 0, "row issued only at burst end");
        chk(row_addr == rows.pop_front(), "row address held until burst end");
        #1 row_ack = 1;
      end else if (!row_req && row_ack) begin
        row_busy = 1;
        repeat (2 + $urandom % 6) @(posedge clk);
        #1 row_ack = 0; row_busy = 0;
      end
    end
  end

  always @(posedge clk) if (!rst && ari && ao && row_ack) overlap++;

  task automatic wait_ao(input logic v);
    while (ao != v) @(posedge clk);
    #1;
  endtask

  initial begin
    ari = 0; aci_n = 1; addr = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int b = 0; b < 100; b++) begin
      logic [B-1:0] r;
      int n;
      r = B'($urandom);
      rows.push_back(r);
      addr = r;
      @(posedge clk); #1 ari = 1;
      wait_ao(1);
      n = 1 + $urandom % 4;
      for (int c = 0; c < n; c++) begin
        logic [B-1:0] x;
        x = B'($urandom);
        cols.push_back(x);
        cols_sent++;
        addr = x;
        @(posedge clk); #1 aci_n = 0;
        wait_ao(0);
        aci_n = 1; addr = r;
        wait_ao(1);
      end
      ari = 0;
      #0 addr = B'($urandom);   // bus is free once the burst has ended
      wait_ao(0);
    end
    repeat (20) @(posedge clk);
    chk(cols_seen == cols_sent, "all column addresses passed");
    chk(rows.size() == 0, "all rows passed");
    chk(overlap > 0, "next burst accepted while the row decoder still busy");
    $display("bursts accepted during a row handshake: %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
