// tb_ack_wired_or: random drive of li and the cell acknowledges, lo compared
// each clock with the staticized wired-OR rule (set by any ack, cleared only
// when li is low and no ack), and the broadcast select checked.
module tb_ack_wired_or;
  logic clk = 0, rst = 1;
  logic li;
  logic [3:0] ri;
  logic lo;
  logic [3:0] ro;
  logic m_lo, n_lo;
  int checks = 0, failures = 0;

  ack_wired_or #(.N(4)) dut (.clk, .rst, .li, .ro, .ri, .lo);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one clock: the reference computes the next state from the state and the
  // inputs applied before the edge
  task automatic step();
    begin
      n_lo = m_lo;
      if (ri != 0) n_lo = 1; else if (!li) n_lo = 0;
    end
    @(posedge clk); #1;
    m_lo = n_lo;
    chk(ro == {4{li}}, "broadcast");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    li = '0;
    ri = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m_lo = 0;
    for (int i = 0; i < 2000; i++) begin
      li = 1'($urandom);
      ri = 4'($urandom);
      step();
      checks++;
      if (lo != m_lo) begin
        failures++;
        $display("FAIL random step %0d", i);
      end
    end
    // return to the initial state
    rst = 1; @(posedge clk); #1 rst = 0;
    m_lo = 0;
    li = 1; ri = 4'b0010; step(); chk(lo == 1, "one ack raises lo");
    ri = 0; step(); chk(lo == 1, "held while li high");
    li = 0; ri = 4'b1000; step(); chk(lo == 1, "held while an ack remains");
    ri = 0; step(); chk(lo == 0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
