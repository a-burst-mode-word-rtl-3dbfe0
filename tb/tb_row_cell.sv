// tb_row_cell: random drive of ri, ci and pi, po/ro compared each clock with
// the cell's C-element rule, then an event handshake.
module tb_row_cell;
  logic clk = 0, rst = 1;
  logic ri;
  logic ci;
  logic pi;
  logic po;
  logic ro;
  logic m_po, n_po;
  int checks = 0, failures = 0;

  row_cell dut (.clk, .rst, .ri, .ci, .po, .pi, .ro);

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
      n_po = m_po;
      if (ri && ci) n_po = 1; else if (!ri && !ci) n_po = 0;
    end
    @(posedge clk); #1;
    m_po = n_po;
    chk(ro == pi, "ro copies pi");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ri = '0;
    ci = '0;
    pi = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m_po = 0;
    for (int i = 0; i < 2000; i++) begin
      ri = 1'($urandom);
      ci = 1'($urandom);
      pi = 1'($urandom);
      step();
      checks++;
      if (po != m_po) begin
        failures++;
        $display("FAIL random step %0d", i);
      end
    end
    // return to the initial state
    rst = 1; @(posedge clk); #1 rst = 0;
    m_po = 0;
    ri = 1; ci = 0; pi = 0; step(); chk(po == 0, "row only: no event");
    ci = 1; step(); chk(po == 1, "event");
    ri = 0; step(); chk(po == 1, "held while column high");
    ci = 0; step(); chk(po == 0, "withdrawn");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
