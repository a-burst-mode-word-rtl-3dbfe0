// tb_column_buffer: random drive of ci and qi, co/qo compared each clock with
// a reference of the buffer's production rules, then a handshake sequence.
module tb_column_buffer;
  logic clk = 0, rst = 1;
  logic ci;
  logic qi;
  logic co;
  logic qo;
  
  logic m_co, n_co;
  logic m_qo, n_qo;
  int checks = 0, failures = 0;

  column_buffer dut (.clk, .rst, .ci, .co, .qo, .qi);

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
      n_co = m_co; n_qo = m_qo;
      if (ci && !m_qo) n_co = 1; else if (!ci && m_qo) n_co = 0;
      if (m_co && !qi) n_qo = 1; else if (!m_co && qi) n_qo = 0;
    end
    @(posedge clk); #1;
    m_co = n_co;
      m_qo = n_qo;
    
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ci = '0;
    qi = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m_co = 0;
    m_qo = 0;
    for (int i = 0; i < 2000; i++) begin
      ci = 1'($urandom);
      qi = 1'($urandom);
      step();
      checks++;
      if (co != m_co || qo != m_qo) begin
        failures++;
        $display("FAIL random step %0d", i);
      end
    end
    // return to the initial state
    rst = 1; @(posedge clk); #1 rst = 0;
    m_co = 0;
    m_qo = 0;
    ci = 1; qi = 0; step(); chk(co == 1, "co after ci"); step(); chk(qo == 1, "qo after co");
    ci = 0; step(); chk(co == 0, "co released before latch acks");
    ci = 1; step(); chk(co == 0, "second event waits while qo high");
    qi = 1; step(); chk(qo == 0, "qo cleared by latch ack");
    step(); chk(co == 1, "second event accepted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
