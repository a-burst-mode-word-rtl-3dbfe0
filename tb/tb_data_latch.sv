// tb_data_latch: random drive of bi and vi, bo/vo compared each clock with a
// reference of the latch's production rules, then an idle-cell check: a cell
// must not capture a new event while a write (vi) is in progress.
module tb_data_latch;
  logic clk = 0, rst = 1;
  logic bi;
  logic vi;
  logic bo;
  logic vo;
  
  logic m_bo, n_bo;
  logic m_vo, n_vo;
  int checks = 0, failures = 0;

  data_latch dut (.clk, .rst, .bi, .bo, .vi, .vo);

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
      n_bo = m_bo; n_vo = m_vo;
      if (bi && !vi) n_bo = 1; else if (!bi && m_vo) n_bo = 0;
      if (m_bo && vi) n_vo = 1; else if (!m_bo && !vi) n_vo = 0;
    end
    @(posedge clk); #1;
    m_bo = n_bo;
      m_vo = n_vo;
    
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bi = '0;
    vi = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m_bo = 0;
    m_vo = 0;
    for (int i = 0; i < 2000; i++) begin
      bi = 1'($urandom);
      vi = 1'($urandom);
      step();
      checks++;
      if (bo != m_bo || vo != m_vo) begin
        failures++;
        $display("FAIL random step %0d", i);
      end
    end
    // return to the initial state
    rst = 1; @(posedge clk); #1 rst = 0;
    m_bo = 0;
    m_vo = 0;
    bi = 0; vi = 1; step(); step();
    bi = 1; step(); step(); chk(bo == 0 && vo == 0, "idle cell blocked during write");
    vi = 0; step(); chk(bo == 1, "captured after write"); vi = 1; step(); chk(vo == 1, "written");
    bi = 0; step(); chk(bo == 0, "bo released"); chk(vo == 1, "vo held while vi");
    vi = 0; step(); chk(vo == 0, "vo cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
