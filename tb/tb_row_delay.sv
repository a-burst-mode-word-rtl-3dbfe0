// tb_row_delay: random drive of gi and pi, go/po compared each clock with a
// reference of the delay's production rules, then a full burst sequence.
module tb_row_delay;
  logic clk = 0, rst = 1;
  logic gi;
  logic pi;
  logic go;
  logic po;
  
  logic m_go, n_go;
  logic m_po, n_po;
  int checks = 0, failures = 0;

  row_delay dut (.clk, .rst, .gi, .go, .po, .pi);

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
      logic u;
      u = !(m_go && !gi);
      n_go = m_go; n_po = m_po;
      if (!m_po && gi) n_go = 1; else if (m_po && pi) n_go = 0;
      if (!u && !pi) n_po = 1; else if (u) n_po = 0;
    end
    @(posedge clk); #1;
    m_go = n_go;
      m_po = n_po;
    
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gi = '0;
    pi = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m_go = 0;
    m_po = 0;
    for (int i = 0; i < 2000; i++) begin
      gi = 1'($urandom);
      pi = 1'($urandom);
      step();
      checks++;
      if (go != m_go || po != m_po) begin
        failures++;
        $display("FAIL random step %0d", i);
      end
    end
    // return to the initial state
    rst = 1; @(posedge clk); #1 rst = 0;
    m_go = 0;
    m_po = 0;
    // burst: row accepted (go), end of burst (gi low) raises po, pi lowers go then po
    gi = 1; pi = 0; step(); step(); chk(go == 1 && po == 0, "go after gi");
    gi = 0; step(); step(); chk(po == 1 && go == 1, "po after gi low");
    pi = 1; step(); chk(go == 0, "go cleared by pi"); step(); chk(po == 0, "po cleared");
    gi = 1; step(); chk(go == 1, "next burst accepted while pi still high");
    pi = 0; gi = 0; step(); step(); chk(po == 1, "second row issued");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
