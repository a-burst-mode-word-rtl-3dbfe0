// tb_address_latch: runs the decoder input stage through random four-phase
// handshakes with random data and random delays on both sides. Checks: lo
// equals eo; the dual-rail outputs are all low while eo is low and carry the
// address presented with li while eo is high; eo follows the C-element rule
// (rises only with li & ~ei, falls only with ~li & ei); the address is held
// even if the input bus changes while eo is high.
module tb_address_latch;
  localparam int AW = 5;
  logic clk = 0, rst = 1, li, lo, eo, ei;
  logic [AW-1:0] d, ent, enf, sent;
  logic m_eo;
  int checks = 0, failures = 0, words = 0;

  address_latch #(.AW(AW)) dut (.clk, .rst, .li, .lo, .eo, .ei, .d, .ent, .enf);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference C-element and output checks every cycle
  always @(posedge clk) if (!rst) begin
    logic n;
    n = m_eo;
    if (li && !ei) n = 1; else if (!li && ei) n = 0;
    m_eo <= n;
  end
  always @(negedge clk) if (!rst) begin
    chk(eo == m_eo, "C-element");
    chk(lo == eo, "lo = eo");
    if (!eo) chk(ent == 0 && enf == 0, "rails idle");
    else     chk(ent == sent && enf == ~sent, "rails carry address");
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sender: bundled data, address stable before li
  initial begin
    li = 0; d = 0; ei = 0; m_eo = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 300; i++) begin
      d = AW'($urandom); sent = d;
      repeat ($urandom % 3) @(posedge clk);
      #1 li = 1;
      while (!lo) @(posedge clk);
      #1 d = AW'($urandom);              // bus may change once acknowledged
      li = 0;
      while (lo) @(posedge clk);
      #1;
      words++;
    end
    chk(words == 300, "all words passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver side: acknowledge the decoded word after a random delay
  initial begin
    forever begin
      @(posedge clk);
      if (eo && !ei) begin
        repeat ($urandom % 3) @(posedge clk);
        #1 ei = 1;
      end else if (!eo && ei) begin
        repeat ($urandom % 2) @(posedge clk);
        #1 ei = 0;
      end
    end
  end
endmodule
