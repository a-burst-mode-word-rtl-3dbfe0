// tb_row_address_latch: random address bus and strobe; the held value must
// follow the bus while go is low and freeze at the value loaded on the last
// edge before go went high.
module tb_row_address_latch;
  logic clk = 0, rst = 1, go;
  logic [5:0] d, q, model;
  int checks = 0, failures = 0;

  row_address_latch #(.B(6)) dut (.clk, .rst, .go, .d, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    go = 0; d = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0; model = 0;
    for (int i = 0; i < 1000; i++) begin
      go = ($urandom % 3) == 0 ? 1'b0 : 1'b1;
      d  = 6'($urandom);
      if (!go) model = d;
      @(posedge clk); #1;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL step %0d: q=%h want %h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
