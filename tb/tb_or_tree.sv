// tb_or_tree: checks the OR tree for several widths (odd and even) with
// walking ones, all zeros and random words.
module tb_or_tree;
  logic [36:0] a37; logic y37;
  logic [4:0]  a5;  logic y5;
  logic        a1;  logic y1;
  int checks = 0, failures = 0;

  or_tree #(.N(37)) u37 (.a(a37), .y(y37));
  or_tree #(.N(5))  u5  (.a(a5),  .y(y5));
  or_tree #(.N(1))  u1  (.a(a1),  .y(y1));

  task automatic chk(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a37 = 0; a5 = 0; a1 = 0;
    #1 chk(y37, 0, "37 zero"); #1 chk(y5, 0, "5 zero"); #1 chk(y1, 0, "1 zero");
    a1 = 1; #1 chk(y1, 1, "1 one");
    for (int i = 0; i < 37; i++) begin a37 = 37'(1) << i; #1 chk(y37, 1, "37 walk"); end
    for (int i = 0; i < 5; i++)  begin a5 = 5'(1) << i;   #1 chk(y5, 1, "5 walk"); end
    for (int i = 0; i < 200; i++) begin
      a37 = {$urandom, $urandom} & (($urandom % 2) ? 37'h1f_ffff_ffff : 37'(1) << ($urandom % 37));
      if ($urandom % 4 == 0) a37 = 0;
      #1 chk(y37, a37 != 0, "37 random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
