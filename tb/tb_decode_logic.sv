// tb_decode_logic: drives every valid dual-rail word and checks that exactly
// output j = address is high; drives words with one or more invalid bits
// (both rails low) and checks that every output stays low.
module tb_decode_logic;
  localparam int AW = 6, M = 48;   // M below 2**AW: upper addresses select nothing
  logic [AW-1:0] ent, enf;
  logic [M-1:0] sel, want;
  int checks = 0, failures = 0;

  decode_logic #(.M(M), .AW(AW)) dut (.ent, .enf, .sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      ent = AW'(a); enf = ~AW'(a);
      want = '0;
      if (a < M) want[a] = 1'b1;
      #1 checks++;
      if (sel != want) begin failures++; $display("FAIL addr %0d: sel=%h", a, sel); end
      // knock out one bit: invalid word
      for (int n = 0; n < AW; n++) begin
        ent = AW'(a) & ~(AW'(1) << n); enf = ~AW'(a) & ~(AW'(1) << n);
        #1 checks++;
        if (sel != 0) begin failures++; $display("FAIL invalid addr %0d bit %0d", a, n); end
        ent = AW'(a); enf = ~AW'(a);
      end
    end
    ent = 0; enf = 0;
    #1 checks++;
    if (sel != 0) begin failures++; $display("FAIL all idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
