// tb_demux_u: exhaustive check of the three-to-four-wire converter.
// All 16 combinations of ari, aci_n, ri, ci are applied and ro, co, ao are
// compared with the converter's truth table, written here as explicit cases.
// A short three-wire burst (row, column, terminator) is then walked through
// and the acknowledge is checked at every step.
module tb_demux_u;
  logic ari, aci_n, ri, ci, ao, ro, co;
  int checks = 0, failures = 0;

  demux_u dut (.ari, .aci_n, .ao, .ro, .ri, .co, .ci);

  task automatic expect3(input logic e_ro, input logic e_co, input logic e_ao, input string what);
    #1;
    checks++;
    if (ro !== e_ro || co !== e_co || ao !== e_ao) begin
      failures++;
      $display("FAIL %s: ari=%b aci_n=%b ri=%b ci=%b -> ro=%b co=%b ao=%b, want %b %b %b",
               what, ari, aci_n, ri, ci, ro, co, ao, e_ro, e_co, e_ao);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic e_co, e_ao;
      {ari, aci_n, ri, ci} = 4'(v);
      // column request only inside a burst and only while aci_n is low
      e_co = (ari == 1'b1 && aci_n == 1'b0) ? 1'b1 : 1'b0;
      // ao high only when the row is acknowledged and no column is pending
      e_ao = (ri == 1'b1 && ci == 1'b0) ? 1'b1 : 1'b0;
      expect3(ari, e_co, e_ao, "table");
    end
    // walk a burst: row, one column, terminator
    ari = 0; aci_n = 1; ri = 0; ci = 0; expect3(0, 0, 0, "idle");
    ari = 1;                           expect3(1, 0, 0, "row req");
    ri = 1;                            expect3(1, 0, 1, "row ack");
    aci_n = 0;                         expect3(1, 1, 1, "col req");
    ci = 1;                            expect3(1, 1, 0, "col ack");
    aci_n = 1;                         expect3(1, 0, 0, "col release");
    ci = 0;                            expect3(1, 0, 1, "col done");
    ari = 0;                           expect3(0, 0, 1, "terminator");
    ri = 0;                            expect3(0, 0, 0, "burst done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
