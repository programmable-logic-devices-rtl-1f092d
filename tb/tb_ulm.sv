// tb_ulm: checks the universal logic module against F = ~SEL.X0 + SEL.X1
// for all inputs, then builds AND and XOR from it by input assignment
// (SEL=A, X0=A, X1=B for AND; SEL=A, X0=B, X1=~B for XOR).
module tb_ulm;
  logic x0, x1, sel, f;
  int checks = 0, failures = 0;

  ulm dut (.x0(x0), .x1(x1), .sel(sel), .f(f));

  task automatic check(input logic exp, input string what);
    checks++;
    if (f !== exp) begin
      failures++;
      $display("%s: x0=%b x1=%b sel=%b f=%b exp=%b", what, x0, x1, sel, f, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, x1, x0} = 3'(i);
      #1 check((~sel & x0) | (sel & x1), "equation");
    end
    for (int i = 0; i < 4; i++) begin
      logic a, b;
      {a, b} = 2'(i);
      sel = a; x0 = a; x1 = b;
      #1 check(a & b, "AND");
      sel = a; x0 = b; x1 = ~b;
      #1 check(a ^ b, "XOR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
