// tb_mux4: exhaustive check of the 4-to-1 selector against its truth
// table (S1 S0 = 00 -> A, 01 -> B, 10 -> C, 11 -> D).
module tb_mux4;
  logic [3:0] d;
  logic [1:0] s;
  logic       z;
  int checks = 0, failures = 0;

  mux4 dut (.d(d), .s(s), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a, b, c, dd, exp;
    for (int i = 0; i < 64; i++) begin
      {s, d} = 6'(i);
      #1;
      {dd, c, b, a} = d;
      case (s)
        2'b00: exp = a;
        2'b01: exp = b;
        2'b10: exp = c;
        default: exp = dd;
      endcase
      checks++;
      if (z !== exp) begin
        failures++;
        $display("mismatch s=%b d=%b z=%b exp=%b", s, d, z, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
