// tb_logic_cell: random stimulus on the ULM cell with its input inverters,
// flip-flop and C/S output mux. A model in the testbench computes the ULM
// result and a one-cycle-delayed copy of it; f must equal the first with
// cs = 1 and the second with cs = 0. Also checks the reset value.
module tb_logic_cell;
  import fpga_pkg::*;
  logic clk, rst_n;
  logic run, x0, x1, sel, x0_inv, x1_inv, cs, f;
  logic model_q;
  int checks = 0, failures = 0;
  int n_comb = 0, n_sync = 0, n_inv = 0, n_clr = 0;

  logic_cell dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic logic ulm_model(logic a0, logic a1, logic s, logic i0, logic i1);
    logic m0, m1;
    m0 = a0 ^ i0;
    m1 = a1 ^ i1;
    return s ? m1 : m0;
  endfunction

  task automatic check(input logic exp, input string what);
    checks++;
    if (f !== exp) begin
      failures++;
      $display("%0t %s: f=%b exp=%b (x0=%b x1=%b sel=%b inv=%b%b cs=%b)",
               $time, what, f, exp, x0, x1, sel, x0_inv, x1_inv, cs);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {x0, x1, sel, x0_inv, x1_inv} = '0;
    cs = CS_SYNC;
    run = 1;
    rst_n = 0;
    #12;
    check(1'b0, "reset");
    rst_n = 1;
    model_q = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      {x0, x1, sel, x0_inv, x1_inv, cs} = 6'($urandom);
      run = ($urandom_range(9) != 0);
      #1;
      if (cs == CS_COMB) begin
        check(ulm_model(x0, x1, sel, x0_inv, x1_inv), "combinational");
        n_comb++;
      end else begin
        check(model_q, "registered");
        n_sync++;
      end
      if (x0_inv | x1_inv) n_inv++;
      @(posedge clk);
      model_q = run ? ulm_model(x0, x1, sel, x0_inv, x1_inv) : 1'b0;
      if (!run) n_clr++;
    end
    run = 1;
    // XOR from the ULM: SEL=A, X0=B, X1=not B (X1 taken as B and inverted)
    cs = CS_COMB; x0_inv = 0; x1_inv = 1;
    for (int i = 0; i < 4; i++) begin
      sel = i[1]; x0 = i[0]; x1 = i[0];
      #1 check(i[1] ^ i[0], "XOR example");
    end
    if (n_comb == 0 || n_sync == 0 || n_inv == 0 || n_clr == 0) begin
      failures++;
      $display("coverage hole comb=%0d sync=%0d inv=%0d", n_comb, n_sync, n_inv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
