// tb_clb: random configurations and random side inputs on one CLB. A model
// in the testbench decodes the 17-bit word field by field, picks X0, X1 and
// SEL, applies the inverters, forms the ULM result (registered or not) and
// selects each side output, and the four outputs are compared with it.
// Directed cases repeat the routing examples: a signal passing straight
// through (Win to Eout, Win to Sout) and F fanned out to all four sides.
// With run low all outputs must be 0 and the flip-flop clears. Finally an
// exhaustive search over the ULM settings shows that one CLB reaches all 16
// functions of two inputs when constants are supplied on two sides.
module tb_clb;
  import fpga_pkg::*;
  logic clk, rst_n, run;
  clb_cfg_t cfg;
  logic n_in, e_in, s_in, w_in, n_out, e_out, s_out, w_out;
  logic model_q;
  int checks = 0, failures = 0;
  int n_pass = 0, n_f = 0, n_sync = 0, n_comb = 0, n_off = 0;

  clb dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic logic pick(logic [1:0] s, logic a, logic b, logic c, logic d);
    case (s)
      2'd0: return a;
      2'd1: return b;
      2'd2: return c;
      default: return d;
    endcase
  endfunction

  function automatic logic ulm_o(clb_cfg_t k, logic n, logic e, logic s, logic w);
    logic a0, a1, sl;
    a0 = pick(k.x0_sel, n, e, s, w) ^ k.x0_inv;
    a1 = pick(k.x1_sel, n, e, s, w) ^ k.x1_inv;
    sl = pick(k.sel_sel, n, e, s, w);
    return (~sl & a0) | (sl & a1);
  endfunction

  task automatic check_outputs(input logic f_exp);
    logic en, ee, es, ew;
    en = pick(cfg.n_out_sel, e_in, s_in, w_in, f_exp) & run;
    ee = pick(cfg.e_out_sel, n_in, s_in, w_in, f_exp) & run;
    es = pick(cfg.s_out_sel, n_in, e_in, w_in, f_exp) & run;
    ew = pick(cfg.w_out_sel, n_in, e_in, s_in, f_exp) & run;
    checks++;
    if ({n_out, e_out, s_out, w_out} !== {en, ee, es, ew}) begin
      failures++;
      $display("%0t cfg=%h in(NESW)=%b%b%b%b out=%b%b%b%b exp=%b%b%b%b", $time, cfg,
               n_in, e_in, s_in, w_in, n_out, e_out, s_out, w_out, en, ee, es, ew);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if ($bits(clb_cfg_t) != 17) begin
      failures++;
      $display("configuration word has %0d bits", $bits(clb_cfg_t));
    end
    cfg = '0;
    run = 1;
    {n_in, e_in, s_in, w_in} = '0;
    rst_n = 0;
    #12 rst_n = 1;
    model_q = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cfg = clb_cfg_t'($urandom);
      {n_in, e_in, s_in, w_in} = 4'($urandom);
      run = ($urandom_range(15) != 0);
      if (!run) n_off++;
      #1;
      if (cfg.cs == CS_COMB) begin
        check_outputs(ulm_o(cfg, n_in, e_in, s_in, w_in));
        n_comb++;
      end else begin
        check_outputs(model_q);
        n_sync++;
      end
      for (int j = 0; j < 4; j++) begin
        automatic logic [1:0] sj;
        sj = cfg[16 - 2*j -: 2];
        if (sj == OSEL_F) n_f++; else n_pass++;
      end
      @(posedge clk);
      model_q = run ? ulm_o(cfg, n_in, e_in, s_in, w_in) : 1'b0;
    end
    run = 1;
    // directed: A -> B -> C pass-through, B forwards Win to Eout and Sout
    @(negedge clk);
    cfg = '0;
    cfg.e_out_sel = 2'd2;   // Eout <- Win
    cfg.s_out_sel = 2'd2;   // Sout <- Win
    for (int v = 0; v < 2; v++) begin
      {n_in, e_in, s_in} = 3'($urandom);
      w_in = v[0];
      #1;
      checks++;
      if (e_out !== w_in || s_out !== w_in) begin
        failures++;
        $display("pass-through failed: w_in=%b e_out=%b s_out=%b", w_in, e_out, s_out);
      end
    end
    // directed: F = Nin AND Win on every side
    cfg = '0;
    cfg.cs = CS_COMB;
    cfg.sel_sel = DIR_N; cfg.x0_sel = DIR_N; cfg.x1_sel = DIR_W;
    cfg.n_out_sel = OSEL_F; cfg.e_out_sel = OSEL_F;
    cfg.s_out_sel = OSEL_F; cfg.w_out_sel = OSEL_F;
    for (int v = 0; v < 4; v++) begin
      {n_in, w_in} = 2'(v);
      {e_in, s_in} = 2'($urandom);
      #1;
      checks++;
      if ({n_out, e_out, s_out, w_out} !== {4{n_in & w_in}}) begin
        failures++;
        $display("AND fan-out failed: n=%b w=%b out=%b%b%b%b", n_in, w_in,
                 n_out, e_out, s_out, w_out);
      end
    end
    // exhaustive: with A on Nin, B on Win, constant 0 on Ein and 1 on Sin,
    // the 256 settings of the ULM input selects and inverters must reach
    // all 16 functions of A and B; the named gates must come out where the
    // table of useful settings puts them.
    begin
      automatic bit reach [16];
      automatic int n_reach = 0;
      foreach (reach[i]) reach[i] = 0;
      for (int k = 0; k < 256; k++) begin
        automatic logic [3:0] tt;
        cfg = '0;
        cfg.cs = CS_COMB;
        cfg.e_out_sel = OSEL_F;
        {cfg.x0_sel, cfg.x1_sel, cfg.sel_sel, cfg.x0_inv, cfg.x1_inv} = 8'(k);
        e_in = 1'b0; s_in = 1'b1;
        for (int v = 0; v < 4; v++) begin
          {n_in, w_in} = 2'(v);   // A = v[1], B = v[0]
          #1 tt[v] = e_out;
        end
        reach[tt] = 1;
        // named gates (truth table index = {A,B})
        if (cfg.x0_inv == 0 && cfg.x1_inv == 0 && cfg.sel_sel == DIR_N) begin
          if (cfg.x0_sel == DIR_N && cfg.x1_sel == DIR_W) begin
            checks++; if (tt !== 4'b1000) begin failures++; $display("AND setting gives %b", tt); end
          end
          if (cfg.x0_sel == DIR_W && cfg.x1_sel == DIR_N) begin
            checks++; if (tt !== 4'b1110) begin failures++; $display("OR setting gives %b", tt); end
          end
        end
        if (cfg.x0_inv == 1 && cfg.x1_inv == 1 && cfg.sel_sel == DIR_N) begin
          if (cfg.x0_sel == DIR_N && cfg.x1_sel == DIR_W) begin
            checks++; if (tt !== 4'b0111) begin failures++; $display("NAND setting gives %b", tt); end
          end
          if (cfg.x0_sel == DIR_W && cfg.x1_sel == DIR_N) begin
            checks++; if (tt !== 4'b0001) begin failures++; $display("NOR setting gives %b", tt); end
          end
        end
        if (cfg.x0_inv == 0 && cfg.x1_inv == 1 && cfg.sel_sel == DIR_N &&
            cfg.x0_sel == DIR_W && cfg.x1_sel == DIR_W) begin
          checks++; if (tt !== 4'b0110) begin failures++; $display("XOR setting gives %b", tt); end
        end
      end
      foreach (reach[i]) if (reach[i]) n_reach++;
      checks++;
      if (n_reach != 16) begin
        failures++;
        $display("only %0d of 16 two-input functions reachable", n_reach);
      end
    end
    if (n_pass == 0 || n_f == 0 || n_sync == 0 || n_comb == 0 || n_off == 0) begin
      failures++;
      $display("coverage hole pass=%0d f=%0d sync=%0d comb=%0d", n_pass, n_f, n_sync, n_comb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
