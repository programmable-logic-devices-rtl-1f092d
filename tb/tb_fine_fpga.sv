// tb_fine_fpga: end-to-end test of the FPGA at its default size.
//
// The testbench writes bitstreams into the device through the serial
// configuration port and then drives the edge input pins, comparing all
// edge output pins with a model of the array kept in the testbench. The
// model evaluates every CLB from the decoded configuration words and
// relaxes the neighbour wiring until it settles; flip-flops are modelled
// separately and clocked with the device.
//
// Parts:
//   1. A directed circuit across three CLBs: CLB A at (0,0) forms
//      Nin AND Win, CLB B at (0,1) only forwards it south (pass-through to
//      a non-adjacent CLB), CLB C at (1,1) XORs it with its own Ein and the
//      column below carries the result to the south pin.
//   1b. A toggle flip-flop: a registered CLB whose output returns to its
//      own input round a ring of four CLBs, a loop that only the register
//      makes legal.
//   2. Random bitstreams restricted so that no combinational loop can form:
//      a combinational CLB reads its ULM inputs only from north and west and
//      drives east and south only from north, west or F; signals may flow
//      back north and west freely. Registered CLBs may read any side.
//   3. Read-back: the serial output must repeat the bitstream once it has
//      passed through every CLB.
// Counted mechanisms: combinational output, registered output, inverted
// ULM input, pass-through routing, F fanned out to several sides, device
// reconfiguration, configuration read-back, outputs held at 0 while
// loading and registered feedback through the routing. Each must occur.
module tb_fine_fpga;
  import fpga_pkg::*;
  localparam int ROWS = 6, COLS = 6;
  localparam int NCELL = ROWS * COLS;
  localparam int NBITS = NCELL * CFG_BITS;

  logic clk, rst_n, cfg_shift, cfg_in, cfg_out;
  logic [COLS-1:0] pin_n_in, pin_n_out, pin_s_in, pin_s_out;
  logic [ROWS-1:0] pin_w_in, pin_w_out, pin_e_in, pin_e_out;

  fine_fpga dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_comb = 0, n_sync = 0, n_inv = 0, n_pass = 0, n_fanout = 0;
  int n_reconfig = 0, n_readback = 0, n_gated = 0, n_toggle = 0;

  clb_cfg_t cfgm [ROWS][COLS];
  logic     qm   [ROWS][COLS];
  // model nets
  logic mn [ROWS][COLS], me [ROWS][COLS], ms [ROWS][COLS], mw [ROWS][COLS];

  function automatic logic pick(logic [1:0] s, logic a, logic b, logic c, logic d);
    case (s)
      2'd0: return a;
      2'd1: return b;
      2'd2: return c;
      default: return d;
    endcase
  endfunction

  // ULM result of CLB (r,c) given its four inputs
  function automatic logic ulm_o(clb_cfg_t k, logic n, logic e, logic s, logic w);
    logic a0, a1, sl;
    a0 = pick(k.x0_sel, n, e, s, w) ^ k.x0_inv;
    a1 = pick(k.x1_sel, n, e, s, w) ^ k.x1_inv;
    sl = pick(k.sel_sel, n, e, s, w);
    return sl ? a1 : a0;
  endfunction

  // inputs of CLB (r,c) in the model
  function automatic logic in_n(int r, int c); return (r == 0) ? pin_n_in[c] : ms[r-1][c]; endfunction
  function automatic logic in_s(int r, int c); return (r == ROWS-1) ? pin_s_in[c] : mn[r+1][c]; endfunction
  function automatic logic in_w(int r, int c); return (c == 0) ? pin_w_in[r] : me[r][c-1]; endfunction
  function automatic logic in_e(int r, int c); return (c == COLS-1) ? pin_e_in[r] : mw[r][c+1]; endfunction

  function automatic logic f_of(int r, int c);
    if (cfgm[r][c].cs == CS_SYNC) return qm[r][c];
    return ulm_o(cfgm[r][c], in_n(r, c), in_e(r, c), in_s(r, c), in_w(r, c));
  endfunction

  // settle all nets of the model (Jacobi-style relaxation)
  task automatic settle();
    logic nn [ROWS][COLS], ne [ROWS][COLS], ns [ROWS][COLS], nw [ROWS][COLS];
    bit changed;
    for (int it = 0; it < 4 * NCELL + 4; it++) begin
      changed = 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          logic f, n, e, s, w;
          f = f_of(r, c);
          n = in_n(r, c); e = in_e(r, c); s = in_s(r, c); w = in_w(r, c);
          nn[r][c] = pick(cfgm[r][c].n_out_sel, e, s, w, f);
          ne[r][c] = pick(cfgm[r][c].e_out_sel, n, s, w, f);
          ns[r][c] = pick(cfgm[r][c].s_out_sel, n, e, w, f);
          nw[r][c] = pick(cfgm[r][c].w_out_sel, n, e, s, f);
        end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          if (nn[r][c] != mn[r][c] || ne[r][c] != me[r][c] ||
              ns[r][c] != ms[r][c] || nw[r][c] != mw[r][c]) changed = 1;
          mn[r][c] = nn[r][c]; me[r][c] = ne[r][c];
          ms[r][c] = ns[r][c]; mw[r][c] = nw[r][c];
        end
      if (!changed) return;
    end
    failures++;
    $display("model did not settle: configuration has a loop");
  endtask

  task automatic clock_model();
    logic nq [ROWS][COLS];
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        nq[r][c] = ulm_o(cfgm[r][c], in_n(r, c), in_e(r, c), in_s(r, c), in_w(r, c));
    qm = nq;
  endtask

  task automatic compare(input string what);
    logic [COLS-1:0] en, es;
    logic [ROWS-1:0] ew, ee;
    settle();
    for (int c = 0; c < COLS; c++) begin
      en[c] = mn[0][c];
      es[c] = ms[ROWS-1][c];
    end
    for (int r = 0; r < ROWS; r++) begin
      ew[r] = mw[r][0];
      ee[r] = me[r][COLS-1];
    end
    checks++;
    if (pin_n_out !== en || pin_s_out !== es || pin_w_out !== ew || pin_e_out !== ee) begin
      failures++;
      $display("%0t %s: pins N %b/%b S %b/%b W %b/%b E %b/%b (got/expected)", $time, what,
               pin_n_out, en, pin_s_out, es, pin_w_out, ew, pin_e_out, ee);
    end
  endtask

  // shift the model configuration into the device, last CLB first, MSB
  // first; checks the serial output against the previous bitstream
  task automatic load(input clb_cfg_t prev [ROWS][COLS], input bit check_rb);
    logic [NBITS-1:0] stream, old;
    int rb_err = 0;
    for (int k = 0; k < NCELL; k++) begin
      stream[k*CFG_BITS +: CFG_BITS] = cfgm[k / COLS][k % COLS];
      old[k*CFG_BITS +: CFG_BITS]    = prev[k / COLS][k % COLS];
    end
    // the stream goes in from its top bit down
    for (int b = NBITS - 1; b >= 0; b--) begin
      @(negedge clk);
      cfg_shift = 1;
      cfg_in = stream[b];
      if (check_rb && cfg_out !== old[b]) rb_err++;
      // the logic is held off while loading
      #1;
      checks++;
      if ({pin_n_out, pin_s_out, pin_w_out, pin_e_out} != '0) begin
        failures++;
        $display("output pins active while loading");
      end
      n_gated++;
      @(posedge clk);
    end
    @(negedge clk);
    cfg_shift = 0;
    // flip-flops were cleared during loading
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) qm[r][c] = 1'b0;
    if (check_rb) begin
      checks++;
      n_readback++;
      if (rb_err != 0) begin
        failures++;
        $display("read-back: %0d bits differ", rb_err);
      end
    end
    n_reconfig++;
  endtask

  // keep cfgm loop-free; see header
  function automatic clb_cfg_t rand_cfg();
    clb_cfg_t k;
    k = clb_cfg_t'($urandom);
    if (k.cs == CS_COMB) begin
      k.x0_sel  = ($urandom_range(1) != 0) ? DIR_N : DIR_W;
      k.x1_sel  = ($urandom_range(1) != 0) ? DIR_N : DIR_W;
      k.sel_sel = ($urandom_range(1) != 0) ? DIR_N : DIR_W;
    end
    // Eout: N, S, W, F -> avoid S;  Sout: N, E, W, F -> avoid E
    if (k.e_out_sel == 2'd1) k.e_out_sel = 2'd2 + 2'($urandom_range(1));
    if (k.s_out_sel == 2'd1) k.s_out_sel = 2'd2 + 2'($urandom_range(1));
    return k;
  endfunction

  task automatic count_cfg();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int nf;
        clb_cfg_t k;
        k = cfgm[r][c];
        if (k.cs == CS_COMB) n_comb++; else n_sync++;
        if (k.x0_inv || k.x1_inv) n_inv++;
        nf = int'(k.n_out_sel == OSEL_F) + int'(k.e_out_sel == OSEL_F) +
             int'(k.s_out_sel == OSEL_F) + int'(k.w_out_sel == OSEL_F);
        if (nf < 4) n_pass++;
        if (nf > 1) n_fanout++;
      end
  endtask

  task automatic random_pins();
    pin_n_in = COLS'($urandom);
    pin_s_in = COLS'($urandom);
    pin_w_in = ROWS'($urandom);
    pin_e_in = ROWS'($urandom);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clb_cfg_t prev [ROWS][COLS];
    cfg_shift = 0; cfg_in = 0;
    pin_n_in = '0; pin_s_in = '0; pin_w_in = '0; pin_e_in = '0;
    rst_n = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        cfgm[r][c] = '0;
        qm[r][c] = 1'b0;
      end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // the cleared device routes pins straight through
    repeat (8) begin
      @(negedge clk);
      random_pins();
      #1 compare("cleared device");
    end

    // ---- 1. directed three-CLB circuit --------------------------------
    prev = cfgm;
    // A (0,0): F = Nin AND Win (SEL=Nin, X0=Nin, X1=Win), Eout <- F
    cfgm[0][0].cs = CS_COMB;
    cfgm[0][0].sel_sel = DIR_N; cfgm[0][0].x0_sel = DIR_N; cfgm[0][0].x1_sel = DIR_W;
    cfgm[0][0].e_out_sel = OSEL_F;
    // B (0,1): Sout <- Win, nothing else
    cfgm[0][1].s_out_sel = 2'd2;
    // C (1,1): F = Nin XOR Ein (SEL=Nin, X0=Ein, X1=not Ein), Sout <- F
    cfgm[1][1].cs = CS_COMB;
    cfgm[1][1].sel_sel = DIR_N; cfgm[1][1].x0_sel = DIR_E; cfgm[1][1].x1_sel = DIR_E;
    cfgm[1][1].x1_inv = 1'b1;
    cfgm[1][1].s_out_sel = OSEL_F;
    load(prev, 1'b1);
    count_cfg();
    for (int v = 0; v < 16; v++) begin
      logic exp;
      @(negedge clk);
      random_pins();
      #1;
      // Ein of C comes from Wout of (1,2), cleared: Nin of (1,2), which is
      // the north pin of column 2 passed down by (0,2); the cells below C
      // pass Nin south.
      exp = (pin_n_in[0] & pin_w_in[0]) ^ pin_n_in[2];
      checks++;
      if (pin_s_out[1] !== exp) begin
        failures++;
        $display("A-B-C circuit: south pin 1 = %b, expected %b", pin_s_out[1], exp);
      end
      compare("A-B-C circuit");
    end

    // ---- 1b. registered feedback through the routing ------------------
    // A toggle flip-flop: CLB (0,0) registers Sin XOR Win; its F goes east,
    // round the 2 x 2 ring (0,1) -> (1,1) -> (1,0) of pass-through CLBs and
    // back into its own Sin. Win (pin_w_in[0]) is the toggle enable and
    // Nout shows Q on pin_n_out[0].
    prev = cfgm;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) cfgm[r][c] = '0;
    cfgm[0][0].cs = CS_SYNC;
    cfgm[0][0].sel_sel = DIR_W; cfgm[0][0].x0_sel = DIR_S; cfgm[0][0].x1_sel = DIR_S;
    cfgm[0][0].x1_inv = 1'b1;
    cfgm[0][0].e_out_sel = OSEL_F;
    cfgm[0][0].n_out_sel = OSEL_F;
    cfgm[0][1].s_out_sel = 2'd2;   // Sout <- Win
    cfgm[1][1].w_out_sel = 2'd0;   // Wout <- Nin
    cfgm[1][0].n_out_sel = 2'd0;   // Nout <- Ein
    load(prev, 1'b1);
    count_cfg();
    begin
      automatic logic tq = 1'b0;
      for (int v = 0; v < 32; v++) begin
        pin_n_in = COLS'($urandom); pin_s_in = COLS'($urandom);
        pin_e_in = ROWS'($urandom);
        pin_w_in = ROWS'($urandom);
        #1;
        checks++;
        if (pin_n_out[0] !== tq) begin
          failures++;
          $display("toggle flip-flop: Q = %b, expected %b", pin_n_out[0], tq);
        end
        compare("toggle flip-flop");
        @(posedge clk);
        clock_model();
        if (pin_w_in[0]) begin
          tq = ~tq;
          n_toggle++;
        end
        @(negedge clk);
      end
    end

    // ---- 2. random bitstreams -----------------------------------------
    for (int t = 0; t < 100; t++) begin
      prev = cfgm;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) cfgm[r][c] = rand_cfg();
      load(prev, 1'b1);
      count_cfg();
      // load() returns at a falling edge; each vector spans one clock
      for (int v = 0; v < 40; v++) begin
        random_pins();
        #1 compare("random bitstream");
        @(posedge clk);
        clock_model();
        @(negedge clk);
      end
    end

    if (n_comb == 0 || n_sync == 0 || n_inv == 0 || n_pass == 0 ||
        n_fanout == 0 || n_reconfig < 2 || n_readback == 0 || n_gated == 0 || n_toggle == 0) begin
      failures++;
      $display("mechanism missing");
    end
    $display("mechanisms: combinational=%0d registered=%0d inverted=%0d pass-through=%0d fan-out=%0d",
             n_comb, n_sync, n_inv, n_pass, n_fanout);
    $display("mechanisms: reconfigurations=%0d read-backs=%0d outputs-held-while-loading=%0d feedback-toggles=%0d",
             n_reconfig, n_readback, n_gated, n_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
