// clb: one configurable logic block of the fine-grained FPGA.
//
// A CLB has one input and one output on each side (N, E, S, W), all wired
// only to the adjacent CLB or to a pin at the array edge. Inside:
//   - three 4-to-1 multiplexers choose X0, X1 and SEL of the ULM from
//     Nin, Ein, Sin, Win;
//   - the logic cell (ULM with input inverters, flip-flop and C/S mux)
//     forms F;
//   - four 4-to-1 multiplexers drive Nout, Eout, Sout and Wout, each from
//     F or from any of the three inputs on the other sides. The latter lets
//     a signal pass through the CLB to reach a non-adjacent one, and the
//     ULM output can go to any combination of the four outputs.
// All select and invert bits come from the 17-bit word cfg (see fpga_pkg
// for its layout and the order of the multiplexer inputs, which is this
// design's choice).
//
// run is this design's addition: while it is low all four side outputs
// are driven 0 and the flip-flop is cleared at each clk edge. The array
// holds it low during reset and while a bitstream is shifted in, when the
// half-loaded words could otherwise close oscillating combinational loops
// through neighbouring CLBs.
//
// Timing: the block is combinational from side inputs to side outputs,
// except through the flip-flop when cfg.cs = CS_SYNC, which samples the ULM
// result on the rising clk edge; clk and rst_n serve only that flip-flop.
module clb
  import fpga_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  clb_cfg_t cfg,
  input  logic     run,     // low: outputs 0, flip-flop cleared
  input  logic     n_in,
  input  logic     e_in,
  input  logic     s_in,
  input  logic     w_in,
  output logic     n_out,
  output logic     e_out,
  output logic     s_out,
  output logic     w_out
);

  logic [3:0] nesw;   // inputs indexed by dir_e
  logic       x0, x1, sel, f;
  logic       n_m, e_m, s_m, w_m;

  always_comb nesw = {w_in, s_in, e_in, n_in};

  // ULM input routing
  mux4 u_mux_x0  (.d(nesw), .s(cfg.x0_sel),  .z(x0));
  mux4 u_mux_x1  (.d(nesw), .s(cfg.x1_sel),  .z(x1));
  mux4 u_mux_sel (.d(nesw), .s(cfg.sel_sel), .z(sel));

  logic_cell u_cell (
    .clk    (clk),
    .rst_n  (rst_n),
    .run    (run),
    .x0     (x0),
    .x1     (x1),
    .sel    (sel),
    .x0_inv (cfg.x0_inv),
    .x1_inv (cfg.x1_inv),
    .cs     (cfg.cs),
    .f      (f)
  );

  // Output routing: the three other sides in N, E, S, W order, then F.
  mux4 u_mux_n (.d({f, w_in, s_in, e_in}), .s(cfg.n_out_sel), .z(n_m));
  mux4 u_mux_e (.d({f, w_in, s_in, n_in}), .s(cfg.e_out_sel), .z(e_m));
  mux4 u_mux_s (.d({f, w_in, e_in, n_in}), .s(cfg.s_out_sel), .z(s_m));
  mux4 u_mux_w (.d({f, s_in, e_in, n_in}), .s(cfg.w_out_sel), .z(w_m));

  always_comb {n_out, e_out, s_out, w_out} = {n_m, e_m, s_m, w_m} & {4{run}};

endmodule
