// logic_cell: the logic part of one CLB: ULM, input inverters and register.
//
// The two ULM data inputs each pass through a 2-to-1 multiplexer that
// selects the signal itself (invert bit 0) or its complement (invert bit 1),
// so that functions such as XOR, which need a complemented input, fit in a
// single cell. The ULM output O feeds a D flip-flop, and a final 2-to-1
// multiplexer controlled by the C/S bit drives F: the flip-flop output Q
// on I0 (cs = 0, synchronous) or O itself on I1 (cs = 1, combinational).
//
// Timing: with cs = 1, f is a combinational function of x0, x1, sel; with
// cs = 0, f shows the ULM result sampled at the previous rising clk edge.
// The flip-flop clears to 0 on rst_n low (asynchronous) and at every clk
// edge while run is low (the array holds run low while it is being
// configured, so every flip-flop starts from 0 when the logic starts). Both
// clears are this design's additions, as is which inverter-mux input is the
// true signal.
module logic_cell
  import fpga_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic run,     // low: clear the flip-flop at the next clk edge
  input  logic x0,
  input  logic x1,
  input  logic sel,
  input  logic x0_inv,  // configuration: complement X0
  input  logic x1_inv,  // configuration: complement X1
  input  logic cs,      // configuration: 1 combinational, 0 registered
  output logic f
);

  logic x0_m, x1_m, o, q;

  always_comb x0_m = x0_inv ? ~x0 : x0;
  always_comb x1_m = x1_inv ? ~x1 : x1;

  ulm u_ulm (.x0(x0_m), .x1(x1_m), .sel(sel), .f(o));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else if (!run) q <= 1'b0;
    else            q <= o;
  end

  always_comb f = (cs == CS_COMB) ? o : q;

endmodule
