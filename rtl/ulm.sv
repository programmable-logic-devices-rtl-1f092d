// ulm: universal logic module, the logic element of each CLB.
//
// A 2-to-1 multiplexer, f = ~sel & x0 | sel & x1 (x0 on input I0, x1 on
// I1). By choosing what drives x0, x1 and sel it realises any function of
// two variables: sel=A, x0=A, x1=B gives A AND B; sel=A, x0=B, x1=~B gives
// A XOR B. Purely combinational.
module ulm (
  input  logic x0,
  input  logic x1,
  input  logic sel,
  output logic f
);

  always_comb f = sel ? x1 : x0;

endmodule
