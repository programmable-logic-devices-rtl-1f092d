// mux4: 4-to-1 data selector, the routing primitive of the FPGA.
//
// z follows d[0], d[1], d[2] or d[3] (inputs I0..I3, named A..D in the
// selector's truth table) for s = {S1,S0} = 00, 01, 10, 11. Purely
// combinational; every routing choice of a CLB is one of these, with its
// select bits held in configuration memory.
module mux4 (
  input  logic [3:0] d,
  input  logic [1:0] s,
  output logic       z
);

  always_comb begin
    unique case (s)
      2'b00: z = d[0];
      2'b01: z = d[1];
      2'b10: z = d[2];
      2'b11: z = d[3];
    endcase
  end

endmodule
