// cfg_sram: the configuration memory of one CLB.
//
// Holds the 17 bits that set the CLB's multiplexers. The bits are written
// serially: while cfg_shift is high, each rising clk edge shifts the word
// one place towards its MSB, taking cfg_in into bit 0 and presenting the
// old MSB on cfg_out. Chaining cfg_out to the next CLB's cfg_in makes the
// whole device loadable from one bitstream; after 17 shifts a CLB holds
// the 17 bits last passed to it, first bit in the MSB. While cfg_shift is
// low the word holds and drives cfg continuously.
//
// The bits are configuration SRAM in the architecture; the serial write
// path, and clearing to all-zero on rst_n low, are this design's choices
// (the all-zero word routes every output from an input, never from F,
// so a cleared device has no combinational loop).
module cfg_sram
  import fpga_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cfg_shift,
  input  logic     cfg_in,
  output logic     cfg_out,
  output clb_cfg_t cfg
);

  logic [CFG_BITS-1:0] bits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         bits <= '0;
    else if (cfg_shift) bits <= {bits[CFG_BITS-2:0], cfg_in};
  end

  always_comb cfg     = clb_cfg_t'(bits);
  always_comb cfg_out = bits[CFG_BITS-1];

endmodule
