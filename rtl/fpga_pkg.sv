// fpga_pkg: types and constants shared by the fine-grained FPGA.
//
// Every CLB of the array is set up by 17 configuration bits, the count
// given for this architecture: 2 select bits for each of the four output
// multiplexers, 1 invert bit for each of the two ULM data inputs, 2 select
// bits for each of the three ULM input multiplexers and 1 bit that picks a
// combinational or registered CLB output. How those bits are ordered inside
// the word is this design's choice: the fields below are listed most
// significant first in the same order as that count.
//
// ULM input multiplexers (X0, X1, SEL) choose among the four neighbour
// inputs in the order Nin, Ein, Sin, Win (select 0..3). Each output
// multiplexer chooses among the three inputs from the other sides, kept in
// N, E, S, W order, and the logic output F on select 3:
//   Nout: Ein, Sin, Win, F     Eout: Nin, Sin, Win, F
//   Sout: Nin, Ein, Win, F     Wout: Nin, Ein, Sin, F
package fpga_pkg;

  localparam int unsigned CFG_BITS = 17;

  // Side of a CLB; also the select code of a ULM input multiplexer.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Output multiplexer select: one of the three other sides, or F.
  typedef logic [1:0] out_sel_t;
  localparam out_sel_t OSEL_F = 2'd3;

  // C/S bit: 1 passes the ULM result straight through, 0 the flip-flop.
  localparam logic CS_COMB = 1'b1;
  localparam logic CS_SYNC = 1'b0;

  typedef struct packed {
    out_sel_t n_out_sel;  // [16:15]
    out_sel_t e_out_sel;  // [14:13]
    out_sel_t s_out_sel;  // [12:11]
    out_sel_t w_out_sel;  // [10:9]
    logic     x0_inv;     // [8]   1 = invert X0 before the ULM
    logic     x1_inv;     // [7]   1 = invert X1 before the ULM
    dir_e     x0_sel;     // [6:5]
    dir_e     x1_sel;     // [4:3]
    dir_e     sel_sel;    // [2:1]
    logic     cs;         // [0]   CS_COMB or CS_SYNC
  } clb_cfg_t;

endpackage
