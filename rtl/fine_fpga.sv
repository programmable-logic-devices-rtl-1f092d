// fine_fpga: a fine-grained, SRAM-configured FPGA.
//
// ROWS x COLS identical CLBs form a regular array (row 0 is the north edge,
// column 0 the west edge). Routing is local only: each CLB side output
// drives the facing input of its neighbour (Eout of one CLB is Win of the
// CLB to its east, Sout is Nin of the CLB to its south, and so on). A
// signal reaches a non-adjacent CLB by passing through the CLBs between,
// whose output multiplexers forward one input instead of F. At the array
// edge the side inputs come from physical input pins and the side outputs
// go to physical output pins: pin_n_* serve the top row (index = column),
// pin_s_* the bottom row, pin_w_* the west column (index = row) and
// pin_e_* the east column. clk is the global clock of every CLB flip-flop.
//
// Configuration: each CLB has a 17-bit cfg_sram, and the words are chained
// in row-major order, CLB (0,0) first, into one serial path from cfg_in to
// cfg_out. Holding cfg_shift high for ROWS*COLS*17 clk cycles loads a whole
// bitstream; since bits travel down the chain, the stream starts with the
// MSB of the last CLB (ROWS-1, COLS-1) and ends with the LSB of CLB (0,0).
// While rst_n is low or cfg_shift is high every CLB side output, and so
// every output pin, is held at 0, and every CLB flip-flop is cleared at
// each clk edge; the configured logic starts from all-zero registers on
// the first clk edge after cfg_shift falls.
//
// Left to the designer, as in any FPGA: the fabric can be configured into
// combinational loops (for example two neighbours forwarding each other's
// signal). Lint tools therefore report the array wiring as a possible
// combinational loop; a valid bitstream never closes one, and the all-zero
// word that rst_n loads is loop-free.
//
// The array size is not fixed by the architecture (CLBs are added by
// repeating the cell); 6 x 6 is this design's default. The serial chain,
// the reset and the pin numbering are this design's choices.
module fine_fpga
  import fpga_pkg::*;
#(
  parameter int unsigned ROWS = 6,
  parameter int unsigned COLS = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration bitstream
  input  logic            cfg_shift,
  input  logic            cfg_in,
  output logic            cfg_out,
  // physical pins
  input  logic [COLS-1:0] pin_n_in,
  output logic [COLS-1:0] pin_n_out,
  input  logic [COLS-1:0] pin_s_in,
  output logic [COLS-1:0] pin_s_out,
  input  logic [ROWS-1:0] pin_w_in,
  output logic [ROWS-1:0] pin_w_out,
  input  logic [ROWS-1:0] pin_e_in,
  output logic [ROWS-1:0] pin_e_out
);

  localparam int unsigned NCELL = ROWS * COLS;

  logic n_in  [ROWS][COLS];
  logic e_in  [ROWS][COLS];
  logic s_in  [ROWS][COLS];
  logic w_in  [ROWS][COLS];
  logic n_out [ROWS][COLS];
  logic e_out [ROWS][COLS];
  logic s_out [ROWS][COLS];
  logic w_out [ROWS][COLS];

  // serial configuration chain: chain[k] enters cell k (row-major)
  logic [NCELL:0] chain;
  logic           run;

  always_comb run = rst_n & ~cfg_shift;
  always_comb chain[0] = cfg_in;
  always_comb cfg_out  = chain[NCELL];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      clb_cfg_t cfg;

      cfg_sram u_cfg (
        .clk       (clk),
        .rst_n     (rst_n),
        .cfg_shift (cfg_shift),
        .cfg_in    (chain[r*COLS + c]),
        .cfg_out   (chain[r*COLS + c + 1]),
        .cfg       (cfg)
      );

      clb u_clb (
        .clk   (clk),
        .rst_n (rst_n),
        .cfg   (cfg),
        .run   (run),
        .n_in  (n_in[r][c]),
        .e_in  (e_in[r][c]),
        .s_in  (s_in[r][c]),
        .w_in  (w_in[r][c]),
        .n_out (n_out[r][c]),
        .e_out (e_out[r][c]),
        .s_out (s_out[r][c]),
        .w_out (w_out[r][c])
      );

      // neighbour or pin on each side
      if (r == 0) begin : g_npin
        always_comb n_in[r][c] = pin_n_in[c];
        always_comb pin_n_out[c] = n_out[r][c];
      end else begin : g_nnb
        always_comb n_in[r][c] = s_out[r-1][c];
      end

      if (r == ROWS - 1) begin : g_spin
        always_comb s_in[r][c] = pin_s_in[c];
        always_comb pin_s_out[c] = s_out[r][c];
      end else begin : g_snb
        always_comb s_in[r][c] = n_out[r+1][c];
      end

      if (c == 0) begin : g_wpin
        always_comb w_in[r][c] = pin_w_in[r];
        always_comb pin_w_out[r] = w_out[r][c];
      end else begin : g_wnb
        always_comb w_in[r][c] = e_out[r][c-1];
      end

      if (c == COLS - 1) begin : g_epin
        always_comb e_in[r][c] = pin_e_in[r];
        always_comb pin_e_out[r] = e_out[r][c];
      end else begin : g_enb
        always_comb e_in[r][c] = w_out[r][c+1];
      end
    end
  end

endmodule
