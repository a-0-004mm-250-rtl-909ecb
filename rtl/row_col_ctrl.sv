// Row/column controller of the DCO fine bank.
// Holds the 8-bit integer fine code (0..255), counts it up on OverF and down
// on UnderF from the integrator (saturating at both ends), and decodes it
// into the 256-bit thermometer word that switches the fine capacitors. The
// decode is done by rows and columns: with code = 16*r + k, every unit of
// the rows below r is on and units 0..k-1 of row r are on, so exactly
// `code` units are on and each step toggles one unit. The 256-unit
// thermometer bank and the 8-bit code follow the published design; the
// 16 x 16 split, the saturation and the reset value INIT_CODE (used while
// the AFC searches) are choices of this design.
// Timing: the code and the thermometer word change on the clock edge after
// an OverF/UnderF pulse.
module row_col_ctrl
  import dpll_pkg::*;
#(
  parameter int unsigned ROWS      = 16,
  parameter int unsigned COLS      = 16,
  parameter int unsigned INIT_CODE = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ovf,
  input  logic                   unf,
  output logic [FINE_W-1:0]      code,
  output logic [ROWS*COLS-1:0]   therm,
  output logic [ROWS-1:0]        row_full,  // rows fully switched on
  output logic [COLS-1:0]        col_on     // columns on in the partial row
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned MAXC = ROWS * COLS - 1;
  localparam int unsigned CBW  = $clog2(COLS);

  logic [FINE_W-1:0] row_idx;
  logic [FINE_W-1:0] col_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code <= FINE_W'(INIT_CODE);
    else if (ovf && !unf && code != FINE_W'(MAXC)) code <= code + 1'b1;
    else if (unf && !ovf && code != '0)            code <= code - 1'b1;
  end

  assign row_idx = code >> CBW;
  assign col_idx = code & FINE_W'(COLS - 1);

  always_comb begin
    for (int r = 0; r < ROWS; r++) row_full[r] = (FINE_W'(r) < row_idx);
    for (int k = 0; k < COLS; k++) col_on[k]   = (FINE_W'(k) < col_idx);
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < COLS; k++)
        therm[r*COLS + k] = row_full[r] | ((FINE_W'(r) == row_idx) & col_on[k]);
  end
endmodule
