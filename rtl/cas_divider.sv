`timescale 1ps/1fs
// cas_divider: non-restoring array divider built of CAS cells.
//
// Row r (r = 0 .. QW-1) takes the previous partial remainder, shifts it left
// by one bit while bringing in the next dividend bit, and adds or subtracts
// the divisor.  The first row always subtracts (its control is tied to 1);
// every later row subtracts when the previous remainder was non-negative and
// adds when it was negative.  The quotient bit of a row is the inverted sign
// of its remainder, so quot_o = floor(dividend / divisor) as long as the
// quotient fits, i.e. dividend_hi_i < divisor_i.  Each row is a ripple chain
// of RW cells whose carry-in equals the row control (two's complement).
// The cell and the array organisation (control high in the first row,
// inverted row sign as quotient bit) are the published ones; the widths
// and which operand is the divisor are set by the compensator.
//
// Interface: dividend = {dividend_hi_i, dividend_lo_i}, divisor_i > 0.
// rem_o is the last partial remainder, not corrected (it may be negative).
// Purely combinational: QW rows of RW-bit ripple adders.
module cas_divider #(
  parameter int unsigned QW = 7,
  parameter int unsigned DW = 8,
  parameter int unsigned RW = DW + 2
) (
  input  logic [DW-1:0] dividend_hi_i,
  input  logic [QW-1:0] dividend_lo_i,
  input  logic [DW-1:0] divisor_i,
  output logic [QW-1:0] quot_o,
  output logic [RW-1:0] rem_o
);
  logic [RW-1:0] rem   [QW+1];   // rem[0] is the initial remainder
  logic [RW-1:0] rin   [QW];     // row input: shifted remainder + dividend bit
  logic [RW:0]   carry [QW];
  logic [QW:0]   ctl;            // ctl[r]: 1 = subtract in row r
  logic [RW-1:0] dvs;

  assign dvs    = RW'(divisor_i);
  assign rem[0] = RW'(dividend_hi_i);
  assign ctl[0] = 1'b1;

  for (genvar r = 0; r < QW; r++) begin : g_row
    assign rin[r]      = {rem[r][RW-2:0], dividend_lo_i[QW-1-r]};
    assign carry[r][0] = ctl[r];
    for (genvar b = 0; b < RW; b++) begin : g_cell
      cas_cell u_cas (
        .t_i  (ctl[r]),
        .ri_i (rin[r][b]),
        .d_i  (dvs[b]),
        .ci_i (carry[r][b]),
        .ro_o (rem[r+1][b]),
        .co_o (carry[r][b+1])
      );
    end
    // Quotient bit: remainder of this row is non-negative.
    assign ctl[r+1]         = ~rem[r+1][RW-1];
    assign quot_o[QW-1-r]   = ctl[r+1];
  end

  assign rem_o = rem[QW];
endmodule
