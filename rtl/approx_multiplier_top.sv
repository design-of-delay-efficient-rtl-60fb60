// approx_multiplier_top: the two proposed 16x16 approximate multipliers side
// by side, one whose three adders are Brent-Kung adders and one whose
// adders are Ladner-Fischer adders. Both take the same operands; both are
// built from four 8x8 approximate multipliers (approximate tree compressor
// plus carry maskable adder), three 16-bit prefix adders and an OR gate.
// The two versions compute the same product and differ only in the
// area/delay of their adders.
//
// Interface: purely combinational. a, b: unsigned 16-bit operands;
// y_bka, y_lfa: 32-bit approximate products of the two versions. Putting the
// two versions into one top is this design's own packaging.
module approx_multiplier_top #(
  parameter int          APPROX_COLS = 8,
  parameter logic [15:0] CARRY_MASK  = 16'h0000
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] y_bka,
  output logic [31:0] y_lfa
);

  approx_multiplier_16bit #(
    .ADDER(ppa_pkg::PPA_BKA), .APPROX_COLS(APPROX_COLS), .CARRY_MASK(CARRY_MASK)
  ) u_mult_bka (.a(a), .b(b), .y(y_bka));

  approx_multiplier_16bit #(
    .ADDER(ppa_pkg::PPA_LFA), .APPROX_COLS(APPROX_COLS), .CARRY_MASK(CARRY_MASK)
  ) u_mult_lfa (.a(a), .b(b), .y(y_lfa));

endmodule
