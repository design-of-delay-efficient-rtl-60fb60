// approximate_multiplier_8bit: 8x8 unsigned approximate multiplier.
//
// The approximate tree compressor (ATC) forms the partial products and
// reduces them to two rows, using incomplete adders (OR, no carry) in the
// low APPROX_COLS columns and exact full adders above. The carry maskable
// adder (CMA) adds the two rows into the 16-bit product; CARRY_MASK selects
// carries the CMA cuts (0 = none). The result never exceeds the exact
// product a*b, so it is at most 255*255 = 65025; the 16x16 multiplier relies
// on that. Operands whose partial products never share a column within the
// low columns (for instance when either operand has a single bit set) are
// multiplied exactly.
//
// Interface: purely combinational; out = approximate a*b. The name and the
// ports follow the 16x16 schematic; the split into ATC and CMA follows the
// document; the amount of approximation is this design's own choice.
module approximate_multiplier_8bit #(
  parameter int          APPROX_COLS = 8,
  parameter logic [15:0] CARRY_MASK  = 16'h0000
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] out
);

  logic [15:0] row0, row1;
  logic        unused_cout;

  approx_tree_compressor #(
    .APPROX_COLS(APPROX_COLS)
  ) u_atc (
    .a   (a),
    .b   (b),
    .row0(row0),
    .row1(row1)
  );

  carry_maskable_adder #(
    .WIDTH(16)
  ) u_cma (
    .a   (row0),
    .b   (row1),
    .cin (1'b0),
    .mask(CARRY_MASK),
    .sum (out),
    .cout(unused_cout)  // the product fits in 16 bits
  );

endmodule
