// approx_multiplier_16bit: 16x16 unsigned approximate multiplier built from
// four 8x8 approximate multipliers, three 16-bit parallel prefix adders and
// one OR gate.
//
// With a = {aH, aL} and b = {bH, bL} (8-bit halves),
//   a*b = aL*bL + (aH*bL + aL*bH) << 8 + aH*bH << 16.
// The four 8x8 products come from L1 = aL*bL, L2 = aH*bL, L3 = aL*bH and
// L4 = aH*bH. The three adders combine them:
//   L5: L3 + L2                     -> 16-bit sum, carry c5 (weight 2^24)
//   L6: L5.sum + {8'b0, L1[15:8]}   -> 16-bit sum, carry c6 (weight 2^24)
//   L7: L4 + {7'b0, c5|c6, L6.sum[15:8]}
//   y = {L7.sum, L6.sum[7:0], L1[7:0]}
// c5 and c6 both have weight 2^24 and are never set together: every 8x8
// product is at most 255*255, so L2 + L3 + (L1 >> 8) < 2^17. One OR gate
// therefore adds them, and L7 needs no carry in and drops its carry out. An
// assertion checks that c5 and c6 are never both set.
//
// ADDER selects the prefix tree of L5-L7: PPA_BKA (Brent-Kung) or PPA_LFA
// (Ladner-Fischer), the two proposed versions. The counts of blocks, the OR
// gate, the instance names L1-L7, the L5 inputs (L3 and L2) and the carries
// into the OR gate follow the design's schematic; which operand halves feed
// L1-L4 and the exact slices on the L6 and L7 inputs are this design's own
// reading of it. Purely combinational: y = approximate a*b.
module approx_multiplier_16bit #(
  parameter ppa_pkg::ppa_kind_e ADDER       = ppa_pkg::PPA_BKA,
  parameter int                 APPROX_COLS = 8,
  parameter logic [15:0]        CARRY_MASK  = 16'h0000
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] y
);

  logic [15:0] p_ll, p_hl, p_lh, p_hh;  // L1..L4 products
  logic [15:0] s5, s6, s7;              // L5..L7 sums
  logic        c5, c6, c7;              // L5..L7 carries
  logic        c_mid;                   // OR gate: carry of the middle sum
  logic [15:0] l6_b, l7_b;

  approximate_multiplier_8bit #(.APPROX_COLS(APPROX_COLS), .CARRY_MASK(CARRY_MASK))
    L1 (.a(a[7:0]),  .b(b[7:0]),  .out(p_ll));
  approximate_multiplier_8bit #(.APPROX_COLS(APPROX_COLS), .CARRY_MASK(CARRY_MASK))
    L2 (.a(a[15:8]), .b(b[7:0]),  .out(p_hl));
  approximate_multiplier_8bit #(.APPROX_COLS(APPROX_COLS), .CARRY_MASK(CARRY_MASK))
    L3 (.a(a[7:0]),  .b(b[15:8]), .out(p_lh));
  approximate_multiplier_8bit #(.APPROX_COLS(APPROX_COLS), .CARRY_MASK(CARRY_MASK))
    L4 (.a(a[15:8]), .b(b[15:8]), .out(p_hh));

  assign l6_b  = {8'b0, p_ll[15:8]};
  assign c_mid = c5 | c6;
  assign l7_b  = {7'b0, c_mid, s6[15:8]};

  if (ADDER == ppa_pkg::PPA_BKA) begin : g_bka
    bka_16bit #(.WIDTH(16)) L5 (.a(p_lh), .b(p_hl), .cin(1'b0), .sum(s5), .cout(c5));
    bka_16bit #(.WIDTH(16)) L6 (.a(s5),   .b(l6_b), .cin(1'b0), .sum(s6), .cout(c6));
    bka_16bit #(.WIDTH(16)) L7 (.a(p_hh), .b(l7_b), .cin(1'b0), .sum(s7), .cout(c7));
  end else begin : g_lfa
    lfa_16bit #(.WIDTH(16)) L5 (.a(p_lh), .b(p_hl), .cin(1'b0), .sum(s5), .cout(c5));
    lfa_16bit #(.WIDTH(16)) L6 (.a(s5),   .b(l6_b), .cin(1'b0), .sum(s6), .cout(c6));
    lfa_16bit #(.WIDTH(16)) L7 (.a(p_hh), .b(l7_b), .cin(1'b0), .sum(s7), .cout(c7));
  end

  assign y = {s7, s6[7:0], p_ll[7:0]};

  // The OR gate stands in for an adder only if the two middle carries are
  // never set together; L7's carry out is unused because y fits in 32 bits.
  always_comb begin
    assert (!(c5 && c6)) else $error("middle carries c5 and c6 both set");
  end

  logic unused_c7;
  assign unused_c7 = c7;

endmodule
