// carry_maskable_adder: final adder (CMA) of the 8x8 approximate multiplier.
//
// A ripple-carry adder, sum = a + b + cin, in which the carry leaving bit i
// is forced to zero when mask[i] is set. With mask = 0 it is an exact adder;
// each set mask bit cuts the carry chain at that point, which shortens the
// longest carry path and lowers switching at the price of an error of at
// most 2^(i+1) per cut, always downwards. cout is the (maskable) carry out
// of the top bit.
//
// Interface: purely combinational. The document names a carry maskable adder
// as the last stage of the 8x8 multiplier; the ripple structure and the
// per-bit mask input are this design's own reading of that name.
module carry_maskable_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic [WIDTH-1:0] mask,  // 1 = cut the carry out of this bit
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  always_comb begin
    logic carry;  // carry into the bit being added
    carry = cin;
    for (int i = 0; i < WIDTH; i++) begin
      sum[i] = a[i] ^ b[i] ^ carry;
      carry  = ~mask[i] & ((a[i] & b[i]) | ((a[i] ^ b[i]) & carry));
    end
    cout = carry;
  end

endmodule
