// bka_16bit: Brent-Kung parallel prefix adder, sum = a + b + cin.
//
// Bit i produces (g, p) = (a&b, a^b); the carry in is folded into bit 0 as
// g0 | p0&cin, so every group carry G[i:0] is the carry into bit i+1 and the
// last one is cout. The prefix tree is the Brent-Kung one: an up-sweep of
// log2(WIDTH) levels builds the prefixes ending at bits 2^k-1 (a binary
// tree), then a down-sweep of log2(WIDTH)-1 levels fills in the remaining
// bits from those. It uses few dot nodes (26 for 16 bits) at the cost of
// 2*log2(WIDTH)-1 levels of depth. sum[i] = p[i] ^ carry into bit i.
//
// The levels are written as loops over one array that is updated in place;
// after unrolling they are the same dot-node network.
//
// Interface: purely combinational, no clock. WIDTH must be a power of two;
// its default of 16 is the adder width of the 16x16 multiplier. The name,
// the width and the cin/cout ports follow the multiplier's schematic; the
// tree is the textbook Brent-Kung structure.
module bka_16bit #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  import ppa_pkg::*;

  localparam int L = $clog2(WIDTH);

  // pre[i] starts as the (g, p) of bit i and ends as the group (G, P) of
  // bits i..0. Each level only reads entries that the same level does not
  // write, so the tree is built in place, one level after the other.
  gp_t pre [WIDTH];

  always_comb begin
    // Bit level, carry in folded into bit 0.
    for (int i = 0; i < WIDTH; i++) begin
      pre[i] = '{g: a[i] & b[i], p: a[i] ^ b[i]};
    end
    pre[0].g = pre[0].g | (pre[0].p & cin);

    // Up-sweep, levels 1..L: bits i with (i+1) a multiple of 2^l absorb the
    // group of 2^(l-1) bits below them.
    for (int l = 1; l <= L; l++) begin
      for (int i = WIDTH - 1; i >= 0; i--) begin
        if (((i + 1) % (1 << l)) == 0) begin
          pre[i] = dot(pre[i], pre[i-(1<<(l-1))]);
        end
      end
    end

    // Down-sweep, levels L+1..2L-1 (span exponent k = L-1 .. 1): bits i with
    // (i+1) mod 2^k equal to 2^(k-1) and i >= 2^k absorb the finished prefix
    // ending at i - 2^(k-1).
    for (int k = L - 1; k >= 1; k--) begin
      for (int i = WIDTH - 1; i >= 0; i--) begin
        if ((((i + 1) % (1 << k)) == (1 << (k - 1))) && (i >= (1 << k))) begin
          pre[i] = dot(pre[i], pre[i-(1<<(k-1))]);
        end
      end
    end

    // Sum: propagate of each bit XOR the carry into it.
    sum[0] = a[0] ^ b[0] ^ cin;
    for (int i = 1; i < WIDTH; i++) begin
      sum[i] = a[i] ^ b[i] ^ pre[i-1].g;
    end
    cout = pre[WIDTH-1].g;
  end

endmodule
