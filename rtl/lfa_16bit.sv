// lfa_16bit: Ladner-Fischer parallel prefix adder, sum = a + b + cin.
//
// Bit i produces (g, p) = (a&b, a^b); the carry in is folded into bit 0 as
// g0 | p0&cin, so every group carry G[i:0] is the carry into bit i+1 and the
// last one is cout. The prefix tree is the Ladner-Fischer one:
//   - level 1: every odd bit absorbs the even bit below it (pairs);
//   - levels 2..L: the WIDTH/2 odd bits form a Sklansky (divide and conquer)
//     tree, where at each level the upper half of every block absorbs the
//     last prefix of the lower half;
//   - last level: every even bit i >= 2 absorbs the finished prefix of bit i-1.
// Depth is log2(WIDTH)+1 levels with a fan-out that doubles at each level;
// it is shallower than Brent-Kung and uses a few more dot nodes.
// sum[i] = p[i] ^ carry into bit i.
//
// The levels are written as loops over one array that is updated in place;
// after unrolling they are the same dot-node network.
//
// Interface: purely combinational, no clock. WIDTH must be a power of two;
// its default of 16 is the adder width of the 16x16 multiplier. The name,
// the width and the cin/cout ports follow the multiplier's schematic; the
// tree is the textbook Ladner-Fischer structure (Sklansky on odd bits).
module lfa_16bit #(
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
    for (int i = 0; i < WIDTH; i++) begin
      pre[i] = '{g: a[i] & b[i], p: a[i] ^ b[i]};
    end
    pre[0].g = pre[0].g | (pre[0].p & cin);

    // Level 1: odd bits absorb their even neighbour.
    for (int i = 1; i < WIDTH; i += 2) begin
      pre[i] = dot(pre[i], pre[i-1]);
    end

    // Levels 2..L: Sklansky tree over the odd bits. Odd bit i is entry
    // j = (i-1)/2 of that tree; at step k an entry with bit k-1 of j set
    // absorbs entry ((j >> (k-1)) << (k-1)) - 1, the top of the lower half.
    for (int k = 1; k < L; k++) begin
      for (int i = WIDTH - 1; i >= 1; i -= 2) begin
        if ((((i - 1) / 2) >> (k - 1)) % 2 == 1) begin
          pre[i] = dot(pre[i], pre[2 * (((((i - 1) / 2) >> (k - 1)) << (k - 1)) - 1) + 1]);
        end
      end
    end

    // Last level: even bits i >= 2 absorb the finished odd prefix below them.
    for (int i = 2; i < WIDTH; i += 2) begin
      pre[i] = dot(pre[i], pre[i-1]);
    end

    sum[0] = a[0] ^ b[0] ^ cin;
    for (int i = 1; i < WIDTH; i++) begin
      sum[i] = a[i] ^ b[i] ^ pre[i-1].g;
    end
    cout = pre[WIDTH-1].g;
  end

endmodule
