// approx_tree_compressor: partial products and approximate reduction tree
// (ATC) of the 8x8 approximate multiplier.
//
// The 64 partial products a[j]&b[i] form eight 16-bit rows, row i being a
// shifted left by i when b[i] is set. A Wallace-style tree of carry-save
// stages reduces the eight rows to two (8 -> 6 -> 4 -> 3 -> 2), each stage
// made of bitwise 3:2 compressors. In the high columns (bit >= APPROX_COLS)
// every 3:2 compressor is an exact full adder: sum x^y^z, carry maj(x,y,z)
// into the next column. In the low columns (bit < APPROX_COLS) it is an
// incomplete adder: sum x|y|z and no carry at all. The low columns therefore
// never send a carry upwards and their result is the OR of the column, which
// truncates the low-order accumulation. The result is never larger than the
// exact product: OR never exceeds the sum and dropped carries only lower it.
// With APPROX_COLS = 0 the tree is exact. Because no carry is produced in
// the low columns, row1[APPROX_COLS:0] is always zero; those bits are kept
// so that the two rows have the same width for the final adder.
//
// Interface: purely combinational. row0 + row1 (16-bit addition) is the
// approximate product; the carry maskable adder forms it. Using incomplete
// adders in the low part of a tree that is otherwise built of full and half
// adders follows the design's description; the stage grouping and the
// default of 8 approximate columns (the lower half of the product) are this
// design's own choices.
module approx_tree_compressor #(
  parameter int APPROX_COLS = 8
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] row0,
  output logic [15:0] row1
);

  typedef logic [15:0] row_t;

  // One stage of bitwise 3:2 compressors on three rows. s is the sum row,
  // c the carry row (already shifted to the next column).
  function automatic void compress(input row_t r0, input row_t r1, input row_t r2,
                                   output row_t s, output row_t c);
    s = '0;
    c = '0;
    for (int k = 0; k < 16; k++) begin
      if (k >= APPROX_COLS) begin
        s[k] = r0[k] ^ r1[k] ^ r2[k];
        if (k < 15) c[k+1] = (r0[k] & r1[k]) | (r0[k] & r2[k]) | (r1[k] & r2[k]);
      end else begin
        s[k] = r0[k] | r1[k] | r2[k];  // incomplete adder: no carry out
      end
    end
  endfunction

  row_t pp [8];
  row_t s1a, c1a, s1b, c1b;  // stage 1: 8 rows -> 6
  row_t s2a, c2a, s2b, c2b;  // stage 2: 6 rows -> 4
  row_t s3, c3;              // stage 3: 4 rows -> 3
  row_t s4, c4;              // stage 4: 3 rows -> 2

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      pp[i] = b[i] ? (row_t'(a) << i) : '0;
    end
    compress(pp[0], pp[1], pp[2], s1a, c1a);
    compress(pp[3], pp[4], pp[5], s1b, c1b);
    compress(s1a, c1a, s1b, s2a, c2a);
    compress(c1b, pp[6], pp[7], s2b, c2b);
    compress(s2a, c2a, s2b, s3, c3);
    compress(s3, c3, c2b, s4, c4);
    row0 = s4;
    row1 = c4;
  end

endmodule
