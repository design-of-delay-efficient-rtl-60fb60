// tb_ref_pkg: reference models for the testbenches of the approximate
// multipliers, written directly from the arithmetic the hardware is meant to
// perform rather than from its structure.
//
// The 8x8 approximate product is described column by column: in each low
// column (bit < approx_cols) the result bit is the OR of the partial products
// a[j]&b[i] with i+j equal to the column, and nothing is carried out of it;
// every high column contributes its exact count of ones times its weight.
// The 16x16 product combines four such 8x8 products exactly.
package tb_ref_pkg;

  function automatic int unsigned approx_mul8(input logic [7:0] a, input logic [7:0] b,
                                              input int approx_cols);
    int unsigned total;
    total = 0;
    for (int col = 0; col < 15; col++) begin
      int ones;
      ones = 0;
      for (int i = 0; i < 8; i++) begin
        int j;
        j = col - i;
        if (j >= 0 && j < 8 && a[j] && b[i]) ones++;
      end
      if (col < approx_cols) begin
        if (ones > 0) total += (1 << col);
      end else begin
        total += ones * (1 << col);
      end
    end
    return total;
  endfunction

  function automatic longint unsigned approx_mul16(input logic [15:0] a, input logic [15:0] b,
                                                   input int approx_cols);
    longint unsigned ll, hl, lh, hh;
    ll = 64'(approx_mul8(a[7:0], b[7:0], approx_cols));
    hl = 64'(approx_mul8(a[15:8], b[7:0], approx_cols));
    lh = 64'(approx_mul8(a[7:0], b[15:8], approx_cols));
    hh = 64'(approx_mul8(a[15:8], b[15:8], approx_cols));
    return ll + ((hl + lh) << 8) + (hh << 16);
  endfunction

endpackage
