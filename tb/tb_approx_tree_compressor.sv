// tb_approx_tree_compressor: self-checking testbench of the approximate
// partial product tree.
//
// Two instances: the default one (8 approximate columns) and one with no
// approximate columns, which must be an exact 8x8 carry-save multiplier.
// For all 65536 operand pairs it checks that
//   - row0 + row1 of the exact instance equals a*b;
//   - row0 + row1 of the default instance equals the column model of
//     tb_ref_pkg (OR of each low column, exact count in each high column);
//   - the low rows of the default instance carry nothing: row1 is zero in
//     the approximate columns;
//   - the approximate sum never exceeds a*b.
// It counts operand pairs where the approximation changed the result.
module tb_approx_tree_compressor;
  import tb_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] r0, r1, e0, e1;
  int checks = 0;
  int failures = 0;
  int approximated = 0;

  approx_tree_compressor dut (.a(a), .b(b), .row0(r0), .row1(r1));
  approx_tree_compressor #(.APPROX_COLS(0)) dut_exact (.a(a), .b(b), .row0(e0), .row1(e1));

  task automatic fail(input string what);
    failures++;
    if (failures <= 10) $display("FAIL %s a=%0d b=%0d", what, a, b);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        int unsigned exact, model, got;
        a = 8'(x); b = 8'(y);
        #1;
        exact = x * y;
        model = approx_mul8(a, b, 8);
        got = 32'(16'(r0 + r1));
        checks += 4;
        if (32'(16'(e0 + e1)) != exact) fail("exact tree");
        if (got != model) fail("approximate tree");
        if (r1[7:0] != 8'h00) fail("carry in low columns");
        if (got > exact) fail("overestimate");
        if (got != exact) approximated++;
      end
    end
    if (approximated == 0) begin
      failures++;
      $display("approximation never changed a result");
    end
    $display("approximated products: %0d of 65536", approximated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
