// tb_approximate_multiplier_8bit: self-checking testbench of the 8x8
// approximate multiplier.
//
// Checks all 65536 operand pairs of the default instance against the column
// model of tb_ref_pkg and against the bound out <= a*b; checks an instance
// without approximate columns against the exact product; and checks the
// small products 8*3, 15*8 and 9*16, which the design must give exactly.
// It also drives an instance whose carry maskable adder cuts the carry out
// of bit 11 and checks it against the model with that carry removed.
// Reports the mean and largest error of the default instance.
module tb_approximate_multiplier_8bit;
  import tb_ref_pkg::*;

  logic [7:0]  a, b;
  logic [15:0] out, out_exact, out_cut;
  int checks = 0;
  int failures = 0;
  int approximated = 0;
  int cuts = 0;
  longint unsigned err_sum = 0;
  int unsigned err_max = 0;

  approximate_multiplier_8bit dut (.a(a), .b(b), .out(out));
  approximate_multiplier_8bit #(.APPROX_COLS(0)) dut_exact (.a(a), .b(b), .out(out_exact));
  approximate_multiplier_8bit #(.CARRY_MASK(16'h0800)) dut_cut (.a(a), .b(b), .out(out_cut));

  task automatic fail(input string what);
    failures++;
    if (failures <= 10) $display("FAIL %s a=%0d b=%0d out=%0d", what, a, b, out);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // small products, expected exactly
    a = 8'd8;  b = 8'd3;  #1; checks++; if (out != 16'd24)  fail("8*3");
    a = 8'd15; b = 8'd8;  #1; checks++; if (out != 16'd120) fail("15*8");
    a = 8'd9;  b = 8'd16; #1; checks++; if (out != 16'd144) fail("9*16");
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        int unsigned exact, model;
        a = 8'(x); b = 8'(y);
        #1;
        exact = x * y;
        model = approx_mul8(a, b, 8);
        checks += 4;
        if (32'(out) != model) fail("model");
        if (32'(out) > exact) fail("overestimate");
        if (32'(out_exact) != exact) fail("exact instance");
        // out_cut equals the model unless a carry left bit 11; then exactly
        // that carry, worth 2^12, is missing.
        if (32'(out_cut) != model) begin
          cuts++;
          if (model - 32'(out_cut) != 32'd4096) fail("carry cut");
        end
        if (32'(out) != exact) begin
          approximated++;
          err_sum += 64'(exact - 32'(out));
          if (exact - 32'(out) > err_max) err_max = exact - 32'(out);
        end
      end
    end
    if (approximated == 0 || cuts == 0) begin
      failures++;
      $display("approximation or carry cut never happened");
    end
    $display("approximated: %0d of 65536, mean error %0.2f, max error %0d", approximated,
             real'(err_sum) / 65536.0, err_max);
    $display("carry cuts taken: %0d", cuts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
