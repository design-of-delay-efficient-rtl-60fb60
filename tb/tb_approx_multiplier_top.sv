// tb_approx_multiplier_top: end-to-end testbench of the two 16x16
// approximate multipliers (Brent-Kung and Ladner-Fischer versions) at their
// default parameters.
//
// Applies the operand pairs (8,3), (15,8) and (9,16), whose products 24, 120
// and 144 involve no approximation, then corner operands and 50000 random
// pairs. Each result of both versions is compared with a reference that
// multiplies the four 8x8 halves with the column model of tb_ref_pkg and
// adds them exactly; the two versions must also agree with each other. The
// testbench counts how often each mechanism of the design was exercised and
// fails if one never was:
//   - the 8x8 approximation changed a product;
//   - the first middle adder (L3 + L2) produced the carry into the OR gate;
//   - the second middle adder (+ L1[15:8]) produced it;
//   - the upper part of the middle sum was non-zero and fed the top adder.
module tb_approx_multiplier_top;
  import tb_ref_pkg::*;

  logic [15:0] a, b;
  logic [31:0] y_bka, y_lfa;
  int checks = 0;
  int failures = 0;
  int n_approx = 0, n_carry_first = 0, n_carry_second = 0, n_mid_to_top = 0;

  approx_multiplier_top dut (.a(a), .b(b), .y_bka(y_bka), .y_lfa(y_lfa));

  task automatic check(input logic [15:0] ta, input logic [15:0] tb);
    longint unsigned model, mid, ll;
    a = ta; b = tb;
    #1;
    model = approx_mul16(ta, tb, 8);
    ll  = 64'(approx_mul8(ta[7:0], tb[7:0], 8));
    mid = 64'(approx_mul8(ta[15:8], tb[7:0], 8)) + 64'(approx_mul8(ta[7:0], tb[15:8], 8));
    if (model != longint'(ta) * longint'(tb)) n_approx++;
    if (mid >= 65536) n_carry_first++;
    else if (mid + (ll >> 8) >= 65536) n_carry_second++;
    if (((mid + (ll >> 8)) >> 8) != 0) n_mid_to_top++;
    checks += 3;
    if (64'(y_bka) != model) begin
      failures++;
      if (failures <= 10) $display("FAIL bka a=%0d b=%0d got %0d expected %0d", ta, tb, y_bka, model);
    end
    if (64'(y_lfa) != model) begin
      failures++;
      if (failures <= 10) $display("FAIL lfa a=%0d b=%0d got %0d expected %0d", ta, tb, y_lfa, model);
    end
    if (y_bka != y_lfa) failures++;
  endtask

  task automatic check_exact(input logic [15:0] ta, input logic [15:0] tb, input logic [31:0] p);
    a = ta; b = tb;
    #1;
    checks++;
    if (y_bka != p || y_lfa != p) begin
      failures++;
      $display("FAIL %0d*%0d: bka %0d lfa %0d expected %0d", ta, tb, y_bka, y_lfa, p);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_exact(16'd8, 16'd3, 32'd24);
    check_exact(16'd15, 16'd8, 32'd120);
    check_exact(16'd9, 16'd16, 32'd144);
    check_exact(16'h0000, 16'hFFFF, 32'd0);
    check_exact(16'h8000, 16'h8000, 32'h4000_0000);
    check(16'hFFFF, 16'hFFFF);
    check(16'h00FF, 16'hFF00);
    for (int n = 0; n < 50000; n++) begin
      check(16'($urandom), 16'($urandom));
    end
    if (n_approx == 0 || n_carry_first == 0 || n_carry_second == 0 || n_mid_to_top == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("approximated %0d, first middle carry %0d, second middle carry %0d, middle sum feeding top adder %0d",
             n_approx, n_carry_first, n_carry_second, n_mid_to_top);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
