// tb_approx_multiplier_16bit: self-checking testbench of the 16x16
// approximate multiplier, both adder versions.
//
// The reference multiplies the four 8x8 halves with the column model of
// tb_ref_pkg and adds them with exact integer arithmetic, so it checks that
// the three prefix adders and the OR gate combine the 8x8 products without
// loss. Instances: Brent-Kung and Ladner-Fischer versions at the defaults,
// and a Brent-Kung version without approximation, checked against a*b.
// Vectors: the operand pairs (8,3), (15,8), (9,16) with products 24, 120 and
// 144; the extremes; carry patterns; random operands. The testbench counts
// how often each middle carry (out of the first and of the second adder)
// reached the OR gate and fails if either never did.
module tb_approx_multiplier_16bit;
  import tb_ref_pkg::*;

  logic [15:0] a, b;
  logic [31:0] y_bka, y_lfa, y_exact;
  int checks = 0;
  int failures = 0;
  int carry_first = 0;   // carry out of the adder L3 + L2
  int carry_second = 0;  // carry out of the adder (L3 + L2) + L1[15:8]
  int approximated = 0;

  approx_multiplier_16bit #(.ADDER(ppa_pkg::PPA_BKA)) dut_bka (.a(a), .b(b), .y(y_bka));
  approx_multiplier_16bit #(.ADDER(ppa_pkg::PPA_LFA)) dut_lfa (.a(a), .b(b), .y(y_lfa));
  approx_multiplier_16bit #(.ADDER(ppa_pkg::PPA_BKA), .APPROX_COLS(0)) dut_exact (
    .a(a), .b(b), .y(y_exact));

  task automatic check(input logic [15:0] ta, input logic [15:0] tb);
    longint unsigned model, exact, mid;
    a = ta; b = tb;
    #1;
    model = approx_mul16(ta, tb, 8);
    exact = longint'(ta) * longint'(tb);
    mid = longint'(approx_mul8(ta[15:8], tb[7:0], 8)) + longint'(approx_mul8(ta[7:0], tb[15:8], 8));
    if (mid >= 65536) carry_first++;
    else if (mid + (64'(approx_mul8(ta[7:0], tb[7:0], 8)) >> 8) >= 65536) carry_second++;
    if (model != exact) approximated++;
    checks += 3;
    if (64'(y_bka) != model) begin
      failures++;
      if (failures <= 10) $display("FAIL bka a=%0d b=%0d got %0d expected %0d", ta, tb, y_bka, model);
    end
    if (64'(y_lfa) != model) begin
      failures++;
      if (failures <= 10) $display("FAIL lfa a=%0d b=%0d got %0d expected %0d", ta, tb, y_lfa, model);
    end
    if (64'(y_exact) != exact) begin
      failures++;
      if (failures <= 10) $display("FAIL exact a=%0d b=%0d got %0d", ta, tb, y_exact);
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
    check(16'd8, 16'd3);
    check(16'd15, 16'd8);
    check(16'd9, 16'd16);
    checks += 3;
    a = 16'd9; b = 16'd16; #1;
    if (y_bka != 32'd144 || y_lfa != 32'd144) failures++;
    a = 16'd15; b = 16'd8; #1;
    if (y_bka != 32'd120 || y_lfa != 32'd120) failures++;
    a = 16'd8; b = 16'd3; #1;
    if (y_bka != 32'd24 || y_lfa != 32'd24) failures++;
    check(16'hFFFF, 16'hFFFF);
    check(16'hFFFF, 16'h0001);
    check(16'hFF00, 16'h00FF);
    check(16'h80FF, 16'hFF80);
    for (int k = 0; k < 16; k++) begin
      check(16'(1 << k), 16'hFFFF);
      check(16'hFFFF, 16'(1 << k));
    end
    for (int n = 0; n < 30000; n++) begin
      check(16'($urandom), 16'($urandom));
    end
    if (carry_first == 0 || carry_second == 0 || approximated == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("carry from first middle adder: %0d, from second: %0d, approximated: %0d",
             carry_first, carry_second, approximated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
