// tb_carry_maskable_adder: self-checking testbench of the carry maskable
// adder.
//
// The reference treats the adder as a chain of independent segments: a set
// mask bit i ends a segment at bit i, whose carry out is discarded; the next
// segment starts with no carry in. Each segment's sum is computed with
// integer arithmetic on the extracted bit fields. Drives mask = 0 (plain
// adder), all-ones masks, one cut at a time and random masks, and counts
// vectors in which a cut actually removed a carry. Combinational: sampled 1
// time unit after each vector. A watchdog ends a hung run with a failure.
module tb_carry_maskable_adder;

  logic [15:0] a, b, mask, sum;
  logic        cin, cout;
  int checks = 0;
  int failures = 0;
  int carries_cut = 0;

  carry_maskable_adder dut (.a(a), .b(b), .cin(cin), .mask(mask), .sum(sum), .cout(cout));

  function automatic logic [16:0] model(input logic [15:0] ta, input logic [15:0] tb,
                                        input logic tc, input logic [15:0] tm);
    logic [15:0] s;
    logic        co;
    int lo;
    int unsigned seg_a, seg_b, seg_sum, len, c_in;
    s = '0;
    co = 1'b0;
    lo = 0;
    c_in = 32'(tc);
    for (int hi = 0; hi < 16; hi++) begin
      if (tm[hi] || hi == 15) begin
        len = hi - lo + 1;
        seg_a = (32'(ta) >> lo) & ((1 << len) - 1);
        seg_b = (32'(tb) >> lo) & ((1 << len) - 1);
        seg_sum = seg_a + seg_b + c_in;
        for (int k = 0; k < len; k++) s[lo+k] = seg_sum[k];
        co = tm[hi] ? 1'b0 : seg_sum[len];
        c_in = 0;
        lo = hi + 1;
      end
    end
    return {co, s};
  endfunction

  task automatic check(input logic [15:0] ta, input logic [15:0] tb, input logic tc,
                       input logic [15:0] tm);
    logic [16:0] expected;
    a = ta; b = tb; cin = tc; mask = tm;
    #1;
    expected = model(ta, tb, tc, tm);
    checks++;
    if (expected != (17'(ta) + 17'(tb) + 17'(tc))) carries_cut++;
    if ({cout, sum} !== expected) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h b=%h cin=%b mask=%h got %h expected %h", ta, tb, tc, tm, {cout, sum},
                 expected);
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
    check(16'hFFFF, 16'h0001, 1'b0, 16'h0000);
    check(16'hFFFF, 16'h0001, 1'b0, 16'hFFFF);
    check(16'hFFFF, 16'hFFFF, 1'b1, 16'h0000);
    check(16'hFFFF, 16'hFFFF, 1'b1, 16'hFFFF);
    for (int k = 0; k < 16; k++) begin
      check(16'hFFFF, 16'h0001, 1'b0, 16'(1 << k));
      check(16'(1 << k), 16'(1 << k), 1'b0, 16'(1 << k));
    end
    for (int n = 0; n < 5000; n++) begin
      check(16'($urandom), 16'($urandom), 1'($urandom), 16'h0000);
    end
    for (int n = 0; n < 20000; n++) begin
      check(16'($urandom), 16'($urandom), 1'($urandom), 16'($urandom));
    end
    if (carries_cut == 0) begin
      failures++;
      $display("no carry was ever cut");
    end
    $display("vectors with a cut carry: %0d", carries_cut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
