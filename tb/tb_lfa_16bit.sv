// tb_lfa_16bit: self-checking testbench of the 16-bit LFA prefix adder.
//
// Drives directed carry-chain patterns (all-propagate words with a carry in,
// a single generate at bit 0 that must ripple to the top, alternating
// patterns, the extremes) and random operands, and compares {cout, sum}
// with the integer sum a + b + cin. A second instance at WIDTH = 8 is
// checked exhaustively. Combinational: each vector is sampled 1 time unit
// after it is applied. A watchdog ends the run with a failure if it hangs.
module tb_lfa_16bit;

  logic [15:0] a, b, sum;
  logic        cin, cout;
  logic [7:0]  a8, b8, sum8;
  logic        cin8, cout8;
  int checks = 0;
  int failures = 0;
  int full_chain = 0;  // vectors whose carry runs through all 16 bits

  lfa_16bit dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  lfa_16bit #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .sum(sum8), .cout(cout8));

  task automatic check16(input logic [15:0] ta, input logic [15:0] tb, input logic tc);
    logic [16:0] expected;
    a = ta; b = tb; cin = tc;
    #1;
    expected = 17'(ta) + 17'(tb) + 17'(tc);
    checks++;
    if ((ta ^ tb) == 16'hFFFF && tc) full_chain++;
    if ({cout, sum} !== expected) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h b=%h cin=%b got %h expected %h", ta, tb, tc, {cout, sum}, expected);
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
    a8 = '0; b8 = '0; cin8 = 1'b0;
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'h0000, 16'hFFFF, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b0);
    check16(16'h0001, 16'hFFFF, 1'b0);
    check16(16'hAAAA, 16'h5555, 1'b1);
    check16(16'h5555, 16'hAAAA, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    // every single generate position followed by a propagate run to the top
    for (int k = 0; k < 16; k++) begin
      check16(16'(16'hFFFF << k), 16'(16'h1 << k), 1'b0);
      check16(16'(16'hFFFF << k), 16'h0, 1'b1);
    end
    for (int n = 0; n < 20000; n++) begin
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    end
    // exhaustive at 8 bits
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); cin8 = 1'(c);
          #1;
          checks++;
          if ({cout8, sum8} !== 9'(x + y + c)) begin
            failures++;
            if (failures <= 10) $display("FAIL8 %0d+%0d+%0d got %0d", x, y, c, {cout8, sum8});
          end
        end
      end
    end
    if (full_chain == 0) begin
      failures++;
      $display("no full-length carry chain was exercised");
    end
    $display("full-length carry chains: %0d", full_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
