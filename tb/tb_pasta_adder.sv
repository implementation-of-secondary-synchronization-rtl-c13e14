// Self-checking testbench for pasta_adder.
// Drives random and corner-case operands and compares the sum and carry out
// with the arithmetic a+b+cin, and the reported iteration count with a
// word-level model of the self-timed recursion (sum ^= carry, carry =
// (sum & carry) << 1 until carry is zero).
module tb_pasta_adder;
  localparam int unsigned W = 14;
  localparam int unsigned IW = $clog2(W+2);

  logic [W-1:0] a, b, sum;
  logic cin, cout;
  logic [IW-1:0] iterations;
  int checks = 0, failures = 0;

  pasta_adder #(.WIDTH(W)) dut (.*);

  function automatic int ref_iters(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] s, c, t;
    int n;
    s = {1'b0, x ^ y};
    c = ({1'b0, x & y} << 1) | (W+1)'(ci);
    n = 0;
    while (c != '0) begin
      t = s;
      s = s ^ c;
      c = (t & c) << 1;
      n++;
    end
    return n;
  endfunction

  task automatic check_one(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] expect_full;
    int ei;
    a = x; b = y; cin = ci;
    #1;
    expect_full = {1'b0, x} + {1'b0, y} + (W+1)'(ci);
    ei = ref_iters(x, y, ci);
    checks++;
    if ({cout, sum} !== expect_full || int'(iterations) != ei) begin
      failures++;
      $display("FAIL a=%0h b=%0h cin=%0b got %0h/%0d expected %0h/%0d",
               x, y, ci, {cout, sum}, iterations, expect_full, ei);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0, 1'b0);                 // no carries at all: 0 iterations
    check_one('1, 14'd1, 1'b0);              // carry ripples through every bit
    check_one('1, '0, 1'b1);                 // carry-in ripples through every bit
    check_one('1, '1, 1'b1);
    check_one(14'h1555, 14'h2AAA, 1'b0);     // alternating bits, no carries
    for (int i = 0; i < 5000; i++)
      check_one(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
