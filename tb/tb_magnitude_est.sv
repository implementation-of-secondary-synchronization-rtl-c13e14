// Self-checking testbench for magnitude_est.
// Compares the estimate with max(|I|,|Q|) + floor(3*min(|I|,|Q|)/8) computed
// with integers, for every corner value and many random pairs, and checks the
// one-clock latency.
module tb_magnitude_est;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [8:0] in_i = 0, in_q = 0;
  logic out_valid;
  logic [9:0] mag;
  int checks = 0, failures = 0;

  magnitude_est dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check_one(input int vi, input int vq);
    int ai, aq, mx, mn, e;
    ai = iabs(vi); aq = iabs(vq);
    mx = ai > aq ? ai : aq;
    mn = ai > aq ? aq : ai;
    e  = mx + (3 * mn) / 8;
    in_valid <= 1; in_i <= 9'(vi); in_q <= 9'(vq);
    @(posedge clk);
    in_valid <= 0;
    #1;
    checks++;
    if (!out_valid || int'(mag) != e) begin
      failures++;
      $display("FAIL (%0d,%0d): valid=%0b mag=%0d expected %0d", vi, vq, out_valid, mag, e);
    end
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid stuck"); end
  endtask

  initial begin
    int c[6] = '{-256, -255, -1, 0, 1, 255};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (c[x]) foreach (c[y]) check_one(c[x], c[y]);
    for (int t = 0; t < 3000; t++)
      check_one(int'($signed(9'($urandom))), int'($signed(9'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
