// Self-checking testbench for correlation_core.
// Feeds random candidates of 62 random complex subcarriers with random +/-1
// chips, computes sum_k chip(k) * R(k) with integer arithmetic and compares
// the sliced result (floor of sum / 64) and the timing: c_valid must rise
// exactly one clock after the 62nd subcarrier. Includes full-scale cases
// (all -128 with chip -1 and with chip +1) and a stall between subcarriers.
module tb_correlation_core;
  localparam int unsigned NSC = 62;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, chip_neg = 0;
  logic signed [7:0] r_i = 0, r_q = 0;
  logic c_valid;
  logic signed [7:0] c_i, c_q;
  int checks = 0, failures = 0;

  correlation_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode 0: random, 1: all -128 with chip -1, 2: all -128 with chip +1, 3: random with stalls
  task automatic run_candidate(input int mode);
    int si, sq, ri, rq, neg, ei, eq;
    si = 0; sq = 0;
    for (int kk = 0; kk < NSC; kk++) begin
      case (mode)
        1: begin ri = -128; rq = -128; neg = 1; end
        2: begin ri = -128; rq = 127;  neg = 0; end
        default: begin ri = int'($signed(8'($urandom))); rq = int'($signed(8'($urandom))); neg = int'($urandom % 2); end
      endcase
      if (mode == 3 && kk % 7 == 3) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1; r_i <= 8'(ri); r_q <= 8'(rq); chip_neg <= 1'(neg);
      si += neg ? -ri : ri;
      sq += neg ? -rq : rq;
      @(posedge clk);
      #1;
      if (kk < NSC - 1) begin
        checks++;
        if (c_valid) begin
          failures++;
          $display("FAIL c_valid early at k=%0d", kk);
        end
      end
    end
    ei = si >>> 6;
    eq = sq >>> 6;
    checks++;
    if (!c_valid || int'(c_i) != ei || int'(c_q) != eq) begin
      failures++;
      $display("FAIL mode %0d: valid=%0b C=(%0d,%0d) expected (%0d,%0d)", mode, c_valid, c_i, c_q, ei, eq);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_candidate(1);
    run_candidate(2);
    for (int t = 0; t < 50; t++) run_candidate(t % 4 == 3 ? 3 : 0);
    in_valid <= 0;
    @(posedge clk);
    // clear in the middle of a candidate restarts the sum
    for (int kk = 0; kk < 10; kk++) begin
      in_valid <= 1; r_i <= 8'd100; r_q <= 8'd100; chip_neg <= 0;
      @(posedge clk);
    end
    in_valid <= 0; clear <= 1;
    @(posedge clk);
    clear <= 0;
    run_candidate(0);
    in_valid <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
