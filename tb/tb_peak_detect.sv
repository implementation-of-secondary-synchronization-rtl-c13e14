// Self-checking testbench for peak_detect.
// Streams searches of 336 candidates (sf 0 then 1, N_ID_1 0..167) with
// random magnitudes, sometimes with gaps between them and with planted ties,
// and compares the reported winner with a reference arg-max that keeps the
// first of equal maxima. Also checks that done comes one clock after `last`.
module tb_peak_detect;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0, sf = 0;
  logic [9:0] mag = 0;
  logic [7:0] n_id_1 = 0;
  logic done, best_sf;
  logic [9:0] best_mag;
  logic [7:0] best_n_id_1;
  int checks = 0, failures = 0;

  peak_detect dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_search(input int mode);
    int m, bm, bs, bn, idx;
    bm = -1; bs = 0; bn = 0;
    for (int s = 0; s < 2; s++)
      for (int n = 0; n < 168; n++) begin
        idx = s * 168 + n;
        case (mode)
          0: m = int'($urandom % 1024);
          1: m = 500;                                  // all equal: first wins
          2: m = (idx == 335) ? 1023 : int'($urandom % 1000);  // winner last
          default: m = (idx == 0) ? 1023 : int'($urandom % 1023); // winner first
        endcase
        if (m > bm) begin bm = m; bs = s; bn = n; end
        if (mode == 0 && ($urandom % 5) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1; mag <= 10'(m); sf <= 1'(s); n_id_1 <= 8'(n);
        first <= (idx == 0); last <= (idx == 335);
        @(posedge clk);
        #1;
        if (idx != 335) begin
          checks++;
          if (done) begin failures++; $display("FAIL early done"); end
        end
      end
    in_valid <= 0; last <= 0; first <= 0;
    #1;
    checks++;
    if (!done || int'(best_mag) != bm || int'(best_sf) != bs || int'(best_n_id_1) != bn) begin
      failures++;
      $display("FAIL mode %0d: done=%0b got %0d/%0d/%0d expected %0d/%0d/%0d",
               mode, done, best_mag, best_sf, best_n_id_1, bm, bs, bn);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 20; t++) run_search(t % 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
