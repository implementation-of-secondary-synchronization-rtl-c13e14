// Self-checking testbench for sss_gen.
// Builds its own reference SSS from the LTE definition with integer +/-1
// arithmetic (separate m-sequence recurrences, m0/m1 computed from N_ID_1)
// and compares all 2 x 168 x 3 x 62 chips with the generator. The reference
// m0/m1 mapping is first checked against entries of the published LTE table.
module tb_sss_gen;
  logic [7:0] n_id_1;
  logic [1:0] n_id_2;
  logic       sf;
  logic [5:0] k;
  logic       chip_neg;
  int checks = 0, failures = 0;

  sss_gen dut (.*);

  int xs[31], xc[31], xz[31];

  function automatic int pm(input int b);
    return 1 - 2 * b;
  endfunction

  function automatic void ref_m(input int n1, output int m0, output int m1);
    int qp, q, mp;
    qp = n1 / 30;
    q  = (n1 + qp * (qp + 1) / 2) / 30;
    mp = n1 + q * (q + 1) / 2;
    m0 = mp % 31;
    m1 = (m0 + mp / 31 + 1) % 31;
  endfunction

  function automatic int ref_chip(input int n1, input int n2, input int sub5, input int kk);
    int m0, m1, n, v;
    ref_m(n1, m0, m1);
    n = kk / 2;
    if (kk % 2 == 0) begin
      if (sub5 == 0) v = pm(xs[(n + m0) % 31]) * pm(xc[(n + n2) % 31]);
      else           v = pm(xs[(n + m1) % 31]) * pm(xc[(n + n2) % 31]);
    end else begin
      if (sub5 == 0) v = pm(xs[(n + m1) % 31]) * pm(xc[(n + n2 + 3) % 31]) * pm(xz[(n + m0 % 8) % 31]);
      else           v = pm(xs[(n + m0) % 31]) * pm(xc[(n + n2 + 3) % 31]) * pm(xz[(n + m1 % 8) % 31]);
    end
    return v;
  endfunction

  // Sanity check of the reference model's m0/m1 mapping against LTE table entries.
  task automatic check_m(input int n1, input int e0, input int e1);
    int m0, m1;
    ref_m(n1, m0, m1);
    if (m0 != e0 || m1 != e1) begin
      failures++;
      $display("FAIL reference m0/m1 for N1=%0d: %0d/%0d expected %0d/%0d", n1, m0, m1, e0, e1);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad;
    for (int i = 0; i < 5; i++) begin xs[i] = int'(i == 4); xc[i] = int'(i == 4); xz[i] = int'(i == 4); end
    for (int i = 0; i < 26; i++) begin
      xs[i+5] = (xs[i+2] + xs[i]) % 2;
      xc[i+5] = (xc[i+3] + xc[i]) % 2;
      xz[i+5] = (xz[i+4] + xz[i+2] + xz[i+1] + xz[i]) % 2;
    end
    // Entries of the LTE m0/m1 table.
    check_m(0, 0, 1);
    check_m(29, 29, 30);
    check_m(30, 0, 2);
    check_m(58, 28, 30);
    check_m(59, 0, 3);
    check_m(87, 0, 4);    // q=3, m'=93
    // Every chip of every candidate.
    for (int n2 = 0; n2 < 3; n2++)
      for (int s5 = 0; s5 < 2; s5++)
        for (int n1 = 0; n1 < 168; n1++) begin
          bad = 0;
          for (int kk = 0; kk < 62; kk++) begin
            n_id_1 = 8'(n1); n_id_2 = 2'(n2); sf = 1'(s5); k = 6'(kk);
            #1;
            if ((chip_neg ? -1 : 1) != ref_chip(n1, n2, s5, kk)) bad++;
          end
          checks++;
          if (bad != 0) begin
            failures++;
            if (failures < 10) $display("FAIL N1=%0d N2=%0d sf=%0d: %0d chips differ", n1, n2, s5, bad);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
