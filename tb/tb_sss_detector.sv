// End-to-end testbench of sss_detector at its default (full) size: 336
// candidates x 62 subcarriers, 8-bit samples.
//
// Each test SSS symbol is built from a reference SSS for a chosen cell
// (N_ID_1, N_ID_2, subframe 0 or 5): R(k) = A * d(k) * (cos p + j sin p) plus
// uniform noise, clipped to 8 bits. After loading the 62 subcarriers the
// testbench waits for det_valid and compares
//  - with a bit-exact integer model of the detector's arithmetic
//    (correlation sums sliced by 64, coherent combining with the previous
//    SSS's opposite-subframe candidate, max + 3/8 min magnitude, first
//    maximum wins): N_ID_1, subframe, cell identity and peak value;
//  - with the transmitted cell, for the high-SNR symbols;
//  - the latency from the last loaded subcarrier to det_valid with the
//    20,832 clocks of the serial search plus pipeline, and with the
//    153,600-clock (5 ms at 30.72 MHz) budget between two SSS.
// It also counts how often each mechanism occurs: a result without a
// previous SSS, a coherently combined result, both buffer slot mappings,
// winners in subframe 0 and 5, a low-SNR symbol that only the combining
// recovers, a change of cell, and load requests ignored while searching.
module tb_sss_detector;
  import sss_ref_pkg::*;

  localparam int NSC = 62;
  localparam int SEARCH_CYCLES = 336 * NSC;
  localparam int LATENCY = SEARCH_CYCLES + 3;
  localparam int BUDGET = 153600;

  logic clk = 0, rst_n = 0;
  logic [1:0] n_id_2 = 0;
  logic r_valid = 0;
  logic signed [7:0] r_i = 0, r_q = 0;
  logic r_ready, det_valid, det_combined;
  logic [7:0] det_n_id_1;
  logic [2:0] det_subframe;
  logic [8:0] det_cell_id;
  logic [9:0] det_peak;

  sss_detector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt_first = 0, cnt_combined = 0, cnt_swap0 = 0, cnt_swap1 = 0;
  int cnt_sf0 = 0, cnt_sf5 = 0, cnt_lowsnr = 0, cnt_cellchange = 0, cnt_ignored = 0;

  // Reference state: previous SSS's correlation outputs.
  int prev_i[2][168], prev_q[2][168];
  bit have_prev = 0;
  int swap_ref = 0;
  int last_n2 = -1;
  int held_n1, held_id, held_sf, held_peak;
  bit held_comb;

  int rx_i[NSC], rx_q[NSC];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip8(input int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // Build one received SSS symbol. amp is the amplitude, noise the half
  // width of the uniform noise; the phase is one of 8 directions.
  task automatic make_symbol(input int n1, input int n2, input int sub5, input int amp, input int noise);
    int ph;
    int cs[8] = '{100, 71, 0, -71, -100, -71, 0, 71};
    ph = int'($urandom % 8);
    for (int kk = 0; kk < NSC; kk++) begin
      int d;
      d = chip(n1, n2, sub5, kk);
      rx_i[kk] = clip8(amp * d * cs[ph] / 100 + int'($urandom % (2 * noise + 1)) - noise);
      rx_q[kk] = clip8(amp * d * cs[(ph + 6) % 8] / 100 + int'($urandom % (2 * noise + 1)) - noise);
    end
  endtask

  // Run one SSS through the detector and check it.
  task automatic run_sss(input int n1, input int n2, input int sub5, input bit expect_cell,
                         input string tag);
    int cur_i[2][168], cur_q[2][168];
    int best_m, best_s, best_q, lat;
    int si, sq, ci, cq, ai, aq, mx, mn, m;
    bit alone_ok;

    // Reference detector.
    best_m = -1; best_s = 0; best_q = 0;
    for (int s = 0; s < 2; s++)
      for (int q = 0; q < 168; q++) begin
        si = 0; sq = 0;
        for (int kk = 0; kk < NSC; kk++) begin
          si += chip(q, n2, s, kk) * rx_i[kk];
          sq += chip(q, n2, s, kk) * rx_q[kk];
        end
        cur_i[s][q] = si >>> 6;
        cur_q[s][q] = sq >>> 6;
        ci = cur_i[s][q] + (have_prev ? prev_i[1-s][q] : 0);
        cq = cur_q[s][q] + (have_prev ? prev_q[1-s][q] : 0);
        ai = iabs(ci); aq = iabs(cq);
        mx = ai > aq ? ai : aq;
        mn = ai > aq ? aq : ai;
        m = mx + (3 * mn) / 8;
        if (m > best_m) begin best_m = m; best_s = s; best_q = q; end
      end

    // Would this SSS alone have given the right answer?
    begin
      int am, as, aq2, mm;
      am = -1; as = 0; aq2 = 0;
      for (int s = 0; s < 2; s++)
        for (int q = 0; q < 168; q++) begin
          ai = iabs(cur_i[s][q]); aq = iabs(cur_q[s][q]);
          mm = (ai > aq ? ai : aq) + (3 * (ai > aq ? aq : ai)) / 8;
          if (mm > am) begin am = mm; as = s; aq2 = q; end
        end
      alone_ok = (as == sub5 && aq2 == n1);
    end

    // Load the symbol.
    for (int kk = 0; kk < NSC; kk++) begin
      while (!r_ready) @(posedge clk);
      r_valid <= 1; r_i <= 8'(rx_i[kk]); r_q <= 8'(rx_q[kk]); n_id_2 <= 2'(n2);
      @(posedge clk);
    end
    // Keep requesting with garbage while the search runs: must be ignored.
    r_i <= 8'sd77; r_q <= -8'sd77; n_id_2 <= 2'(n2 + 1);
    lat = 0;
    do begin
      @(posedge clk);
      #1;
      lat++;
      if (r_valid && !r_ready && lat < 100) cnt_ignored++;
      if (lat == 200) r_valid <= 0;
      // The previous result must still be on the outputs during the search.
      if (lat == 1000 && have_prev) begin
        checks++;
        if (int'(det_n_id_1) != held_n1 || int'(det_cell_id) != held_id ||
            int'(det_subframe) != held_sf || int'(det_peak) != held_peak ||
            det_combined != held_comb) begin
          failures++;
          $display("FAIL %s: previous result not held during the search", tag);
        end
      end
    end while (!det_valid && lat < BUDGET + 10);
    r_valid <= 0;

    checks++;
    if (lat != LATENCY || lat > BUDGET) begin
      failures++;
      $display("FAIL %s: latency %0d clocks, expected %0d", tag, lat, LATENCY);
    end
    checks++;
    if (int'(det_n_id_1) != best_q || int'(det_subframe) != (best_s ? 5 : 0) ||
        int'(det_peak) != best_m || int'(det_cell_id) != 3 * best_q + n2 ||
        det_combined != have_prev) begin
      failures++;
      $display("FAIL %s: got N1=%0d sf=%0d peak=%0d id=%0d comb=%0b, model N1=%0d sf=%0d peak=%0d comb=%0b",
               tag, det_n_id_1, det_subframe, det_peak, det_cell_id, det_combined,
               best_q, best_s ? 5 : 0, best_m, have_prev);
    end
    if (expect_cell) begin
      checks++;
      if (int'(det_n_id_1) != n1 || int'(det_subframe) != (sub5 ? 5 : 0) ||
          int'(det_cell_id) != 3 * n1 + n2) begin
        failures++;
        $display("FAIL %s: detected N1=%0d sf=%0d, sent N1=%0d sf=%0d", tag,
                 det_n_id_1, det_subframe, n1, sub5 ? 5 : 0);
      end
    end
    $display("%s: N1=%0d sf=%0d cell=%0d peak=%0d combined=%0b latency=%0d",
             tag, det_n_id_1, det_subframe, det_cell_id, det_peak, det_combined, lat);

    if (have_prev) cnt_combined++; else cnt_first++;
    if (swap_ref == 0) cnt_swap0++; else cnt_swap1++;
    if (best_s == 0) cnt_sf0++; else cnt_sf5++;
    if (have_prev && !alone_ok && int'(det_n_id_1) == n1 && int'(det_subframe) == (sub5 ? 5 : 0))
      cnt_lowsnr++;
    if (last_n2 >= 0 && last_n2 != n2) cnt_cellchange++;
    last_n2 = n2;

    held_n1 = int'(det_n_id_1); held_id = int'(det_cell_id); held_sf = int'(det_subframe);
    held_peak = int'(det_peak); held_comb = det_combined;
    prev_i = cur_i;
    prev_q = cur_q;
    have_prev = 1;
    swap_ref ^= 1;
  endtask

  task automatic count_check(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("mechanism %s: %0d", what, n);
  endtask

  initial begin
    int n1a, n2a, n1b, n2b, tries;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    n1a = int'($urandom % 168); n2a = int'($urandom % 3);
    // Cell A, strong signal, alternating subframes 0, 5, 0, 5.
    make_symbol(n1a, n2a, 0, 50, 20); run_sss(n1a, n2a, 0, 1, "A sf0 first");
    make_symbol(n1a, n2a, 1, 50, 20); run_sss(n1a, n2a, 1, 1, "A sf5");
    make_symbol(n1a, n2a, 0, 50, 20); run_sss(n1a, n2a, 0, 1, "A sf0");
    make_symbol(n1a, n2a, 1, 50, 20); run_sss(n1a, n2a, 1, 1, "A sf5");

    // Cell change: the first SSS of cell B is paired with cell A's outputs,
    // so only the bit-exact model is checked there.
    n1b = (n1a + 1 + int'($urandom % 166)) % 168; n2b = (n2a + 1) % 3;
    make_symbol(n1b, n2b, 1, 50, 20); run_sss(n1b, n2b, 1, 0, "B sf5 (after change)");
    make_symbol(n1b, n2b, 0, 50, 20); run_sss(n1b, n2b, 0, 1, "B sf0");

    // Low SNR: weak symbols in heavy noise, where combining two SSS helps.
    tries = 0;
    while (cnt_lowsnr == 0 && tries < 6) begin
      make_symbol(n1b, n2b, 1, 4, 60); run_sss(n1b, n2b, 1, 0, "B sf5 low SNR");
      make_symbol(n1b, n2b, 0, 4, 60); run_sss(n1b, n2b, 0, 0, "B sf0 low SNR");
      tries++;
    end

    // The cell of the published waveform example: N_ID_2 = 2, N_ID_1 = 105,
    // found in subframe 0.
    make_symbol(105, 2, 1, 50, 20); run_sss(105, 2, 1, 0, "C sf5 (after change)");
    make_symbol(105, 2, 0, 50, 20); run_sss(105, 2, 0, 1, "C sf0 (N_ID_2=2, N_ID_1=105)");

    count_check("result without previous SSS", cnt_first);
    count_check("coherently combined result", cnt_combined);
    count_check("buffer slot mapping 0", cnt_swap0);
    count_check("buffer slot mapping 1", cnt_swap1);
    count_check("winner in subframe 0", cnt_sf0);
    count_check("winner in subframe 5", cnt_sf5);
    count_check("low-SNR symbol recovered only by combining", cnt_lowsnr);
    count_check("change of cell", cnt_cellchange);
    count_check("load requests ignored while searching", cnt_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
