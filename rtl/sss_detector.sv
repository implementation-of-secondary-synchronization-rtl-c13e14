// sss_detector: LTE secondary synchronization signal (SSS) detector, all-serial
// architecture.
//
// After primary synchronization the receiver knows N_ID_2 and where the SSS
// symbol lies, but not N_ID_1 (168 values) nor whether the SSS came from
// subframe 0 or subframe 5. The detector correlates the 62 received central
// subcarriers R(k) with all 336 candidate sequences and picks the largest.
//
// Architecture: a single SSS generator and a single correlation core run
// through the candidates one subcarrier per clock: subframe hypothesis
// (0 then 5), N_ID_1 (0..167), subcarrier k (0..61), 20,832 clocks per SSS.
// That fits easily into the 153,600 clocks of 5 ms at the 30.72 MHz LTE
// sampling rate, which is why this serial organisation is used. For noise
// reduction the correlation outputs of two consecutive SSS are combined
// coherently before the magnitude is taken: since the SSS alternates between
// its subframe-0 and subframe-5 forms, candidate (s, N_ID_1) of the current
// SSS is added to candidate (5-s, N_ID_1) of the previous one. The previous
// outputs come from a 336-entry buffer. Each slot is read and then rewritten
// with the current output for the same candidate; a `swap` bit, toggled
// after every SSS, remembers which slot now holds which subframe hypothesis,
// so no second buffer is needed. Combined outputs go through the magnitude
// estimator into the peak detector, which keeps the best candidate on the
// fly. All adders are parallel self-timed adders (pasta_adder).
//
// Flow: the 62 subcarriers of an SSS symbol are written with r_valid while
// r_ready is high (k = 0 first); n_id_2 is sampled with the first of them.
// The search then runs by itself; r_ready stays low until det_valid, and
// r_valid is ignored meanwhile. det_valid pulses once per SSS with the
// winning N_ID_1, subframe index (0 or 5, of the SSS just received), the
// physical cell identity 3*N_ID_1 + N_ID_2, the peak magnitude, and
// det_combined = 1 when the result used two SSS (0 for the first SSS after
// reset, whose previous outputs do not exist).
// Timing: det_valid comes 336 x 62 + 3 = 20,835 clocks after the last subcarrier
// was written.
// Choices of this design, not of its description: the load interface, the
// sliding pairing of every SSS with the one before it, the 8-bit widths, the
// truncating slice of the correlation output.
module sss_detector
  import sss_pkg::*;
#(
  parameter int unsigned R_W = 8,   // bits per I or Q received sample
  parameter int unsigned C_W = 8    // bits per I or Q correlation output
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [1:0]            n_id_2,
  input  logic                  r_valid,
  input  logic signed [R_W-1:0] r_i,
  input  logic signed [R_W-1:0] r_q,
  output logic                  r_ready,
  output logic                  det_valid,
  output logic [7:0]            det_n_id_1,
  output logic [2:0]            det_subframe,
  output logic [8:0]            det_cell_id,
  output logic [C_W+1:0]        det_peak,
  output logic                  det_combined
);

  localparam int unsigned S_W    = C_W + 1;          // combined output width
  localparam int unsigned MAG_W  = S_W + 1;
  localparam int unsigned ADDR_W = $clog2(NUM_CAND);

  typedef enum logic [1:0] {LOAD, SEARCH, DRAIN} state_t;
  state_t state;

  // Received SSS symbol, 62 complex subcarriers.
  logic signed [R_W-1:0] rx_i [NUM_SC];
  logic signed [R_W-1:0] rx_q [NUM_SC];

  logic [5:0] k;
  logic [7:0] n1;
  logic       sf;
  logic [1:0] n2;
  logic       swap;
  logic       buf_full;

  assign r_ready = (state == LOAD);

  // ---------------------------------------------------------------------------
  // Sequencer: load, then walk sf, n1, k.
  // ---------------------------------------------------------------------------
  logic search_step, search_end;
  assign search_step = (state == SEARCH);
  assign search_end  = search_step && sf && (n1 == 8'(NUM_NID1 - 1)) && (k == 6'(NUM_SC - 1));

  logic pk_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= LOAD;
      k        <= '0;
      n1       <= '0;
      sf       <= 1'b0;
      n2       <= '0;
      swap     <= 1'b0;
      buf_full <= 1'b0;
    end else begin
      unique case (state)
        LOAD: if (r_valid) begin
          if (k == '0) n2 <= n_id_2;
          if (k == 6'(NUM_SC - 1)) begin
            k     <= '0;
            n1    <= '0;
            sf    <= 1'b0;
            state <= SEARCH;
          end else begin
            k <= k + 1'b1;
          end
        end
        SEARCH: begin
          if (k == 6'(NUM_SC - 1)) begin
            k <= '0;
            if (n1 == 8'(NUM_NID1 - 1)) begin
              n1 <= '0;
              sf <= ~sf;
            end else begin
              n1 <= n1 + 1'b1;
            end
          end else begin
            k <= k + 1'b1;
          end
          if (search_end) state <= DRAIN;
        end
        DRAIN: if (pk_done) begin
          state    <= LOAD;
          swap     <= ~swap;
          buf_full <= 1'b1;
        end
        default: state <= LOAD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == LOAD && r_valid) begin
      rx_i[k] <= r_i;
      rx_q[k] <= r_q;
    end
  end

  // ---------------------------------------------------------------------------
  // SSS generation and correlation.
  // ---------------------------------------------------------------------------
  logic chip_neg;
  logic c_valid;
  logic signed [C_W-1:0] c_i, c_q;

  sss_gen u_gen (
    .n_id_1(n1), .n_id_2(n2), .sf(sf), .k(k), .chip_neg(chip_neg)
  );

  correlation_core #(.R_W(R_W), .C_W(C_W), .NUM_SC(NUM_SC)) u_corr (
    .clk(clk), .rst_n(rst_n), .clear(state == LOAD), .in_valid(search_step),
    .r_i(rx_i[k]), .r_q(rx_q[k]), .chip_neg(chip_neg),
    .c_valid(c_valid), .c_i(c_i), .c_q(c_q)
  );

  // Candidate tag of the correlation output (registered with it).
  logic       tag_sf;
  logic [7:0] tag_n1;
  always_ff @(posedge clk) begin
    if (search_step && k == 6'(NUM_SC - 1)) begin
      tag_sf <= sf;
      tag_n1 <= n1;
    end
  end

  // ---------------------------------------------------------------------------
  // Buffer of the previous SSS and coherent combining.
  // ---------------------------------------------------------------------------
  function automatic logic [ADDR_W-1:0] slot(input logic b, input logic [7:0] q);
    return b ? ADDR_W'(q) + ADDR_W'(NUM_NID1) : ADDR_W'(q);
  endfunction

  logic [2*C_W-1:0] buf_rd;
  logic [ADDR_W-1:0] rd_addr, wr_addr;

  assign rd_addr = slot(sf ^ swap, n1);
  assign wr_addr = slot(tag_sf ^ swap, tag_n1);

  corr_buffer #(.DEPTH(NUM_CAND), .DATA_W(2 * C_W)) u_buf (
    .clk(clk), .rd_addr(rd_addr), .rd_data(buf_rd),
    .we(c_valid), .wr_addr(wr_addr), .wr_data({c_i, c_q})
  );

  logic signed [S_W-1:0] prev_i, prev_q, sum_i, sum_q;
  assign prev_i = buf_full ? S_W'($signed(buf_rd[2*C_W-1:C_W])) : '0;
  assign prev_q = buf_full ? S_W'($signed(buf_rd[C_W-1:0]))     : '0;

  pasta_adder #(.WIDTH(S_W)) u_comb_i (
    .a(S_W'(c_i)), .b(prev_i), .cin(1'b0), .sum(sum_i), .cout(), .iterations()
  );
  pasta_adder #(.WIDTH(S_W)) u_comb_q (
    .a(S_W'(c_q)), .b(prev_q), .cin(1'b0), .sum(sum_q), .cout(), .iterations()
  );

  logic                  cmb_valid;
  logic signed [S_W-1:0] cmb_i, cmb_q;
  logic                  cmb_sf;
  logic [7:0]            cmb_n1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cmb_valid <= 1'b0;
    else        cmb_valid <= c_valid;
  end
  always_ff @(posedge clk) begin
    if (c_valid) begin
      cmb_i  <= sum_i;
      cmb_q  <= sum_q;
      cmb_sf <= tag_sf;
      cmb_n1 <= tag_n1;
    end
  end

  // ---------------------------------------------------------------------------
  // Magnitude and peak detection.
  // ---------------------------------------------------------------------------
  logic             mag_valid;
  logic [MAG_W-1:0] mag;
  logic             mag_sf;
  logic [7:0]       mag_n1;

  magnitude_est #(.IN_W(S_W)) u_mag (
    .clk(clk), .rst_n(rst_n), .in_valid(cmb_valid), .in_i(cmb_i), .in_q(cmb_q),
    .out_valid(mag_valid), .mag(mag)
  );

  always_ff @(posedge clk) begin
    if (cmb_valid) begin
      mag_sf <= cmb_sf;
      mag_n1 <= cmb_n1;
    end
  end

  logic             best_sf;
  logic [7:0]       best_n1;
  logic [MAG_W-1:0] best_mag;

  peak_detect #(.MAG_W(MAG_W)) u_peak (
    .clk(clk), .rst_n(rst_n), .in_valid(mag_valid),
    .first(!mag_sf && mag_n1 == 8'd0),
    .last(mag_sf && mag_n1 == 8'(NUM_NID1 - 1)),
    .mag(mag), .sf(mag_sf), .n_id_1(mag_n1),
    .done(pk_done), .best_mag(best_mag), .best_sf(best_sf), .best_n_id_1(best_n1)
  );

  // Identity and combining flag are held with the result, since n2 and
  // buf_full change when the next SSS arrives.
  logic [1:0] res_n2;
  logic       res_combined;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_n2       <= '0;
      res_combined <= 1'b0;
    end else if (mag_valid && mag_sf && mag_n1 == 8'(NUM_NID1 - 1)) begin
      res_n2       <= n2;
      res_combined <= buf_full;
    end
  end

  assign det_valid    = pk_done;
  assign det_n_id_1   = best_n1;
  assign det_subframe = sf_index(best_sf);
  assign det_cell_id  = 9'(3 * best_n1 + res_n2);
  assign det_peak     = best_mag;
  assign det_combined = res_combined;

  // The slot being written never equals the slot being read in that cycle.
  a_buf_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    c_valid && state == SEARCH |-> wr_addr != rd_addr);

endmodule
