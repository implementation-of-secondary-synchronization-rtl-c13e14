// correlation_core: one SSS correlator, C(s, N_ID_1) = sum_k R(k) * Ts,q(k).
//
// The candidate chip Ts,q(k) is real and is either +1 or -1, so the product
// with the complex received subcarrier R(k) needs no multiplier: a
// multiplexer passes either R(k) or its two's complement. The negation is
// formed as in the design description, by inverting every bit and adding
// one; here the "+1" is fed as the carry input of the accumulation adder, so
// each of the I and Q rails has exactly one adder (a pasta_adder) and one
// accumulator register. After the 62nd subcarrier the accumulated sum is cut
// to the output width by dropping its ACC_W-C_W least significant bits
// (arithmetic shift right, truncation toward minus infinity).
//
// Interface: one subcarrier per cycle in which `in_valid` is high. The core
// counts subcarriers itself: the first one after reset or `clear` starts a
// new sum, the NUM_SC-th one ends it. `chip_neg` = 1 selects -R(k).
// Timing: `c_valid` pulses one cycle after the last subcarrier, with c_i/c_q
// holding the result until the next candidate completes. Throughput is one
// subcarrier per clock, NUM_SC clocks per candidate.
// Widths (8-bit I/Q in, 8-bit C out) are this design's choice; the
// accumulator is wide enough that 62 full-scale terms cannot overflow.
module correlation_core #(
  parameter int unsigned R_W    = 8,
  parameter int unsigned C_W    = 8,
  parameter int unsigned NUM_SC = 62,
  parameter int unsigned ACC_W  = R_W + $clog2(NUM_SC)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  in_valid,
  input  logic signed [R_W-1:0] r_i,
  input  logic signed [R_W-1:0] r_q,
  input  logic                  chip_neg,
  output logic                  c_valid,
  output logic signed [C_W-1:0] c_i,
  output logic signed [C_W-1:0] c_q
);

  localparam int unsigned K_W = $clog2(NUM_SC);

  logic [K_W-1:0]   k_cnt;
  logic [ACC_W-1:0] acc_i, acc_q;
  logic [ACC_W-1:0] base_i, base_q;       // 0 on the first subcarrier
  logic [ACC_W-1:0] term_i, term_q;       // R or ~R, sign extended
  logic [ACC_W-1:0] next_i, next_q;
  logic             first, last;

  assign first = (k_cnt == '0);
  assign last  = (k_cnt == K_W'(NUM_SC - 1));

  assign base_i = first ? '0 : acc_i;
  assign base_q = first ? '0 : acc_q;

  // Sign select: -R = ~R + 1, the +1 entering as carry in.
  assign term_i = chip_neg ? ~ACC_W'(r_i) : ACC_W'(r_i);
  assign term_q = chip_neg ? ~ACC_W'(r_q) : ACC_W'(r_q);

  pasta_adder #(.WIDTH(ACC_W)) u_add_i (
    .a(base_i), .b(term_i), .cin(chip_neg), .sum(next_i), .cout(), .iterations()
  );
  pasta_adder #(.WIDTH(ACC_W)) u_add_q (
    .a(base_q), .b(term_q), .cin(chip_neg), .sum(next_q), .cout(), .iterations()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_cnt   <= '0;
      acc_i   <= '0;
      acc_q   <= '0;
      c_valid <= 1'b0;
      c_i     <= '0;
      c_q     <= '0;
    end else begin
      c_valid <= 1'b0;
      if (clear) begin
        k_cnt <= '0;
      end else if (in_valid) begin
        acc_i <= next_i;
        acc_q <= next_q;
        if (last) begin
          k_cnt   <= '0;
          c_valid <= 1'b1;
          c_i     <= C_W'(next_i >> (ACC_W - C_W));
          c_q     <= C_W'(next_q >> (ACC_W - C_W));
        end else begin
          k_cnt <= k_cnt + 1'b1;
        end
      end
    end
  end

endmodule
