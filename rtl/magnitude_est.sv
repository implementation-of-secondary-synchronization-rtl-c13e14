// magnitude_est: multiplier-free estimate of the magnitude of I + jQ,
//     Mag ~ alpha * max(|I|,|Q|) + beta * min(|I|,|Q|), alpha = 1, beta = 3/8.
//
// Only the ordering of the candidates' magnitudes matters to the detector, so
// this estimate replaces sqrt(I^2 + Q^2). The absolute values are formed by
// testing the sign bit and, when it is set, inverting and adding one; a
// comparator picks max and min; 3/8 min is (min + 2 min) / 8, i.e. one adder
// and shifts; a last adder adds max. All additions use pasta_adder. The
// choice alpha = 1, beta = 3/8 follows the design description; computing
// 3/8 min as floor(3 min / 8) is this design's choice.
//
// Interface: signed in_i, in_q of IN_W bits with in_valid; unsigned mag of
// IN_W+1 bits (enough for the largest estimate, 11/8 of the largest |I|).
// Timing: one register stage; mag and out_valid appear one clock after the
// inputs.
module magnitude_est #(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned MAG_W = IN_W + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  output logic                   out_valid,
  output logic [MAG_W-1:0]       mag
);

  logic [IN_W-1:0]  abs_i, abs_q;
  logic [IN_W-1:0]  mx, mn;
  logic [MAG_W+1:0] three_mn;      // min + 2*min, up to 3 * 2^(IN_W-1)
  logic [MAG_W-1:0] est;

  // |x|: sign bit selects x or ~x + 1.
  pasta_adder #(.WIDTH(IN_W)) u_abs_i (
    .a(in_i[IN_W-1] ? ~in_i : in_i), .b('0), .cin(in_i[IN_W-1]),
    .sum(abs_i), .cout(), .iterations()
  );
  pasta_adder #(.WIDTH(IN_W)) u_abs_q (
    .a(in_q[IN_W-1] ? ~in_q : in_q), .b('0), .cin(in_q[IN_W-1]),
    .sum(abs_q), .cout(), .iterations()
  );

  assign mx = (abs_i >= abs_q) ? abs_i : abs_q;
  assign mn = (abs_i >= abs_q) ? abs_q : abs_i;

  pasta_adder #(.WIDTH(MAG_W+2)) u_three (
    .a((MAG_W+2)'(mn)), .b((MAG_W+2)'({mn, 1'b0})), .cin(1'b0),
    .sum(three_mn), .cout(), .iterations()
  );

  pasta_adder #(.WIDTH(MAG_W)) u_sum (
    .a(MAG_W'(mx)), .b(MAG_W'(three_mn >> 3)), .cin(1'b0),
    .sum(est), .cout(), .iterations()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) mag <= est;
    end
  end

endmodule
