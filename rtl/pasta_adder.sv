// pasta_adder: parallel self-timed adder (PASTA) written as synchronous logic.
//
// How it works: in the first phase every bit position is a half adder,
// S0_i = a_i ^ b_i and C0_(i+1) = a_i & b_i. In every following iteration j
// each position half-adds its previous sum with the carry that arrived from
// the position below:
//     S(j+1)_i     = S(j)_i ^ C(j)_i
//     C(j+1)_(i+1) = S(j)_i & C(j)_i
// The recursion ends at the first iteration k at which all carries are zero;
// S(k) is then the sum. Because only half adders are used, no bit position
// ever produces sum = 1 together with carry out = 1.
//
// In the self-timed circuit the iterations run through a multiplexer feedback
// loop selected by the request signal and end by completion detection. A
// synchronous datapath has no such handshake, so here the loop is unrolled
// into WIDTH+1 cascaded half-adder rows, enough for the longest possible
// carry chain, and the adder is purely combinational. The iteration at which
// the self-timed circuit would have signalled completion is reported on
// `iterations`. The carry input `cin` enters as the initial carry into bit 0;
// it lets the correlator form a two's complement negation (invert, then add
// one) inside the accumulation adder. The carry input is this design's
// addition; the self-timed adder it models has none.
//
// Interface: a, b (WIDTH bits, unsigned or two's complement), cin; sum is
// WIDTH bits (modulo 2^WIDTH), cout is the carry out of the top bit.
// Timing: combinational, no clock.
module pasta_adder #(
  parameter int unsigned WIDTH = 14
) (
  input  logic [WIDTH-1:0]         a,
  input  logic [WIDTH-1:0]         b,
  input  logic                     cin,
  output logic [WIDTH-1:0]         sum,
  output logic                     cout,
  output logic [$clog2(WIDTH+2)-1:0] iterations
);

  // One extra position (bit WIDTH) collects the carry out; a+b+cin always
  // fits in WIDTH+1 bits, so no carry ever leaves that position.
  localparam int unsigned W1 = WIDTH + 1;

  logic [W1-1:0] s_row [W1+1];
  logic [W1-1:0] c_row [W1+1];   // c_row[j][i] is the carry into position i

  // Initial phase: one half adder per bit.
  assign s_row[0] = {1'b0, a ^ b};
  assign c_row[0] = {a & b, cin};

  // Iterative phase: half-add previous sums and carries.
  for (genvar j = 0; j < W1; j++) begin : g_iter
    assign s_row[j+1] = s_row[j] ^ c_row[j];
    assign c_row[j+1] = {s_row[j][W1-2:0] & c_row[j][W1-2:0], 1'b0};
  end

  assign sum  = s_row[W1][WIDTH-1:0];
  assign cout = s_row[W1][WIDTH];

  // Completion detection: first iteration whose carries are all zero.
  always_comb begin
    iterations = '0;
    for (int j = W1; j >= 0; j--) begin
      if (c_row[j] == '0) iterations = ($clog2(WIDTH+2))'(j);
    end
  end

endmodule
