// sss_gen: candidate SSS chip generator, Ts,q(k) = generate_SSS_carriers(N_ID_1, N_ID_2, s, k).
//
// The detector needs, for every candidate (subframe s, N_ID_1) and every one
// of the 62 subcarriers k, the value (+1 or -1) of the SSS that a cell with
// that identity would have sent. The design description only names this
// function; the sequence used is the standard LTE SSS (3GPP TS 36.211,
// 6.11.2):
//   m0, m1 from N_ID_1:  q' = N1/30, q = (N1 + q'(q'+1)/2)/30,
//                        m' = N1 + q(q+1)/2, m0 = m' mod 31,
//                        m1 = (m0 + m'/31 + 1) mod 31
//   n = k/2
//   k even: subframe 0: s~(n+m0) c~(n+N2)          subframe 5: s~(n+m1) c~(n+N2)
//   k odd : subframe 0: s~(n+m1) c~(n+N2+3) z~(n+m0 mod 8)
//           subframe 5: s~(n+m0) c~(n+N2+3) z~(n+m1 mod 8)
// with all sequence indices taken modulo 31. Each +/-1 factor is 1-2x for a
// base m-sequence bit x, so the product of the factors is -1 exactly when the
// XOR of the selected bits is 1. The generator therefore needs only three
// 31-bit constant sequences, two modulo-31 adders per index and an XOR.
//
// Interface: n_id_1 (0..167), n_id_2 (0..2), sf (0: subframe 0, 1: subframe 5),
// k (0..61). Output chip_neg = 1 when Ts,q(k) = -1, 0 when it is +1.
// Timing: combinational. In the detector n_id_1, n_id_2 and sf are stable for
// the 62 cycles of one candidate, so only the k path changes every cycle.
module sss_gen
  import sss_pkg::*;
(
  input  logic [7:0] n_id_1,
  input  logic [1:0] n_id_2,
  input  logic       sf,
  input  logic [5:0] k,
  output logic       chip_neg
);

  logic [4:0] m0, m1;

  // m0/m1 mapping of N_ID_1.
  always_comb begin
    int unsigned n1, qp, q, mp;
    n1 = int'(n_id_1);
    qp = n1 / 30;
    q  = (n1 + (qp * (qp + 1)) / 2) / 30;
    mp = n1 + (q * (q + 1)) / 2;
    m0 = 5'(mp % 31);
    m1 = 5'((mp % 31 + mp / 31 + 1) % 31);
  end

  // (x + y) mod 31 for x, y in 0..30.
  function automatic logic [4:0] add31(input logic [4:0] x, input logic [4:0] y);
    logic [5:0] t;
    t = {1'b0, x} + {1'b0, y};
    return (t >= 6'd31) ? 5'(t - 6'd31) : t[4:0];
  endfunction

  logic [4:0] n;
  logic       odd;
  logic [4:0] m_s, m_z;
  logic [4:0] idx_s, idx_c, idx_z;

  assign n   = k[5:1];
  assign odd = k[0];

  always_comb begin
    // Which shift the s~ factor uses: m0 on even/sf0 and odd/sf5, else m1.
    m_s   = (odd ^ sf) ? m1 : m0;
    // z~ shift on odd subcarriers: m0 mod 8 in subframe 0, m1 mod 8 in subframe 5.
    m_z   = {2'b00, (sf ? m1[2:0] : m0[2:0])};
    idx_s = add31(n, m_s);
    idx_c = add31(n, odd ? 5'(n_id_2) + 5'd3 : 5'(n_id_2));
    idx_z = add31(n, m_z);
    chip_neg = S_SEQ[idx_s] ^ C_SEQ[idx_c] ^ (odd & Z_SEQ[idx_z]);
  end

endmodule
