// Shared constants and helper functions of the LTE secondary synchronization
// signal (SSS) detector.
//
// The detector searches 2 subframe hypotheses (subframe 0 and 5) times 168
// values of N_ID_1 = 336 candidates, each correlated over the 62 central
// subcarriers of the received SSS symbol. These counts follow the design
// description. The bit widths (8-bit I/Q samples, 8-bit correlation outputs)
// are this design's choice, taken from the signal widths shown in its
// simulation waveform.
//
// The candidate sequences themselves are the standard LTE SSS (3GPP TS 36.211,
// section 6.11.2): two interleaved length-31 m-sequences scrambled by
// N_ID_2-dependent and m0/m1-dependent sequences. The three base m-sequences
// are computed here by constant functions from their recurrences, so no table
// has to be stored in a file.
package sss_pkg;

  localparam int unsigned NUM_SC     = 62;   // subcarriers per SSS
  localparam int unsigned NUM_NID1   = 168;  // cell-identity groups
  localparam int unsigned NUM_CAND   = 2 * NUM_NID1; // 336 candidates
  localparam int unsigned SEQ_LEN    = 31;   // m-sequence length

  // Subframe hypotheses carried as a single bit: 0 -> subframe 0, 1 -> subframe 5.
  function automatic logic [2:0] sf_index(input logic sf_bit);
    return sf_bit ? 3'd5 : 3'd0;
  endfunction

  // Base m-sequence x(i), length 31, initial state x(0..3)=0, x(4)=1.
  //   sel 0: x(i+5) = x(i+2) ^ x(i)                     (s~)
  //   sel 1: x(i+5) = x(i+3) ^ x(i)                     (c~)
  //   sel 2: x(i+5) = x(i+4) ^ x(i+2) ^ x(i+1) ^ x(i)   (z~)
  // Bit i of the result is x(i); the +/-1 value is 1 - 2*x(i).
  function automatic logic [SEQ_LEN-1:0] mseq(input int sel);
    logic [SEQ_LEN+4:0] x;
    x = '0;
    x[4] = 1'b1;
    for (int i = 0; i < SEQ_LEN - 5; i++) begin
      case (sel)
        0:       x[i+5] = x[i+2] ^ x[i];
        1:       x[i+5] = x[i+3] ^ x[i];
        default: x[i+5] = x[i+4] ^ x[i+2] ^ x[i+1] ^ x[i];
      endcase
    end
    return x[SEQ_LEN-1:0];
  endfunction

  localparam logic [SEQ_LEN-1:0] S_SEQ = mseq(0);
  localparam logic [SEQ_LEN-1:0] C_SEQ = mseq(1);
  localparam logic [SEQ_LEN-1:0] Z_SEQ = mseq(2);

endpackage
