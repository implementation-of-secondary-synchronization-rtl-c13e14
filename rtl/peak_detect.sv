// peak_detect: finds the candidate with the largest correlation magnitude.
//
// The search runs alongside the correlation: each candidate's magnitude is
// compared with the largest seen so far as soon as it is produced, and the
// subframe index and N_ID_1 of the larger one are kept. The 336 stored
// correlation outputs therefore never have to be read back, which saves the
// cycles of a separate search pass. Of several equal maxima the first one
// seen is kept (strict comparison); this tie rule is this design's choice.
//
// Interface: per candidate one cycle with in_valid, carrying mag, the
// subframe bit sf (0: subframe 0, 1: subframe 5) and n_id_1. `first` marks
// the first candidate of a search and `last` its final one.
// Timing: one clock after the `last` candidate, done pulses and best_* hold
// the winner until the next search ends.
module peak_detect #(
  parameter int unsigned MAG_W = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             first,
  input  logic             last,
  input  logic [MAG_W-1:0] mag,
  input  logic             sf,
  input  logic [7:0]       n_id_1,
  output logic             done,
  output logic [MAG_W-1:0] best_mag,
  output logic             best_sf,
  output logic [7:0]       best_n_id_1
);

  logic [MAG_W-1:0] run_mag;
  logic             run_sf;
  logic [7:0]       run_n1;
  logic             take;

  assign take = first || (mag > run_mag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_mag     <= '0;
      run_sf      <= 1'b0;
      run_n1      <= '0;
      done        <= 1'b0;
      best_mag    <= '0;
      best_sf     <= 1'b0;
      best_n_id_1 <= '0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        if (take) begin
          run_mag <= mag;
          run_sf  <= sf;
          run_n1  <= n_id_1;
        end
        if (last) begin
          done        <= 1'b1;
          best_mag    <= take ? mag    : run_mag;
          best_sf     <= take ? sf     : run_sf;
          best_n_id_1 <= take ? n_id_1 : run_n1;
        end
      end
    end
  end

endmodule
