// corr_buffer: storage for the correlation outputs of one SSS, one entry per
// candidate (2 subframe hypotheses x 168 N_ID_1 = 336 entries).
//
// Averaging the correlation over two consecutive SSS needs the complex
// correlation of every candidate of the previous SSS while the current one is
// being correlated; this buffer holds them. Each entry is one complex
// correlation output (I and Q, C_W bits each). The detector reads an entry
// and, a few cycles later, writes the new value for the same candidate slot
// (read-then-write), so the buffer never needs more than 336 entries.
//
// Interface: a simple dual-port memory, one synchronous read port and one
// write port. Timing: rd_data shows the entry addressed in the previous
// cycle; a write takes effect at the clock edge. The contents are not reset;
// the detector tracks whether they are valid.
module corr_buffer #(
  parameter int unsigned DEPTH  = 336,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data,
  input  logic              we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
