// Self-checking testbench for corr_buffer.
// Fills all 336 entries with random words, reads them back in random order
// against a reference array (read data one clock after the address), and
// checks read-then-write of the same slot returns the old value first.
module tb_corr_buffer;
  localparam int DEPTH = 336;
  logic clk = 0;
  logic [8:0] rd_addr = 0, wr_addr = 0;
  logic [15:0] rd_data, wr_data = 0;
  logic we = 0;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;

  corr_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 16'($urandom);
      we <= 1; wr_addr <= 9'(i); wr_data <= model[i];
      @(posedge clk);
    end
    we <= 0;
    for (int t = 0; t < 1000; t++) begin
      a = int'($urandom % DEPTH);
      rd_addr <= 9'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== model[a]) begin
        failures++;
        $display("FAIL addr %0d: %h expected %h", a, rd_data, model[a]);
      end
    end
    // read-then-write of one slot while reading continues
    rd_addr <= 9'd77;
    @(posedge clk);
    we <= 1; wr_addr <= 9'd77; wr_data <= 16'hBEEF;
    #1;
    checks++;
    if (rd_data !== model[77]) begin failures++; $display("FAIL old value"); end
    @(posedge clk);
    we <= 0;
    @(posedge clk);
    #1;
    checks++;
    if (rd_data !== 16'hBEEF) begin failures++; $display("FAIL new value %h", rd_data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
