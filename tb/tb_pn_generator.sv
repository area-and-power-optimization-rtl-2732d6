// tb_pn_generator: self-checking test of pn_generator.
//
// After reset the first 31 output bits must be the seed, MSB first. Every
// later bit must obey the sequence's own recurrence o[t] = o[t-31] ^ o[t-28]
// (x^31 + x^28 + 1). Over 200k bits the +1/-1 balance must be within 1 %,
// the lag-1 correlation near zero, and a second reset must restart the
// same sequence.
module tb_pn_generator;

  localparam logic [30:0] SEED = 31'h5A5A_1234;
  localparam int N = 200000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pn;

  int checks = 0;
  int failures = 0;
  bit hist[$];

  pn_generator dut (.clk(clk), .rst_n(rst_n), .pn(pn));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2 * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, agree;
    bit first[64];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    ones = 0;
    agree = 0;
    for (int t = 0; t < N; t++) begin
      hist.push_back(pn);
      if (t < 64) first[t] = pn;
      if (t < 31) begin
        checks++;
        if (pn != SEED[30 - t]) failures++;
      end else begin
        checks++;
        if (pn != (hist[t - 31] ^ hist[t - 28])) failures++;
      end
      if (pn) ones++;
      if (t > 0 && pn == hist[t - 1]) agree++;
      @(negedge clk);
    end
    checks++;
    if (ones < N / 2 - N / 100 || ones > N / 2 + N / 100) begin
      failures++;
      $display("unbalanced: %0d ones", ones);
    end
    checks++;
    if (agree < N / 2 - N / 100 || agree > N / 2 + N / 100) begin
      failures++;
      $display("lag-1 correlation: %0d agreements", agree);
    end
    // reset restarts the sequence
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 64; t++) begin
      checks++;
      if (pn != first[t]) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
