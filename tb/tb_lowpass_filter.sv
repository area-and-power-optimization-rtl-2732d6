// tb_lowpass_filter: self-checking test of lowpass_filter.
//
// Drives random and constant inputs into two instances (a short KE = 4 and
// the calibration's KE = 19, both with an 8-bit input) and compares the state
// on every cycle with a 64-bit integer model of E(n+1) = E(n) + 2^-KE (x - E(n))
// kept as s = E*2^(KE+G), with the leak term s/2^KE rounded half up,
// and the output e = floor(s/2^G). Also checks that a constant input settles: after
// enough time the KE = 4 filter reads the input value, and that the step
// response of the first sample is x itself (the one-cycle latency).
module tb_lowpass_filter;

  localparam int unsigned IN_W = 8;
  localparam int unsigned KA   = 4;
  localparam int unsigned KB   = 19;
  localparam int unsigned G    = 12;  // guard bits of the filter state

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [IN_W-1:0]    x;
  logic signed [IN_W+KA-1:0] ea;
  logic signed [IN_W+KB-1:0] eb;

  int checks = 0;
  int failures = 0;
  longint sa, sb;

  lowpass_filter #(.IN_W(IN_W), .KE(KA)) dut_a (.clk(clk), .rst_n(rst_n), .x(x), .e(ea));
  lowpass_filter #(.IN_W(IN_W), .KE(KB)) dut_b (.clk(clk), .rst_n(rst_n), .x(x), .e(eb));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic signed [IN_W-1:0] v);
    @(negedge clk);
    x = v;
    @(posedge clk);
    sa = sa + (longint'(v) <<< G) - ((sa + (64'sd1 <<< (KA - 1))) >>> KA);
    sb = sb + (longint'(v) <<< G) - ((sb + (64'sd1 <<< (KB - 1))) >>> KB);
    #1;
    checks++;
    if (longint'(ea) != (sa >>> G) || longint'(eb) != (sb >>> G)) begin
      failures++;
      if (failures < 10)
        $display("mismatch x=%0d ea=%0d/%0d eb=%0d/%0d", v, ea, sa >>> G, eb, sb >>> G);
    end
  endtask

  initial begin
    x = '0;
    sa = 0;
    sb = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // first sample: state becomes x
    step(8'sd100);
    checks++;
    if (ea != 12'sd100) failures++;
    // random inputs, full range
    repeat (20000) step(IN_W'($urandom));
    // constant input: the short filter settles on it (E = s / 2^KA)
    repeat (2000) step(-8'sd77);
    checks++;
    if ((ea >>> KA) < -8'sd78 || (ea >>> KA) > -8'sd76) begin
      failures++;
      $display("settle fail ea=%0d", ea);
    end
    // slowly varying mean below one input LSB: the filter must resolve it
    // (E of a 0/1 input with 1/4 ones settles near 0.25 LSB)
    repeat (8000) step(($urandom % 4) == 0 ? 8'sd1 : 8'sd0);
    checks++;
    if (ea < 12'sd2 || ea > 12'sd6) begin
      failures++;
      $display("fractional mean fail ea=%0d", ea);
    end
    // extremes
    repeat (3000) step(8'sd127);
    repeat (3000) step(-8'sd128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
