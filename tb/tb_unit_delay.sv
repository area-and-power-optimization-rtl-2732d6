// tb_unit_delay: self-checking test of unit_delay.
//
// Random estimate pairs go in on every clock; each must come out exactly one
// clock later, and reset must clear both outputs.
module tb_unit_delay;
  import gain_cal_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  gain_est_t d, q, prev;

  int checks = 0;
  int failures = 0;

  unit_delay dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d.dg0 = coef_t'($urandom);
    d.dg2 = coef_t'($urandom);
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q != '0) failures++;
    @(negedge clk);
    rst_n = 1'b1;
    repeat (5000) begin
      @(negedge clk);
      prev = d;
      d.dg0 = coef_t'($urandom);
      d.dg2 = coef_t'($urandom);
      checks++;
      // q still holds the value captured at the last edge
      if (q != prev) failures++;
      @(posedge clk);
      #1;
      checks++;
      if (q != d) failures++;
    end
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (q != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
