// Self-checking test of pwm_gen with a 1 MHz clock and a 200 us period (200
// cycles) to keep the run short. For several duty values, including 0 and
// 255, the number of high cycles in a whole period must equal the number of
// cycles c with c*255 < duty*200, the high time must be one unbroken pulse at
// the start of the period, and the period must be 200 cycles. A duty change
// in mid-period must only take effect at the next period.
module tb_pwm_gen;
  localparam int P = 200;
  logic clk = 0, rst = 1, pwm, period_start;
  logic [7:0] duty = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pwm_gen #(.CLK_HZ(1_000_000), .PERIOD_US(P)) dut (.*);

  // measure one period; pwm is registered, so it lags the counter by a cycle
  task automatic measure(int d, bit change_mid);
    int hi, edges, exp_hi, len;
    logic prev;
    while (!period_start) @(negedge clk);
    @(negedge clk);                 // first output cycle of this period
    hi = 0; edges = 0; prev = 0; len = 0;
    do begin
      if (pwm) hi++;
      if (pwm && !prev && len > 0) edges++;
      prev = pwm;
      len++;
      if (change_mid && len == P / 2) duty = 8'(255 - d);
      @(negedge clk);
    end while (!period_start);
    if (pwm) hi++;
    len++;
    exp_hi = 0;
    for (int c = 0; c < P; c++) if (c * 255 < d * P) exp_hi++;
    checks++;
    if (hi != exp_hi || edges != 0 || len != P) begin
      failures++; $display("duty %0d: high %0d (exp %0d), extra rises %0d, length %0d", d, hi, exp_hi, edges, len);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    foreach (duty_list[i]) begin
      @(negedge clk);
      duty = 8'(duty_list[i]);
      // let the new value be sampled at the next period start
      while (!period_start) @(negedge clk);
      @(negedge clk);
      measure(duty_list[i], 0);
    end
    // change in the middle of a measured period
    @(negedge clk);
    duty = 8'd64;
    while (!period_start) @(negedge clk);
    @(negedge clk);
    measure(64, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int duty_list [8] = '{0, 1, 2, 64, 128, 200, 254, 255};

  initial begin
    repeat (P * 40) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
