// Speed control PWM for one drive motor.
// A free-running counter spans one PWM period of PERIOD_US microseconds
// (20 ms by default, the period of the described speed control module) at
// CLK_HZ (66.67 MHz, the processor clock of the platform). The output is high
// for the first duty/255 of each period: cycle c of the period is high when
// c*255 < duty*PERIOD, so duty 0 never drives the motor and duty 255 drives
// it all the time. duty is sampled at the start of each period so that a
// change never produces a partial pulse. Higher duty delivers more power to
// the motor and so more speed.
// The 20 ms period follows the description; the 8-bit duty register and its
// sampling at the period start are this design's choices.
module pwm_gen #(
  parameter int CLK_HZ    = 66_670_000,
  parameter int PERIOD_US = 20_000,
  parameter int DUTY_BITS = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [DUTY_BITS-1:0] duty,
  output logic                 pwm,
  output logic                 period_start
);
  localparam longint PERIOD = (longint'(CLK_HZ) * PERIOD_US) / 1_000_000;
  localparam int     CW     = $clog2(PERIOD);
  localparam int     MW     = CW + DUTY_BITS + 1;
  localparam longint DMAX   = (longint'(1) << DUTY_BITS) - 1;

  logic [CW-1:0]        cnt;
  logic [DUTY_BITS-1:0] duty_q;

  assign period_start = (cnt == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; duty_q <= '0; pwm <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      if (period_start) duty_q <= duty;
      pwm <= (MW'(cnt) * MW'(DMAX)) < (MW'(period_start ? duty : duty_q) * MW'(PERIOD));
    end
  end
endmodule
