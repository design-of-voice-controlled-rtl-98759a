// Pipelined integer square root, one result bit per stage.
// Stage k retires result bit (OUT_W-1-k) by the digit-by-digit (restoring)
// method: the partial remainder takes the next two radicand bits, the trial
// value 4*root+1 is subtracted when it fits and the root grows by one bit.
// A new radicand can enter every cycle; root appears OUT_W cycles later,
// floor(sqrt(x)). Used in place of the CORDIC square-root core of the
// magnitude extractor; the method is this implementation's choice.
module isqrt_pipe #(
  parameter int IN_W = 32            // radicand width, even
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 valid_in,
  input  logic [IN_W-1:0]      x,
  output logic [IN_W/2-1:0]    root,
  output logic                 valid_out
);
  localparam int OUT_W = IN_W / 2;
  localparam int REM_W = OUT_W + 2;

  logic [IN_W-1:0]  x_q   [OUT_W+1];
  logic [REM_W-1:0] rem_q [OUT_W+1];
  logic [OUT_W-1:0] rt_q  [OUT_W+1];
  logic             v_q   [OUT_W+1];

  assign x_q[0]   = x;
  assign rem_q[0] = '0;
  assign rt_q[0]  = '0;
  assign v_q[0]   = valid_in;

  for (genvar k = 0; k < OUT_W; k++) begin : g_stage
    logic [REM_W-1:0] rem_sh, trial;
    logic             fits;
    always_comb begin
      rem_sh = {rem_q[k][REM_W-3:0], x_q[k][IN_W-1-2*k -: 2]};
      trial  = {rt_q[k], 2'b01};
      fits   = (rem_sh >= trial);
    end
    always_ff @(posedge clk) begin
      x_q[k+1]   <= x_q[k];
      rem_q[k+1] <= fits ? (rem_sh - trial) : rem_sh;
      rt_q[k+1]  <= {rt_q[k][OUT_W-2:0], fits};
    end
    always_ff @(posedge clk) begin
      if (rst) v_q[k+1] <= 1'b0;
      else     v_q[k+1] <= v_q[k];
    end
  end

  assign root      = rt_q[OUT_W];
  assign valid_out = v_q[OUT_W];
endmodule
