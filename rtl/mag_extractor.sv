// Magnitude extractor: |X| = sqrt(re^2 + im^2) for each complex FFT output.
// Each 32-bit input word carries the imaginary part in [31:16] and the real
// part in [15:0], both signed 16-bit, as the FFT core delivers them.
// Pipeline: stage 1 squares both parts (two 16x16 multipliers, registered),
// stage 2 adds the squares, stages 3..18 take the square root one bit per
// stage. A word may enter every cycle and its magnitude leaves exactly 18
// cycles later with valid_out, matching the 18-cycle latency of the described
// block. The described block uses a CORDIC core for the root; here an exact
// integer root is used instead, so abs_out = floor(sqrt(re^2+im^2)).
// abs_out is 17 bits wide to match the filter bank's 17-bit input; the
// largest magnitude, floor(sqrt(2 * 32768^2)) = 46340, fits in 16 bits, so
// bit 16 is always 0 and synthesis ties it off.
module mag_extractor (
  input  logic        clk,
  input  logic        rst,
  input  logic        valid_in,
  input  logic [31:0] data_in,
  output logic [16:0] abs_out,
  output logic        valid_out
);
  logic signed [15:0] re, im;
  logic [31:0] sq_re, sq_im;     // each <= 2^30
  logic [31:0] sum;              // <= 2^31
  logic        v1, v2;
  logic [15:0] root;

  assign re = data_in[15:0];
  assign im = data_in[31:16];

  always_ff @(posedge clk) begin
    sq_re <= 32'(32'(re) * 32'(re));   // operands sign-extended before multiplying
    sq_im <= 32'(32'(im) * 32'(im));
    sum   <= sq_re + sq_im;
  end
  always_ff @(posedge clk) begin
    if (rst) begin v1 <= 1'b0; v2 <= 1'b0; end
    else     begin v1 <= valid_in; v2 <= v1; end
  end

  isqrt_pipe #(.IN_W(32)) u_sqrt (
    .clk(clk), .rst(rst), .valid_in(v2), .x(sum), .root(root), .valid_out(valid_out)
  );
  assign abs_out = {1'b0, root};
endmodule
