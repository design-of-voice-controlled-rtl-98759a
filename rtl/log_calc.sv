// Logarithm calculator: outdata = 10000 * ln(input32), unsigned fixed point.
// Any a > 0 is written a = 2^p * N with 0.5 <= N < 1, so that
// ln a = (p + log2 N) * ln 2. p is one more than the position of the leading
// one. log2 N comes from a 256-entry table (LOG2_LUT in mfcc_tables_pkg) of
// -10000*log2(0.5 + k/512), k = 0..255, i.e. N sampled every 0.5/256 from 0.5.
// The table index k is the 8 bits that follow the leading one, which equals
// (N - 0.5)/(0.5/256) truncated; the described block obtains the same index
// with a division by 1953 (the interval scaled by 10^6), which is what made
// its latency 41.5 cycles. Here the index is a bit-select and the pipeline is
// 4 cycles: leading-one detection, table read, 10000*p - table value, and the
// multiplication by ln 2 (45426/65536, rounded). Input 0 gives 0.
// A new value can enter every cycle. The table and the 10000 scaling follow
// the described design; the pipeline split and the ln 2 constant width are
// this design's choices. The described '-4' correction of the 10000-scaled
// filter weights is left to the DCT consumer: it is the same constant on all
// 40 inputs and so changes only the 0th cepstral coefficient.
module log_calc
  import mfcc_pkg::*;
  import mfcc_tables_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              valid_in,
  input  logic [31:0]       input32,
  output logic [LOG_W-1:0]  outdata,
  output logic              valid_out
);
  localparam logic [15:0] LN2_Q16 = 16'd45426;


  // stage 1: leading one and table index
  logic [5:0]  p_c;
  logic [7:0]  idx_c;
  logic [31:0] norm_c;
  always_comb begin
    p_c = '0;
    for (int b = 0; b < 32; b++) begin
      if (input32[b]) p_c = 6'(b + 1);
    end
    norm_c = (p_c == 0) ? 32'd0 : (input32 << (6'd32 - p_c));
    idx_c  = norm_c[30:23];   // the leading one sits in bit 31
  end

  logic [5:0]  p1, p2;
  logic [7:0]  idx1;
  logic [13:0] lv2;
  logic [18:0] x3;
  logic [3:0]  v;

  always_ff @(posedge clk) begin
    p1   <= p_c;
    idx1 <= idx_c;
    p2   <= p1;
    lv2  <= LOG2_LUT[idx1];
    x3   <= (p2 == 0) ? 19'd0 : (19'(p2) * 19'(FIX_SCALE) - 19'(lv2));
    outdata <= LOG_W'((35'(x3) * 35'(LN2_Q16) + 35'd32768) >> 16);
  end
  always_ff @(posedge clk) begin
    if (rst) v <= '0;
    else     v <= {v[2:0], valid_in};
  end
  assign valid_out = v[3];
endmodule
