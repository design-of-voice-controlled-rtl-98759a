// Cepstral coefficient extractor: 13-point DCT of the 40 log ear-magnitudes,
//   s[i] = sum_{j=1..40} x_j * C(i,j),  C(i,j) = round(10000*cos(pi*i*(j-0.5)/40)),
// for i = 0..12, computed by 13 multiply-accumulate units working in parallel.
// The 40 inputs are first written into the input data RAM (addr, datain, wea).
// A start pulse then clears the accumulators and a counter walks addresses
// 0..39: each cycle one input word is read once and broadcast to all 13 MACs,
// each of which reads its own cosine value from the table DCT_COS in mfcc_tables_pkg
// (row i holds C(i,1..40)). RAM and table have one cycle of read latency, so
// valid_out is high, with s[] final, 42 cycles after the cycle in which start
// is high (40 accumulation cycles plus the read latency and the final add);
// the described block quotes 40 cycles. RAM writes are ignored while busy.
// s[] are the accumulators themselves: they move during the computation and
// hold their final value from valid_out until the next start.
// The structure (input RAM, counter, 13 parallel MACs with cosine memories,
// port names of the described module) follows the description. The 2/40
// factor of the DCT is not applied (a constant scale, left to software), the
// cosines are scaled by 10000 like all constants of the design, and the
// cosine argument is the standard DCT-II one where the printed formula is
// garbled.
module dct_cepstral
  import mfcc_pkg::*;
  import mfcc_tables_pkg::*;
#(
  parameter int    NIN      = NFILT,
  parameter int    NC       = NCEP,
  parameter int    DW       = DCT_DW
) (
  input  logic                 clk,
  input  logic                 sclr,
  input  logic [5:0]           addr,
  input  logic [DW-1:0]        datain,
  input  logic                 wea,
  input  logic                 start,
  output logic signed [CEP_W-1:0] s [NC],
  output logic                 valid_out,
  output logic                 busy
);
  logic [DW-1:0]       ram [64];

  typedef logic signed [15:0] row_t [NIN];
  // the cosine row of coefficient i
  function automatic row_t cos_row(int i);
    row_t r;
    for (int j = 0; j < NIN; j++) r[j] = DCT_COS[i*NIN + j];
    return r;
  endfunction

  logic [5:0]          cnt;
  logic                run, mac_en, last_rd, last_mac;
  logic signed [DW-1:0] x_q;

  always_ff @(posedge clk) begin
    if (wea && !busy) ram[addr] <= datain;
  end

  always_ff @(posedge clk) begin
    if (sclr) begin
      run <= 1'b0; cnt <= '0; mac_en <= 1'b0; last_mac <= 1'b0; valid_out <= 1'b0;
    end else begin
      valid_out <= last_mac;
      mac_en    <= run;
      last_mac  <= run && last_rd;
      if (start && !run) begin
        run <= 1'b1;
        cnt <= '0;
      end else if (run) begin
        cnt <= cnt + 6'd1;
        if (last_rd) run <= 1'b0;
      end
    end
  end
  assign last_rd = (cnt == 6'(NIN-1));
  assign busy    = run || mac_en;

  always_ff @(posedge clk) x_q <= ram[cnt];

  for (genvar i = 0; i < NC; i++) begin : g_mac
    localparam row_t ROW = cos_row(i);
    logic signed [15:0] c_q;
    always_ff @(posedge clk) c_q <= ROW[(int'(cnt) < NIN) ? int'(cnt) : 0];
    always_ff @(posedge clk) begin
      if (sclr || (start && !run)) s[i] <= '0;
      else if (mac_en)             s[i] <= s[i] + CEP_W'(x_q) * CEP_W'(c_q);
    end
  end
endmodule
