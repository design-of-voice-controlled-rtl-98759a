// MFCC feature-extraction co-processor: turns the 256 complex outputs of one
// 256-point FFT frame into 13 mel-frequency cepstral coefficients.
//
// Stages, in order (all on one clock):
//   mag_extractor   |X| of each FFT word (18-cycle pipeline)
//   FIFO            64 magnitudes, absorbs the filter bank's hold requests
//   mel_filterbank  40 triangular mel filters on 5 reused MACs
//   FIFO            64 {filter index, ear magnitude} pairs
//   log_calc        10000*ln(ear magnitude) (4-cycle pipeline)
//   dct_cepstral    written into the DCT input RAM at the filter index;
//                   after the 40th value the 13-MAC DCT is started
// Upstream interface: the FFT output FIFO presents datain (imaginary part in
// [31:16], real in [15:0]) with valid_in, and a word moves when valid_in and
// rd_en_out are both high. rd_en_out is dropped while the first FIFO could
// not take every magnitude still in the magnitude pipeline. Frames are
// counted from reset: every 256 words form one frame. After the 40 log values
// of a frame have entered the DCT, the next frame's values wait in the second
// FIFO until the DCT has finished. cep[] is valid while valid_out is high and
// holds until the next frame's DCT starts.
// The chain and its FIFOs follow the described co-processor; FIFO depths,
// the flow control and the single clock are this design's own choices.
module feature_extractor
  import mfcc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic [31:0]              datain,
  input  logic                     valid_in,
  output logic                     rd_en_out,
  output logic signed [CEP_W-1:0]  cep [NCEP],
  output logic                     valid_out,
  output logic                     mel_hold,
  output logic                     mel_valid,
  output logic [5:0]               mel_index,
  output logic [EMAG_W-1:0]        mel_emag
);
  localparam int F1_D    = 64;
  localparam int F2_D    = 64;
  localparam int MAG_LAT = 18;
  localparam int LOG_LAT = 4;

  // ---- magnitude ----
  logic             mag_v;
  logic [MAG_W-1:0] mag;
  logic [$clog2(F1_D):0] f1_cnt;
  logic             f1_empty, f1_full, f1_rd;
  logic [MAG_W-1:0] f1_dout;

  assign rd_en_out = (int'(f1_cnt) < F1_D - MAG_LAT - 2);

  mag_extractor u_mag (
    .clk(clk), .rst(rst), .valid_in(valid_in && rd_en_out), .data_in(datain),
    .abs_out(mag), .valid_out(mag_v)
  );

  sync_fifo #(.WIDTH(MAG_W), .DEPTH(F1_D)) u_f1 (
    .clk(clk), .rst(rst), .wr_en(mag_v), .din(mag), .full(f1_full),
    .rd_en(f1_rd), .dout(f1_dout), .empty(f1_empty), .count(f1_cnt)
  );

  // ---- mel filter bank ----
  logic [7:0]        mel_count;
  assign f1_rd = !f1_empty && !mel_hold;

  mel_filterbank u_mel (
    .clk(clk), .sclr(rst), .valid_in(!f1_empty), .data_in17(f1_dout),
    .count(mel_count), .s(mel_emag), .valid_ele_index(mel_index),
    .hold_in(mel_hold), .valid_out(mel_valid)
  );

  logic [EMAG_W+5:0] f2_dout;
  logic              f2_empty, f2_full, f2_rd;
  logic [$clog2(F2_D):0] f2_cnt;

  sync_fifo #(.WIDTH(EMAG_W+6), .DEPTH(F2_D)) u_f2 (
    .clk(clk), .rst(rst), .wr_en(mel_valid), .din({mel_index, mel_emag}), .full(f2_full),
    .rd_en(f2_rd), .dout(f2_dout), .empty(f2_empty), .count(f2_cnt)
  );

  // ---- logarithm ----
  logic [5:0]       popped;      // values of the current frame sent to the log
  logic [5:0]       written;     // values of the current frame written to the DCT
  logic             dct_busy, dct_start, dct_done;
  logic             log_v;
  logic [LOG_W-1:0] log_val;
  logic [5:0]       idx_dly [LOG_LAT];

  assign f2_rd = !f2_empty && (popped < 6'(NFILT));

  log_calc u_log (
    .clk(clk), .rst(rst), .valid_in(f2_rd), .input32(f2_dout[EMAG_W-1:0]),
    .outdata(log_val), .valid_out(log_v)
  );

  always_ff @(posedge clk) begin
    idx_dly[0] <= f2_dout[EMAG_W+5:EMAG_W];
    for (int i = 1; i < LOG_LAT; i++) idx_dly[i] <= idx_dly[i-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      popped <= '0; written <= '0; dct_start <= 1'b0;
    end else begin
      dct_start <= log_v && (written == 6'(NFILT-1));
      if (log_v) written <= (written == 6'(NFILT-1)) ? 6'd0 : written + 6'd1;
      if (dct_done)   popped <= '0;
      else if (f2_rd) popped <= popped + 6'd1;
    end
  end

  // ---- DCT ----
  dct_cepstral u_dct (
    .clk(clk), .sclr(rst), .addr(idx_dly[LOG_LAT-1]), .datain(DCT_DW'(log_val)),
    .wea(log_v), .start(dct_start), .s(cep), .valid_out(dct_done), .busy(dct_busy)
  );
  assign valid_out = dct_done;

  a_f1_room: assert property (@(posedge clk) disable iff (rst) !(mag_v && f1_full));
  a_f2_room: assert property (@(posedge clk) disable iff (rst) !(mel_valid && f2_full));
endmodule
