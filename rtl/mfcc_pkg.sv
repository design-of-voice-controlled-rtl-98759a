// Shared sizes of the MFCC feature-extraction co-processor.
// Frame, filter-bank and cepstrum sizes are the ones of the described design
// (256-point FFT, 40 mel filters, 13 cepstral coefficients, fixed-point scale
// 10000). Word widths not stated in the description are chosen here so that no
// intermediate value can overflow.
package mfcc_pkg;
  localparam int NBINS     = 256;   // FFT points per frame
  localparam int NFILT     = 40;    // triangular mel filters
  localparam int NCEP      = 13;    // cepstral coefficients
  localparam int NMAC_MEL  = 5;     // reused MACs in the filter bank
  localparam int MAG_W     = 17;    // magnitude width (filter-bank input)
  localparam int EMAG_W    = 32;    // ear-magnitude width (filter-bank output)
  localparam int LOG_W     = 18;    // logarithm output width
  localparam int DCT_DW    = 25;    // DCT input data width
  localparam int CEP_W     = 64;    // cepstral coefficient width
  localparam int FIX_SCALE = 10000; // fixed-point scale of coefficients and logs

  typedef logic signed [CEP_W-1:0] cep_t;

  // Movements of the locomotion unit.
  typedef enum logic [2:0] {
    MV_STOP       = 3'd0,
    MV_FORWARD    = 3'd1,
    MV_REVERSE    = 3'd2,
    MV_LEFT       = 3'd3,
    MV_RIGHT      = 3'd4,
    MV_SOFT_LEFT  = 3'd5,
    MV_SOFT_RIGHT = 3'd6
  } move_e;
endpackage
