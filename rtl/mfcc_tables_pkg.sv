// Constant tables of the MFCC co-processor, computed at elaboration from their
// formulas by constant functions, so simulation and synthesis need no data
// files and the tables follow the sizes in mfcc_pkg.
//
// MEL_COEF  mel filter-bank ROM, MEL_ROM_D entries per MAC (MAC k owns
//           entries MEL_ROM_D*k .. MEL_ROM_D*k + MEL_ROM_D-1). Each entry is
//           {last[24], bin[23:16], weight[15:0]}: the non-zero weights of
//           filters k, k+5, .. k+35 in bin order, 'last' set on the final
//           weight of each filter; unused entries are bin 255, weight 0.
//           Filter j (0..39) is the triangle over the mel-spaced edges
//           e(j), e(j+1), e(j+2), where e(0..41) are equally spaced in
//           mel(f) = 1127 ln(1 + f/700) from 0 to 4000 Hz. Bin b sits at
//           b * 8000/256 Hz; its weight rises from 0 at e(j) (exclusive) to 1
//           at e(j+1) (inclusive) and falls to 0 at e(j+2). Each filter is
//           scaled so that its weights sum to 1, then multiplied by 10000 and
//           rounded. That gives 247 non-zero weights, at most 55 in a MAC.
// LOG2_LUT  entry k = round(-10000 * log2(0.5 + k/512)), k = 0..255: minus
//           log2 of the normalised mantissa, for the logarithm stage.
// DCT_COS   entry 40i + (j-1) = round(10000 * cos(pi * i * (j - 0.5) / 40)),
//           i = 0..12, j = 1..40.
//
// The scale 10000, the 40 filters over 0..4 kHz at 8 kHz sampling, the 5 MACs
// and the 13 coefficients follow the described co-processor; the band edges,
// the area normalisation, the table layouts and the log table are this
// design's own.
package mfcc_tables_pkg;
  import mfcc_pkg::*;

  localparam int  MEL_ROM_D = 64;       // ROM entries per filter-bank MAC
  localparam real FS_HZ     = 8000.0;   // sampling rate
  localparam real F_HI_HZ   = 4000.0;   // top of the filter bank
  localparam real PI        = 3.14159265358979323846;

  typedef logic [24:0]        mel_rom_t [NMAC_MEL*MEL_ROM_D];
  typedef logic [13:0]        log_lut_t [256];
  typedef logic signed [15:0] cos_tab_t [NCEP*NFILT];

  function automatic int round_r(real x);
    return $rtoi($floor(x + 0.5));
  endfunction

  function automatic real hz2mel(real f);
    return 1127.0 * $ln(1.0 + f / 700.0);
  endfunction

  function automatic real mel2hz(real m);
    return 700.0 * ($exp(m / 1127.0) - 1.0);
  endfunction

  function automatic mel_rom_t mk_mel_coef();
    mel_rom_t t;
    real      edg  [NFILT+2];
    real      tw   [NBINS];
    int       w    [NBINS];
    int       fill [NMAC_MEL];
    real      area, f, lo, mid, hi;
    int       lastb, k;
    for (int n = 0; n < NMAC_MEL*MEL_ROM_D; n++) t[n] = {1'b0, 8'hff, 16'h0000};
    for (int n = 0; n < NMAC_MEL; n++) fill[n] = 0;
    for (int e = 0; e < NFILT+2; e++)
      edg[e] = mel2hz(hz2mel(F_HI_HZ) * e / (NFILT + 1));
    for (int j = 0; j < NFILT; j++) begin
      lo = edg[j]; mid = edg[j+1]; hi = edg[j+2];
      area = 0.0;
      for (int b = 0; b < NBINS; b++) begin
        f = b * FS_HZ / NBINS;
        if (f > lo && f <= mid)     tw[b] = (f - lo) / (mid - lo);
        else if (f > mid && f < hi) tw[b] = (hi - f) / (hi - mid);
        else                        tw[b] = 0.0;
        area += tw[b];
      end
      lastb = -1;
      for (int b = 0; b < NBINS; b++) begin
        w[b] = round_r(FIX_SCALE * tw[b] / area);
        if (w[b] > 0) lastb = b;
      end
      k = j % NMAC_MEL;
      for (int b = 0; b < NBINS; b++) begin
        if (w[b] > 0) begin
          t[k*MEL_ROM_D + fill[k]] = {(b == lastb), 8'(b), 16'(w[b])};
          fill[k]++;
        end
      end
    end
    return t;
  endfunction

  function automatic log_lut_t mk_log2_lut();
    log_lut_t t;
    for (int n = 0; n < 256; n++)
      t[n] = 14'(round_r(-FIX_SCALE * $ln(0.5 + n / 512.0) / $ln(2.0)));
    return t;
  endfunction

  function automatic cos_tab_t mk_dct_cos();
    cos_tab_t t;
    for (int i = 0; i < NCEP; i++)
      for (int j = 1; j <= NFILT; j++)
        t[i*NFILT + j-1] = 16'(round_r(FIX_SCALE * $cos(PI * i * (j - 0.5) / NFILT)));
    return t;
  endfunction

  localparam mel_rom_t MEL_COEF = mk_mel_coef();
  localparam log_lut_t LOG2_LUT = mk_log2_lut();
  localparam cos_tab_t DCT_COS  = mk_dct_cos();
endpackage
