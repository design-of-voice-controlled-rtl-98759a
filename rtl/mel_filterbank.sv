// Ear-magnitude extractor: 40 overlapping triangular mel filters applied to
// the 256 magnitudes of one FFT frame, computed with 5 reused MAC units.
//
// Filter j (0..39) is served by MAC (j mod 5): once MAC k has finished filter
// j it is cleared and takes filter j+5, so the 5 MACs together cover all 40
// filters. Each MAC owns a 64-entry region of the coefficient ROM
// (MEL_COEF in mfcc_tables_pkg, entries 64k..64k+63 for MAC k) that lists its
// non-zero filter weights in bin order as {last, bin[7:0], weight[15:0]};
// 'last' marks the final weight of a filter. The bin counter 'count' is
// compared with the bin field of each MAC's current ROM entry; on a match the
// MAC accumulates magnitude*weight and steps its ROM pointer (the ROM has one
// cycle of read latency, hidden by always reading the next address). When the
// last weight of a filter has been accumulated the sum moves to a per-MAC
// result register and the MAC starts again from zero.
//
// Results leave one per cycle (s, valid_ele_index = filter number,
// valid_out), lowest MAC number first. Because two filters may complete on
// the same bin, hold_in asks the source to hold its next sample while more
// than one result is waiting; a sample offered with valid_in while hold_in is
// high is not taken. After 256 accepted samples the bin counter and the ROM
// pointers restart for the next frame.
//
// Weights are the triangles of a 40-band mel bank over 0..4000 Hz
// (8 kHz sampling, mel(f) = 1127 ln(1+f/700)), each normalised to unit area
// and scaled by 10000, as described. The reuse scheme, the 5 MACs, the ROM
// holding indices with weights and the port names follow the described
// block; the single clock (the described block runs at twice the system
// clock), the result registers and the hold_in rule are this design's own.
module mel_filterbank
  import mfcc_pkg::*;
  import mfcc_tables_pkg::*;
#(
  parameter int    NMAC   = NMAC_MEL,
  parameter int    ROM_D  = MEL_ROM_D
) (
  input  logic               clk,
  input  logic               sclr,
  input  logic               valid_in,
  input  logic [MAG_W-1:0]   data_in17,
  output logic [7:0]         count,
  output logic [EMAG_W-1:0]  s,
  output logic [5:0]         valid_ele_index,
  output logic               hold_in,
  output logic               valid_out
);
  localparam int PW = $clog2(ROM_D);

  typedef struct packed {
    logic        last;
    logic [7:0]  bin;
    logic [15:0] w;
  } coef_t;
  typedef logic [24:0] region_t [ROM_D];

  // the ROM region of MAC k
  function automatic region_t mac_region(int k);
    region_t r;
    for (int n = 0; n < ROM_D; n++) r[n] = MEL_COEF[k*ROM_D + n];
    return r;
  endfunction

  logic              fire;
  logic [NMAC-1:0]   pend, pend_set, pend_clr;
  logic [EMAG_W-1:0] res   [NMAC];
  logic [5:0]        res_f [NMAC];
  logic              frame_end;

  assign hold_in   = ($countones(pend) > 1);
  assign fire      = valid_in && !hold_in;
  assign frame_end = fire && (count == 8'(NBINS-1));

  always_ff @(posedge clk) begin
    if (sclr)      count <= '0;
    else if (fire) count <= count + 8'd1;
  end

  for (genvar k = 0; k < NMAC; k++) begin : g_mac
    localparam region_t ROM = mac_region(k);
    coef_t             ent;
    logic [PW-1:0]     ptr, ptr_nx;
    logic [EMAG_W-1:0] acc, sum;
    logic [5:0]        fidx;
    logic              hit;

    assign hit = fire && (ent.bin == count);
    assign sum = acc + EMAG_W'(data_in17) * EMAG_W'(ent.w);

    always_comb begin
      if (sclr || frame_end) ptr_nx = '0;
      else if (hit)          ptr_nx = ptr + 1'b1;
      else                   ptr_nx = ptr;
    end

    // synchronous ROM read of the entry that is current next cycle
    always_ff @(posedge clk) ent <= coef_t'(ROM[ptr_nx]);

    always_ff @(posedge clk) begin
      if (sclr || frame_end) begin
        ptr  <= '0;
        acc  <= '0;
        fidx <= 6'(k);
      end else begin
        ptr <= ptr_nx;
        if (hit) begin
          if (ent.last) begin
            acc  <= '0;                 // MAC released for filter fidx+NMAC
            fidx <= fidx + 6'(NMAC);
          end else begin
            acc <= sum;
          end
        end
      end
    end

    assign pend_set[k] = hit && ent.last;
    always_ff @(posedge clk) begin
      if (pend_set[k]) begin
        res[k]   <= sum;
        res_f[k] <= fidx;
      end
    end
  end

  // output selection: lowest-numbered waiting MAC first
  logic [$clog2(NMAC)-1:0] sel;
  always_comb begin
    sel      = '0;
    pend_clr = '0;
    for (int k = NMAC-1; k >= 0; k--) begin
      if (pend[k]) sel = k[$clog2(NMAC)-1:0];
    end
    if (pend != '0) pend_clr[sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (sclr) begin
      pend      <= '0;
      valid_out <= 1'b0;
    end else begin
      pend      <= (pend & ~pend_clr) | pend_set;
      valid_out <= (pend != '0);
    end
  end
  always_ff @(posedge clk) begin
    if (pend != '0) begin
      s               <= res[sel];
      valid_ele_index <= res_f[sel];
    end
  end

  // a finished filter must never overwrite a result that is still waiting
  a_no_result_loss: assert property (@(posedge clk) disable iff (sclr)
                                     (pend_set & pend & ~pend_clr) == '0);
endmodule
