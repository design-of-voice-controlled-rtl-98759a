// Behavioural model of the codec side of an AC'97 link (LM4550-like), for
// testbenches only. It generates BIT_CLK (81.38 ns period, 12.288 MHz),
// finds each frame start from the rising edge of SYNC, samples SDATA_OUT on
// falling edges and drives SDATA_IN on rising edges. Its frames report codec
// ready, carry a register read-back in slot 2 every third frame and a
// left/right sample in slots 3/4 every other frame (as at a reduced sampling
// rate); the samples are a counter, left = 16'h4000 + n, right = ~left.
// It counts the frames it received and the command frames among them.
module ac97_codec_model (
  output logic bit_clk,
  output logic sdata_in,
  input  logic sync,
  input  logic sdata_out,
  output int   frames,
  output int   commands,
  output logic [19:0] last_cmd_addr_slot
);
  logic [255:0] tx, rx;
  int  pos = -1;
  logic prev_sync = 0, started = 0;

  initial begin
    bit_clk = 0; sdata_in = 0; frames = 0; commands = 0; tx = '0; last_cmd_addr_slot = '0;
    forever #40.69 bit_clk = ~bit_clk;
  end

  always @(negedge bit_clk) begin
    if (sync && !prev_sync) begin pos = 0; started = 1; end
    else if (started) pos = pos + 1;
    prev_sync = sync;
    if (started) begin
      rx[255 - pos] = sdata_out;
      if (pos == 255) begin
        frames++;
        if (rx[254]) begin commands++; last_cmd_addr_slot = rx[239:220]; end
      end
    end
  end

  always @(posedge bit_clk) begin
    if (started) begin
      if (pos == 255) begin
        tx = '0;
        tx[255] = 1'b1;
        tx[253] = (frames % 3 == 0);
        tx[252] = (frames % 2 == 0);
        tx[219 -: 20] = {16'(16'h0100 + frames), 4'h0};
        tx[199 -: 20] = {16'(16'h4000 + frames), 4'h0};
        tx[179 -: 20] = {~16'(16'h4000 + frames), 4'h0};
      end
      sdata_in <= tx[255 - ((pos + 1) % 256)];
    end
  end
endmodule
