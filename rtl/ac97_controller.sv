// AC'97 link controller for the LM4550 codec.
// The codec supplies the 12.288 MHz BIT_CLK; every 256 bit clocks form one
// frame: a 16-bit tag slot followed by twelve 20-bit slots, so frames repeat
// at 48 kHz. A bit counter walks the frame; the synchronizing circuit drives
// SYNC high during the 16 tag bits. A parallel-to-serial shift register sends
// SDATA_OUT, loaded at each frame start from the user registers:
//   tag   bit15 frame valid, bit14/13 slot 1/2 valid (command), bit12/11
//         slot 3/4 valid (headphone samples)
//   slot1 bit19 read(1)/write(0), bits18:12 codec register index
//   slot2 16-bit write data in bits 19:4
//   slot3/4 left/right headphone sample in bits 19:4
// A serial-to-parallel shift register collects SDATA_IN; at the end of each
// frame tag bit 15 gives codec_ready, slot 2 the register read-back
// (status_data) and slots 3 and 4 the 16 MSBs of the left and right ADC
// samples (rec_l, rec_r). rec_valid pulses for one bit clock when the tag says
// slot 3 carries a sample (with a variable rate such as 8 kHz the codec marks
// only some frames). A command (cmd_valid held or pulsed) is sent in the next
// frame; cmd_done pulses when that frame is loaded.
// Timing: SYNC and SDATA_OUT change on the rising edge of BIT_CLK; SDATA_IN
// is sampled on the falling edge. Everything runs in the BIT_CLK domain.
// Frame format, slot use and SYNC follow the description; the command
// handshake and the tag bits set by the controller are this design's choices.
module ac97_controller (
  input  logic        bit_clk,
  input  logic        rst,          // synchronous to bit_clk
  input  logic        sdata_in,
  output logic        sdata_out,
  output logic        sync,
  input  logic [6:0]  cmd_addr,
  input  logic [15:0] cmd_data,
  input  logic        cmd_rw,       // 1 = read
  input  logic        cmd_valid,
  output logic        cmd_done,
  input  logic [15:0] play_l,
  input  logic [15:0] play_r,
  output logic [15:0] rec_l,
  output logic [15:0] rec_r,
  output logic        rec_valid,
  output logic        codec_ready,
  output logic [15:0] status_data,
  output logic        status_valid
);
  localparam int FRAME_BITS = 256;
  localparam int TAG_BITS   = 16;
  localparam int SLOT_BITS  = 20;

  logic [7:0]   pos, pos_n;
  logic [255:0] out_sh, in_sh, in_frame, frame_new;
  logic         sdi_q, cmd_pend;

  logic [SLOT_BITS-1:0] in_slot2, in_slot3, in_slot4;

  function automatic logic [SLOT_BITS-1:0] slot_of(input logic [255:0] f, input int n);
    return f[FRAME_BITS-1-TAG_BITS-SLOT_BITS*(n-1) -: SLOT_BITS];
  endfunction

  assign pos_n = pos + 8'd1;

  always_comb begin
    frame_new = '0;
    frame_new[255]     = 1'b1;          // valid frame
    frame_new[254]     = cmd_pend;      // slot 1: command address
    frame_new[253]     = cmd_pend && !cmd_rw;  // slot 2: command data
    frame_new[252]     = 1'b1;          // slot 3: left playback
    frame_new[251]     = 1'b1;          // slot 4: right playback
    frame_new[239 -: 20] = {cmd_rw, cmd_addr, 12'd0};
    frame_new[219 -: 20] = {cmd_data, 4'd0};
    frame_new[199 -: 20] = {play_l, 4'd0};
    frame_new[179 -: 20] = {play_r, 4'd0};
  end

  always_ff @(negedge bit_clk) sdi_q <= sdata_in;

  assign in_frame  = {in_sh[254:0], sdi_q};
  assign in_slot2  = slot_of(in_frame, 2);
  assign in_slot3  = slot_of(in_frame, 3);
  assign in_slot4  = slot_of(in_frame, 4);
  assign sdata_out = out_sh[255];

  always_ff @(posedge bit_clk) begin
    if (rst) begin
      pos <= 8'd255; sync <= 1'b0; out_sh <= '0; in_sh <= '0;
      cmd_pend <= 1'b0; cmd_done <= 1'b0;
      rec_l <= '0; rec_r <= '0; rec_valid <= 1'b0; codec_ready <= 1'b0;
      status_data <= '0; status_valid <= 1'b0;
    end else begin
      pos       <= pos_n;
      sync      <= (pos_n < 8'(TAG_BITS));
      in_sh     <= in_frame;
      cmd_done  <= 1'b0;
      rec_valid <= 1'b0;
      status_valid <= 1'b0;
      if (pos_n == 8'd0) begin
        out_sh   <= frame_new;
        cmd_done <= cmd_pend;
        cmd_pend <= cmd_valid;
        // the frame just completed on SDATA_IN
        codec_ready <= in_frame[255];
        if (in_frame[252]) begin
          rec_l     <= in_slot3[19:4];
          rec_r     <= in_slot4[19:4];
          rec_valid <= 1'b1;
        end
        if (in_frame[253]) begin
          status_data  <= in_slot2[19:4];
          status_valid <= 1'b1;
        end
      end else begin
        out_sh <= {out_sh[254:0], 1'b0};
        if (cmd_valid) cmd_pend <= 1'b1;
      end
    end
  end
endmodule
