// Self-checking test of ac97_controller against a model of the codec side of
// the AC'97 link. The model finds the frame start from the rising edge of
// SYNC, samples SDATA_OUT on falling edges and drives SDATA_IN on rising
// edges with its own frames (tag with codec ready and slot valid bits, a
// register read-back in slot 2, left/right samples in slots 3/4; every other
// frame carries no sample, as at a reduced sampling rate). Checks: SYNC is
// high for exactly 16 bit clocks every 256; the decoded tag and slots 1-4 of
// each received frame match the user registers; the received samples and
// read-back data appear on rec_l/rec_r/status_data with rec_valid only for
// frames that carry them; codec_ready follows tag bit 15.
module tb_ac97_controller;
  logic bit_clk = 0, rst = 1, sdata_in = 0, sdata_out, sync;
  logic [6:0]  cmd_addr = '0;
  logic [15:0] cmd_data = '0, play_l = '0, play_r = '0;
  logic        cmd_rw = 0, cmd_valid = 0, cmd_done;
  logic [15:0] rec_l, rec_r, status_data;
  logic        rec_valid, codec_ready, status_valid;
  int checks = 0, failures = 0;

  always #40 bit_clk = ~bit_clk;   // about 12.288 MHz

  ac97_controller dut (.*);

  // ---------------- codec model ----------------
  logic [255:0] tx_frame, rx_frame, next_tx;
  int  mpos = -1, sync_hi = 0, nframes = 0, nrec = 0, nstatus = 0, ncmd = 0;
  logic prev_sync = 0, started = 0;
  logic [15:0] exp_l, exp_r, exp_st;
  logic        exp_slot3, exp_slot2;
  logic [15:0] sent_l [$], sent_r [$], sent_st [$];
  logic        cmd_seen_pending = 0;
  logic [23:0] cmd_q [$];        // {rw, addr, data} of commands not yet seen

  function automatic logic [255:0] make_frame(int n, logic ready);
    logic [255:0] f;
    f = '0;
    f[255] = ready;
    f[253] = (n % 3 == 0);       // slot 2: register read-back
    f[252] = (n % 2 == 0);       // slot 3 sample
    f[251] = (n % 2 == 0);       // slot 4 sample
    f[219 -: 20] = {16'(16'h1000 + n), 4'h0};
    f[199 -: 20] = {16'($urandom), 4'h5};
    f[179 -: 20] = {16'($urandom), 4'ha};
    return f;
  endfunction

  always @(negedge bit_clk) begin
    if (sync && !prev_sync) begin
      if (started && mpos != 255) begin failures++; $display("frame length %0d", mpos + 1); end
      mpos = 0;
      started = 1;
    end else if (started) mpos = mpos + 1;
    prev_sync = sync;
    if (started) begin
      rx_frame[255 - mpos] = sdata_out;
      if (sync) sync_hi++;
      if (mpos == 255) begin
        // a complete frame from the controller
        checks++;
        if (sync_hi != 16) begin failures++; $display("SYNC high for %0d bits", sync_hi); end
        sync_hi = 0;
        checks++;
        if (rx_frame[255] != 1 || rx_frame[252] != 1 || rx_frame[251] != 1 ||
            rx_frame[199 -: 20] != {exp_pl, 4'h0} || rx_frame[179 -: 20] != {exp_pr, 4'h0}) begin
          failures++; $display("frame %0d: tag %h slot3 %h slot4 %h", nframes, rx_frame[255:240], rx_frame[199 -: 20], rx_frame[179 -: 20]);
        end
        if (rx_frame[254]) begin
          logic [23:0] c;
          ncmd++;
          checks++;
          c = (cmd_q.size() != 0) ? cmd_q.pop_front() : 24'hffffff;
          if (rx_frame[239 -: 20] != {c[23], c[22:16], 12'd0} ||
              rx_frame[253] != !c[23] ||
              (!c[23] && rx_frame[219 -: 20] != {c[15:0], 4'd0})) begin
            failures++; $display("command slots wrong: %h %h", rx_frame[239 -: 20], rx_frame[219 -: 20]);
          end
        end
        nframes++;
      end
    end
  end

  logic [15:0] exp_pl = '0, exp_pr = '0;
  always @(posedge bit_clk) begin
    // the controller loads a frame on this edge when the model is at bit 255
    if (!started || mpos == 255) begin exp_pl = play_l; exp_pr = play_r; end
    if (started) begin
      if (mpos == 255) begin
        tx_frame = make_frame(nframes, 1'b1);
        if (tx_frame[252]) begin sent_l.push_back(tx_frame[199:184]); sent_r.push_back(tx_frame[179:164]); end
        if (tx_frame[253]) sent_st.push_back(tx_frame[219:204]);
      end
      sdata_in <= tx_frame[255 - ((mpos + 1) % 256)];
    end
  end

  // outputs of the controller
  always @(negedge bit_clk) begin
    if (rec_valid) begin
      checks++;
      nrec++;
      if (sent_l.size() == 0 || rec_l != sent_l[0] || rec_r != sent_r[0]) begin
        failures++; $display("rec mismatch %h %h", rec_l, rec_r);
      end
      if (sent_l.size() != 0) begin void'(sent_l.pop_front()); void'(sent_r.pop_front()); end
      checks++;
      if (!codec_ready) begin failures++; $display("codec_ready low"); end
    end
    if (status_valid) begin
      checks++;
      nstatus++;
      if (sent_st.size() == 0 || status_data != sent_st[0]) begin failures++; $display("status mismatch %h", status_data); end
      if (sent_st.size() != 0) void'(sent_st.pop_front());
    end
  end

  task automatic command(logic rw, logic [6:0] a, logic [15:0] d);
    @(negedge bit_clk);
    cmd_rw = rw; cmd_addr = a; cmd_data = d; cmd_valid = 1;
    cmd_q.push_back({rw, a, d});
    @(negedge bit_clk);
    cmd_valid = 0;
    while (!cmd_done) @(negedge bit_clk);
  endtask

  initial begin
    tx_frame = '0;
    repeat (4) @(posedge bit_clk);
    #1 rst = 0;
    play_l = 16'h1234; play_r = 16'hbeef;   // before the first frame
    repeat (600) @(posedge bit_clk);
    command(1'b0, 7'h02, 16'h0808);    // master volume
    command(1'b0, 7'h32, 16'd8000);    // ADC rate 8 kHz
    command(1'b1, 7'h7c, 16'h0000);    // vendor id read
    repeat (300) @(negedge bit_clk);
    @(posedge bit_clk);
    #1 play_l = 16'h7fff; play_r = 16'h8001;
    repeat (256 * 12) @(posedge bit_clk);
    checks++;
    if (ncmd != 3 || nrec < 4 || nstatus < 2) begin failures++; $display("cmd %0d rec %0d status %0d", ncmd, nrec, nstatus); end
    $display("frames %0d commands %0d samples %0d read-backs %0d", nframes, ncmd, nrec, nstatus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (256 * 40) @(posedge bit_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
