// End-to-end test of robot_top at its default parameters (66.67 MHz clock,
// 20 ms PWM period, one-second encoder gate), with a behavioural codec.
// It runs, and counts, every mechanism of the design:
//   MFCC     three frames of FFT words (a tone, the same tone again, zeros):
//            each frame must give one result with all 40 ear magnitudes; the
//            repeated frame must give the same coefficients, the zero frame
//            all-zero ones; filter indices 5..39 show the MAC reuse
//   codec    register writes and a read go out in command frames; received
//            samples must match the codec's pattern (right = ~left)
//   PWM      one full 20 ms period of each motor at two duties: high time and
//            period length are checked against duty/255
//   encoder  a 1 kHz wave on the left encoder must read 1000 per second; the
//            distance count must stop a move at its pulse target
//   moves    all seven movements reach the motor pins; an IR reading over
//            threshold stops a forward move and sounds the buzzer
// Any mechanism that never happens counts as a failure.
module tb_robot_top;
  import mfcc_pkg::*;
  localparam int NB = 256;
  localparam longint PERIOD = 1_333_400;   // 20 ms at 66.67 MHz
  logic clk = 0, rst = 1;
  logic [31:0] fft_data = '0;
  logic fft_valid = 0, fft_rd_en;
  logic signed [CEP_W-1:0] cep [NCEP];
  logic cep_valid, mel_hold, emag_valid;
  logic [5:0] emag_index;
  logic [31:0] emag;
  logic ac97_bit_clk, ac97_sdata_in, ac97_sdata_out, ac97_sync;
  logic [6:0] codec_cmd_addr = '0;
  logic [15:0] codec_cmd_data = '0, play_l = 16'h1111, play_r = 16'h2222;
  logic codec_cmd_rw = 0, codec_cmd_valid = 0, codec_cmd_done;
  logic [15:0] rec_l, rec_r, codec_status;
  logic rec_valid, codec_ready, codec_status_valid;
  move_e move_cmd = MV_STOP, move_state;
  logic move_valid = 0, target_reached;
  logic [15:0] move_target = '0, pulses_l, pulses_r, freq_l, freq_r;
  logic [7:0] speed_l = '0, speed_r = '0;
  logic enc_l = 0, enc_r = 0;
  logic [7:0] range_val [3], prox_val [3];
  logic [7:0] range_thr = 8'd180, prox_thr = 8'd30;
  logic sensors_on = 1, sens_en, obstacle;
  logic [3:0] motor;
  logic pwm_l, pwm_r, buzzer;
  int frames, commands;
  logic [19:0] last_cmd_slot;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_frames = 0, n_emag = 0, n_reuse = 0, n_cmd = 0, n_samples = 0, n_readback = 0;
  int n_pwm = 0, n_gate = 0, n_target = 0, n_obstacle = 0, n_moves [7];

  always #7.5 clk = ~clk;

  robot_top dut (.*);
  ac97_codec_model codec (
    .bit_clk(ac97_bit_clk), .sdata_in(ac97_sdata_in), .sync(ac97_sync), .sdata_out(ac97_sdata_out),
    .frames(frames), .commands(commands), .last_cmd_addr_slot(last_cmd_slot)
  );

  // ---------------- monitors ----------------
  logic signed [CEP_W-1:0] res [3][NCEP];
  int emag_in_frame = 0;
  always @(negedge clk) begin
    if (emag_valid) begin
      n_emag++;
      emag_in_frame++;
      if (emag_index >= 6'(NMAC_MEL)) n_reuse++;
    end
    if (cep_valid) begin
      if (n_frames < 3) foreach (cep[i]) res[n_frames][i] = cep[i];
      checks++;
      if (emag_in_frame != NFILT) begin failures++; $display("frame %0d: %0d ear magnitudes", n_frames, emag_in_frame); end
      emag_in_frame = 0;
      n_frames++;
    end
    n_moves[int'(move_state)]++;
  end

  always @(negedge ac97_bit_clk) begin
    if (codec_cmd_done) n_cmd++;
    if (codec_status_valid) n_readback++;
    if (rec_valid) begin
      n_samples++;
      checks++;
      if (rec_r != ~rec_l) begin failures++; $display("sample %h %h", rec_l, rec_r); end
    end
  end

  // ---------------- stimulus ----------------
  task automatic mfcc_frame(int kind);
    for (int b = 0; b < NB; b++) begin
      real a;
      @(negedge clk);
      a = 9000.0 * $cos(2.0 * 3.14159265358979 * 13 * b / NB) + 3000.0 * $cos(2.0 * 3.14159265358979 * 41 * b / NB);
      fft_data  = (kind == 0) ? {16'($rtoi(a / 3.0)), 16'($rtoi(a))} : 32'd0;
      fft_valid = 1;
      @(posedge clk);
      while (!fft_rd_en) @(posedge clk);
      #1 fft_valid = 0;
    end
  endtask

  task automatic codec_cmd(logic rw, logic [6:0] a, logic [15:0] d);
    @(negedge ac97_bit_clk);
    codec_cmd_rw = rw; codec_cmd_addr = a; codec_cmd_data = d; codec_cmd_valid = 1;
    @(negedge ac97_bit_clk);
    codec_cmd_valid = 0;
    while (!codec_cmd_done) @(negedge ac97_bit_clk);
  endtask

  task automatic move(move_e m, logic [15:0] t);
    @(negedge clk);
    move_cmd = m; move_target = t; move_valid = 1;
    @(negedge clk);
    move_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic pwm_period(logic which, int d);
    longint hi, len, exp_hi;
    logic p;
    // wait for the start of a period (both generators share reset, so phase)
    while (!dut.u_pwm_l.period_start) @(negedge clk);
    @(negedge clk);
    hi = 0; len = 0;
    do begin
      p = which ? pwm_r : pwm_l;
      if (p) hi++;
      len++;
      @(negedge clk);
    end while (!dut.u_pwm_l.period_start);
    p = which ? pwm_r : pwm_l;
    if (p) hi++;
    len++;
    exp_hi = (longint'(d) * PERIOD + 254) / 255;    // cycles c with 255*c < d*PERIOD
    checks++;
    if (hi != exp_hi || len != PERIOD) begin
      failures++; $display("pwm %0d duty %0d: high %0d expected %0d, period %0d", which, d, hi, exp_hi, len);
    end else n_pwm++;
  endtask

  initial begin
    foreach (range_val[i]) begin range_val[i] = 8'd50; prox_val[i] = 8'd250; end
    foreach (n_moves[i]) n_moves[i] = 0;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    repeat (10) @(posedge clk);

    fork
      // ---- codec link ----
      begin
        codec_cmd(1'b0, 7'h02, 16'h0000);   // master volume
        codec_cmd(1'b0, 7'h1c, 16'h0f0f);   // record gain
        codec_cmd(1'b0, 7'h32, 16'd8000);   // ADC rate 8 kHz
        codec_cmd(1'b1, 7'h7c, 16'h0000);   // read vendor id
        repeat (256 * 6) @(posedge ac97_bit_clk);
        checks++;
        if (commands != 4 || last_cmd_slot != {1'b1, 7'h7c, 12'd0}) begin
          failures++; $display("codec saw %0d commands, last slot 1 %h", commands, last_cmd_slot);
        end
      end
      // ---- MFCC co-processor ----
      begin
        mfcc_frame(0);
        mfcc_frame(0);
        mfcc_frame(1);
        repeat (400) @(posedge clk);
        checks++;
        if (n_frames != 3) begin failures++; $display("%0d MFCC frames", n_frames); end
        else begin
          foreach (cep[i]) begin
            checks += 2;
            if (res[0][i] != res[1][i]) begin failures++; $display("s%0d differs between equal frames", i + 1); end
            if (res[2][i] != 0) begin failures++; $display("s%0d of a zero frame is %0d", i + 1, res[2][i]); end
          end
          checks++;
          if (res[0][0] <= 0) begin failures++; $display("s1 of a tone is %0d", res[0][0]); end
        end
      end
      // ---- locomotion ----
      begin
        move_e all [7] = '{MV_FORWARD, MV_REVERSE, MV_LEFT, MV_RIGHT, MV_SOFT_LEFT, MV_SOFT_RIGHT, MV_STOP};
        foreach (all[i]) move(all[i], 0);
        // obstacle ahead while moving forward
        move(MV_FORWARD, 0);
        @(negedge clk);
        range_val[1] = 8'd200;
        repeat (4) @(negedge clk);
        checks++;
        if (motor != 4'b0000 || !buzzer) begin failures++; $display("no obstacle stop: motor %b buzzer %0d", motor, buzzer); end
        else n_obstacle++;
        range_val[1] = 8'd50;
        // speed: one full period of each motor
        speed_l = 8'd128; speed_r = 8'd51;
        move(MV_FORWARD, 16'd5);
        fork
          pwm_period(1'b0, 128);
          pwm_period(1'b1, 51);
          // encoder pulses on the right wheel: the move stops at 5
          begin
            for (int k = 0; k < 8; k++) begin
              repeat (1000) @(negedge clk); enc_r = 1;
              repeat (1000) @(negedge clk); enc_r = 0;
            end
          end
        join
        checks++;
        if (move_state != MV_STOP || !target_reached || pulses_r < 5) begin
          failures++; $display("target: state %0d reached %0d pulses %0d", move_state, target_reached, pulses_r);
        end else n_target++;
      end
    join

    // ---- encoder frequency: 1 kHz on the left wheel over a one-second gate ----
    fork
      begin : wave
        forever begin
          repeat (33335) @(negedge clk); enc_l = ~enc_l;
        end
      end
      begin
        @(negedge clk);
        while (!dut.u_enc_l.freq_valid) @(negedge clk);   // first window is partial
        @(negedge clk);
        while (!dut.u_enc_l.freq_valid) @(negedge clk);
        checks++;
        if (freq_l < 999 || freq_l > 1001) begin failures++; $display("freq_l %0d", freq_l); end
        else n_gate++;
      end
    join_any
    disable wave;

    // ---- every mechanism must have happened ----
    checks++;
    if (n_frames == 0 || n_reuse == 0 || n_cmd == 0 || n_samples == 0 || n_readback == 0 ||
        n_pwm < 2 || n_gate == 0 || n_target == 0 || n_obstacle == 0) begin
      failures++;
    end
    foreach (n_moves[i]) begin
      checks++;
      if (n_moves[i] == 0) begin failures++; $display("movement %0d never reached the motors", i); end
    end
    $display("MFCC frames %0d, ear magnitudes %0d (from reused MACs %0d), codec commands %0d, samples %0d, read-backs %0d",
             n_frames, n_emag, n_reuse, n_cmd, n_samples, n_readback);
    $display("PWM periods %0d, encoder gates %0d, target stops %0d, obstacle stops %0d",
             n_pwm, n_gate, n_target, n_obstacle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
