// End-to-end test of the MFCC co-processor (feature_extractor). Frames of 256
// complex FFT words are streamed back to back, one per clock while rd_en_out
// allows. The testbench computes the expected result stage by stage in
// floating point: exact integer magnitudes, its own mel filter bank (unit
// area, scaled by 10000), 10000*ln of each ear magnitude and the 13-point
// DCT with cosines rounded at scale 10000. Each ear magnitude must lie within
// the error of integer weights; each coefficient must lie within the error
// those deviations and the 256-entry log table can cause. Frame kinds: random
// full-scale, a tone plus noise, small noise and all zeros. Every frame must
// give exactly one result, within 256+100 cycles of its first word.
// The run is a whole spoken command: 2 s of speech at 8 kHz is 100 frames of
// 160 samples, each zero-padded to a 256-point FFT. The 100 frames go in back
// to back, and the last coefficients must appear within 100*256 + 300 cycles
// of the first word, i.e. the co-processor keeps up with one FFT word per
// clock over a whole command.
module tb_feature_extractor;
  import mfcc_pkg::*;
  localparam int NB = 256, NF = 40, NC = 13, NFR = 100;
  logic clk = 0, rst = 1, valid_in = 0, rd_en_out, valid_out;
  logic [31:0] datain = '0;
  logic signed [63:0] cep [NC];
  logic mel_hold, mel_valid;
  logic [5:0] mel_index;
  logic [31:0] mel_emag;
  int checks = 0, failures = 0;

  real w [NF][NB];
  real cosr [NC][NF];
  real e_mag [NFR][NF], t_mag [NFR][NF];
  real e_cep [NFR][NC], t_cep [NFR][NC];
  int  mel_frame = 0, mel_cnt = 0, out_frame = 0, cyc = 0;
  int  first_cycle [NFR];
  int  last_out_cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  feature_extractor dut (.*);

  function automatic real mel(real f);  return 1127.0 * $ln(1.0 + f / 700.0); endfunction
  function automatic real imel(real m); return 700.0 * ($exp(m / 1127.0) - 1.0); endfunction
  function automatic longint isqrt(longint v);
    longint r;
    r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  task automatic build_tables();
    real edges [NF+2];
    real sum;
    for (int i = 0; i < NF + 2; i++) edges[i] = imel(mel(4000.0) * i / (NF + 1));
    for (int j = 0; j < NF; j++) begin
      sum = 0.0;
      for (int b = 0; b < NB; b++) begin
        real f;
        f = b * 8000.0 / NB;
        w[j][b] = 0.0;
        if (f > edges[j] && f <= edges[j+1]) w[j][b] = (f - edges[j]) / (edges[j+1] - edges[j]);
        else if (f > edges[j+1] && f < edges[j+2]) w[j][b] = (edges[j+2] - f) / (edges[j+2] - edges[j+1]);
        sum += w[j][b];
      end
      for (int b = 0; b < NB; b++) w[j][b] = 10000.0 * w[j][b] / sum;
    end
    for (int i = 0; i < NC; i++)
      for (int j = 0; j < NF; j++)
        cosr[i][j] = $floor(10000.0 * $cos(3.14159265358979 * i * (j + 0.5) / NF) + 0.5);
  endtask

  // expected values of one frame
  task automatic model_frame(int fr, logic [31:0] words [NB]);
    real mag [NB];
    real lg [NF], le [NF];
    for (int b = 0; b < NB; b++) begin
      longint re, im;
      re = longint'($signed(words[b][15:0]));
      im = longint'($signed(words[b][31:16]));
      mag[b] = real'(isqrt(re * re + im * im));
    end
    for (int j = 0; j < NF; j++) begin
      real e, t;
      e = 0.0; t = 1.0;
      for (int b = 0; b < NB; b++) begin
        e += mag[b] * w[j][b];
        if (w[j][b] > 0.0) t += 0.5 * mag[b];
      end
      e_mag[fr][j] = e; t_mag[fr][j] = t;
      lg[j] = (e >= 0.5) ? 10000.0 * $ln(e) : 0.0;
      if (e - t >= 1.0) le[j] = 10000.0 * $ln((e + t) / (e - t)) + 50.0;
      else              le[j] = 10000.0 * $ln(e + t + 1.0) + 50.0;
    end
    for (int i = 0; i < NC; i++) begin
      real c, t;
      c = 0.0; t = 1.0;
      for (int j = 0; j < NF; j++) begin
        c += lg[j] * cosr[i][j];
        t += le[j] * ((cosr[i][j] < 0.0) ? -cosr[i][j] : cosr[i][j]);
      end
      e_cep[fr][i] = c; t_cep[fr][i] = t;
    end
  endtask

  always @(negedge clk) begin
    real d;
    if (mel_valid) begin
      checks++;
      d = real'(mel_emag) - e_mag[mel_frame][mel_index];
      if (d > t_mag[mel_frame][mel_index] || -d > t_mag[mel_frame][mel_index]) begin
        failures++;
        $display("frame %0d emag %0d: got %0d expected %f", mel_frame, mel_index, mel_emag, e_mag[mel_frame][mel_index]);
      end
      mel_cnt++;
      if (mel_cnt == NF) begin mel_cnt = 0; mel_frame++; end
    end
    if (valid_out) begin
      if (out_frame >= NFR) begin
        failures++; $display("extra result");
      end else begin
        checks++;
        if (cyc - first_cycle[out_frame] > NB + 100) begin
          failures++; $display("frame %0d: result after %0d cycles", out_frame, cyc - first_cycle[out_frame]);
        end
        for (int i = 0; i < NC; i++) begin
          checks++;
          d = real'(cep[i]) - e_cep[out_frame][i];
          if (d > t_cep[out_frame][i] || -d > t_cep[out_frame][i]) begin
            failures++;
            $display("frame %0d s%0d: got %0d expected %f (tol %f)", out_frame, i + 1, cep[i], e_cep[out_frame][i], t_cep[out_frame][i]);
          end
        end
        if (out_frame < 5)
          $display("frame %0d: s1 %0d s2 %0d, %0d cycles after its first word", out_frame, cep[0], cep[1], cyc - first_cycle[out_frame]);
      end
      out_frame++;
      last_out_cycle = cyc;
    end
  end

  initial begin
    logic [31:0] words [NB];
    build_tables();
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int fr = 0; fr < NFR; fr++) begin
      for (int b = 0; b < NB; b++) begin
        case (fr % 5)
          0: words[b] = $urandom;
          1: begin
               real a;
               a = 12000.0 * $cos(2.0 * 3.14159265358979 * 20 * b / NB);
               words[b] = {16'($rtoi(a) + int'($urandom % 64) - 32), 16'($rtoi(a / 2.0))};
             end
          2: words[b] = {16'(int'($urandom % 41) - 20), 16'(int'($urandom % 41) - 20)};
          3: words[b] = 32'd0;
          default: words[b] = {16'(int'($urandom % 2001) - 1000), 16'(int'($urandom % 2001) - 1000)};
        endcase
      end
      model_frame(fr, words);
      for (int b = 0; b < NB; b++) begin
        @(negedge clk);
        datain = words[b]; valid_in = 1;
        if (b == 0) first_cycle[fr] = cyc;
        @(posedge clk);
        while (!rd_en_out) @(posedge clk);
        #1 valid_in = 0;
      end
    end
    repeat (400) @(posedge clk);
    checks++;
    if (out_frame != NFR) begin failures++; $display("%0d of %0d frames produced", out_frame, NFR); end
    checks++;
    if (last_out_cycle - first_cycle[0] > NFR * NB + 300) begin
      failures++; $display("command took %0d cycles", last_out_cycle - first_cycle[0]);
    end
    $display("%0d frames: first word to last coefficients %0d cycles", NFR, last_out_cycle - first_cycle[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFR * (NB + 50) + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
