// Self-checking test of mel_filterbank. The testbench builds its own 40-band
// mel filter bank in floating point (triangles between mel-spaced edges over
// 0..4000 Hz at 8 kHz sampling, each normalised to unit area and scaled by
// 10000) and streams frames of 256 random magnitudes, holding a sample while
// hold_in is high. Each frame must yield every filter index exactly once,
// with the ear magnitude within the error that rounding the weights to
// integers can cause, and the last result must leave within 20 cycles of the
// frame's last sample. Frames of full-scale values and of zeros are included.
// Cycles with hold_in high are reported (with this filter bank no two filters
// end on the same bin, so none are expected).
module tb_mel_filterbank;
  localparam int NB = 256, NF = 40, NFR = 6;
  logic clk = 0, sclr = 1, valid_in = 0;
  logic [16:0] data_in17 = '0;
  logic [7:0]  count;
  logic [31:0] s;
  logic [5:0]  valid_ele_index;
  logic        hold_in, valid_out;
  int checks = 0, failures = 0, holds = 0;

  real w [NF][NB];
  real mag [NB];
  int  seen [NF];
  int  frame_no = 0;
  int  last_in_cycle = 0, last_out_cycle = 0, cyc = 0;

  always #5 clk = ~clk;

  mel_filterbank dut (.*);

  function automatic real mel(real f);  return 1127.0 * $ln(1.0 + f / 700.0); endfunction
  function automatic real imel(real m); return 700.0 * ($exp(m / 1127.0) - 1.0); endfunction

  task automatic build_bank();
    real edges [NF+2];
    for (int i = 0; i < NF + 2; i++) edges[i] = imel(mel(4000.0) * i / (NF + 1));
    for (int j = 0; j < NF; j++) begin
      real sum;
      sum = 0.0;
      for (int b = 0; b < NB; b++) begin
        real f = b * 8000.0 / NB;
        w[j][b] = 0.0;
        if (f > edges[j] && f <= edges[j+1]) w[j][b] = (f - edges[j]) / (edges[j+1] - edges[j]);
        else if (f > edges[j+1] && f < edges[j+2]) w[j][b] = (edges[j+2] - f) / (edges[j+2] - edges[j+1]);
        sum += w[j][b];
      end
      for (int b = 0; b < NB; b++) w[j][b] = 10000.0 * w[j][b] / sum;
    end
  endtask

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    real e, tol;
    if (hold_in && valid_in) holds++;
    if (valid_out) begin
      e = 0.0; tol = 1.0;
      for (int b = 0; b < NB; b++) begin
        e   += mag[b] * w[valid_ele_index][b];
        if (w[valid_ele_index][b] > 0.0) tol += 0.5 * mag[b];
      end
      checks++;
      seen[valid_ele_index]++;
      last_out_cycle = cyc;
      if (valid_ele_index >= NF || (real'(s) - e) > tol || (e - real'(s)) > tol) begin
        failures++;
        $display("frame %0d filter %0d: got %0d expected %f", frame_no, valid_ele_index, s, e);
      end
    end
  end

  task automatic run_frame(int kind);
    for (int b = 0; b < NB; b++) begin
      case (kind)
        0: mag[b] = real'($urandom % 46342);
        1: mag[b] = 46341.0;
        2: mag[b] = 0.0;
        default: mag[b] = real'($urandom % 100);
      endcase
    end
    for (int j = 0; j < NF; j++) seen[j] = 0;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      data_in17 = 17'(int'(mag[b]));
      valid_in  = 1;
      @(posedge clk);
      while (hold_in) @(posedge clk);   // sample is taken on an edge with hold_in low
      #1 valid_in = 0;
    end
    last_in_cycle = cyc;
    repeat (25) @(posedge clk);
    for (int j = 0; j < NF; j++) begin
      checks++;
      if (seen[j] != 1) begin failures++; $display("frame %0d filter %0d seen %0d times", frame_no, j, seen[j]); end
    end
    checks++;
    if (last_out_cycle - last_in_cycle > 20) begin
      failures++; $display("frame %0d: last result %0d cycles after last sample", frame_no, last_out_cycle - last_in_cycle);
    end
    frame_no++;
  endtask

  initial begin
    build_bank();
    repeat (3) @(posedge clk);
    #1 sclr = 0;
    run_frame(1);
    run_frame(0);
    run_frame(2);
    run_frame(0);
    run_frame(3);
    run_frame(0);
    $display("hold cycles: %0d", holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
