// Self-checking test of encoder_counter with a 100-cycle gate. Square waves
// of several periods (and a stopped wheel) drive enc_in. Every freq_valid
// must come exactly 100 cycles after the previous one, and freq must equal
// the rising edges the testbench produced in that window (shifted by the
// 2-cycle input synchroniser). pulses must equal the number of rising edges
// since the last clr_dist.
module tb_encoder_counter;
  localparam int G = 100;
  logic clk = 0, rst = 1, enc_in = 0, clr_dist = 0;
  logic [15:0] pulses, freq;
  logic freq_valid;
  int checks = 0, failures = 0;
  int cyc = 0, rises_at [$], total_rises = 0, since_clr = 0, last_valid = -1, nvalid = 0;

  always #5 clk = ~clk;

  encoder_counter #(.GATE_CYCLES(G)) dut (.*);

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (freq_valid) begin
      int n;
      n = 0;
      // edges made 4..G+3 cycles ago: synchroniser, edge detector, window register
      foreach (rises_at[i]) if (rises_at[i] > cyc - G - 4 && rises_at[i] <= cyc - 4) n++;
      checks++;
      if (int'(freq) != n) begin failures++; $display("cycle %0d freq %0d expected %0d", cyc, freq, n); end
      if (last_valid >= 0) begin
        checks++;
        if (cyc - last_valid != G) begin failures++; $display("gate length %0d", cyc - last_valid); end
      end
      last_valid = cyc;
      nvalid++;
    end
  end

  task automatic wave(int half, int cycles);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      if (half > 0 && c % half == 0) begin
        enc_in = !enc_in;
        if (enc_in) begin rises_at.push_back(cyc); total_rises++; since_clr++; end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wave(3, 450);
    wave(7, 400);
    wave(0, 300);
    wave(1, 250);
    repeat (5) @(negedge clk);
    checks++;
    if (int'(pulses) != since_clr) begin failures++; $display("pulses %0d expected %0d", pulses, since_clr); end
    @(negedge clk);
    clr_dist = 1;
    @(negedge clk);
    clr_dist = 0;
    since_clr = 0;
    wave(5, 333);
    repeat (5) @(negedge clk);
    checks++;
    if (int'(pulses) != since_clr) begin failures++; $display("pulses after clear %0d expected %0d", pulses, since_clr); end
    checks++;
    if (nvalid < 15) begin failures++; $display("only %0d gate windows", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
