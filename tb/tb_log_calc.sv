// Self-checking test of log_calc: random 32-bit values of every magnitude,
// powers of two, one and zero are streamed one per clock. Each result is
// compared with 10000*ln(a) computed in floating point; the allowed error is
// 45, the effect of truncating the normalised value to the 256-entry table
// grid (10000*ln(1+1/256) = 39) plus rounding. Input 0 must give 0. The
// latency of a lone value is checked to be 4 cycles.
module tb_log_calc;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  logic [31:0] input32 = '0;
  logic [17:0] outdata;
  int checks = 0, failures = 0;
  logic [31:0] in_q [$];

  always #5 clk = ~clk;

  log_calc dut (.*);

  always @(negedge clk) begin
    logic [31:0] a;
    real e;
    if (valid_out) begin
      checks++;
      a = in_q.pop_front();
      e = (a == 0) ? 0.0 : 10000.0 * $ln(real'(a));
      if ((real'(outdata) - e) > 45.0 || (e - real'(outdata)) > 45.0) begin
        failures++; $display("log(%0d): got %0d expected %f", a, outdata, e);
      end
    end
  end

  task automatic send(logic [31:0] a);
    @(negedge clk);
    input32 = a; valid_in = 1; in_q.push_back(a);
    @(posedge clk);
    #1 valid_in = 0;
  endtask

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    send(32'd1000);
    lat = 0;
    while (!valid_out) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 4) begin failures++; $display("latency %0d", lat); end
    @(posedge clk);
    send(0); send(1); send(2); send(3); send(32'hffff_ffff);
    for (int k = 0; k < 32; k++) send(32'd1 << k);
    for (int k = 0; k < 32; k++) send((32'd1 << k) | 32'($urandom) & ((32'd1 << k) - 1));
    for (int i = 0; i < 1000; i++) send($urandom >> ($urandom % 32));
    repeat (10) @(posedge clk);
    checks++;
    if (in_q.size() != 0) begin failures++; $display("%0d results missing", in_q.size()); end
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
