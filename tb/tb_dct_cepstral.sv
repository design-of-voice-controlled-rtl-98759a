// Self-checking test of dct_cepstral. Sets of 40 values (random signed,
// random positive log-like, constant, ramp) are written into the input RAM,
// the DCT is started and, when valid_out rises, all 13 outputs are compared
// exactly with sum_j x_j * round(10000*cos(pi*i*(j-0.5)/40)) computed in the
// testbench. The cycles from start to valid_out are checked (42), and a
// write attempted while the DCT is busy must not change the result.
module tb_dct_cepstral;
  localparam int NIN = 40, NC = 13;
  logic clk = 0, sclr = 1, wea = 0, start = 0;
  logic [5:0]  addr = '0;
  logic [24:0] datain = '0;
  logic signed [63:0] s [NC];
  logic valid_out, busy;
  int checks = 0, failures = 0;
  longint x [NIN];

  always #5 clk = ~clk;

  dct_cepstral dut (.*);

  task automatic write_all();
    for (int j = 0; j < NIN; j++) begin
      @(negedge clk);
      addr = 6'(j); datain = 25'(x[j]); wea = 1;
    end
    @(negedge clk);
    wea = 0;
  endtask

  task automatic run_and_check(string name);
    int lat;
    longint e;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    // try to overwrite the RAM while busy
    addr = 6'd3; datain = 25'h0abcde; wea = 1;
    @(negedge clk);
    wea = 0;
    lat = 2;
    while (!valid_out) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 42) begin failures++; $display("%s: latency %0d", name, lat); end
    for (int i = 0; i < NC; i++) begin
      e = 0;
      for (int j = 0; j < NIN; j++)
        e += x[j] * longint'($rtoi($floor(10000.0 * $cos(3.14159265358979 * i * (j + 0.5) / NIN) + 0.5)));
      checks++;
      if (s[i] != e) begin failures++; $display("%s: s%0d got %0d expected %0d", name, i + 1, s[i], e); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 sclr = 0;
    for (int j = 0; j < NIN; j++) x[j] = longint'($signed(25'($urandom)));
    write_all(); run_and_check("random signed");
    for (int j = 0; j < NIN; j++) x[j] = longint'($urandom % 221808);
    write_all(); run_and_check("log range");
    for (int j = 0; j < NIN; j++) x[j] = 40;
    write_all(); run_and_check("constant");
    for (int j = 0; j < NIN; j++) x[j] = j;
    write_all(); run_and_check("ramp");
    for (int j = 0; j < NIN; j++) x[j] = -16777216;
    write_all(); run_and_check("negative full scale");
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
