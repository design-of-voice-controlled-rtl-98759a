// Self-checking test of ir_obstacle: random sensor readings and thresholds
// are applied; one cycle later obstacle must equal the testbench's own
// decision (any range reading >= range_thr or any proximity reading <=
// prox_thr, and only while enabled), and sens_en must follow en.
module tb_ir_obstacle;
  logic clk = 0, rst = 1, en = 0, sens_en, obstacle;
  logic [7:0] range_val [3], prox_val [3];
  logic [7:0] range_thr = '0, prox_thr = '0;
  int checks = 0, failures = 0, nobst = 0, nclear = 0;

  always #5 clk = ~clk;

  ir_obstacle #(.NRANGE(3), .NPROX(3), .AW(8)) dut (.*);

  initial begin
    logic expect_o;
    foreach (range_val[i]) begin range_val[i] = '0; prox_val[i] = 8'hff; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom % 8) != 0;
      range_thr = 8'(150 + $urandom % 60);
      prox_thr  = 8'(20 + $urandom % 60);
      foreach (range_val[i]) range_val[i] = 8'($urandom % 200);
      foreach (prox_val[i])  prox_val[i]  = 8'(40 + $urandom % 216);
      expect_o = 0;
      foreach (range_val[i]) if (range_val[i] >= range_thr) expect_o = 1;
      foreach (prox_val[i])  if (prox_val[i]  <= prox_thr)  expect_o = 1;
      expect_o = expect_o && en;
      checks++;
      if (sens_en != en) begin failures++; $display("sens_en %0d en %0d", sens_en, en); end
      @(negedge clk);
      checks++;
      if (obstacle != expect_o) begin failures++; $display("obstacle %0d expected %0d", obstacle, expect_o); end
      if (expect_o) nobst++; else nclear++;
    end
    checks++;
    if (nobst < 100 || nclear < 100) begin failures++; $display("poor coverage %0d %0d", nobst, nclear); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
