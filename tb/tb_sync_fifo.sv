// Self-checking test of sync_fifo (WIDTH 16, DEPTH 8): random writes and
// reads, never writing when full nor reading when empty, are compared with a
// queue model: the head word, empty, full and count are checked every cycle.
// Runs fill the FIFO to full and drain it to empty several times.
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] din = '0, dout;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [W-1:0] q [$];

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int bias;
      bias = ((i / 200) % 2 == 0) ? 70 : 30;   // phases that fill and that drain
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D) || int'(count) != q.size()
          || (q.size() != 0 && dout != q[0])) begin
        failures++;
        $display("cycle %0d: empty %0d full %0d count %0d dout %h, model size %0d", i, empty, full, count, dout, q.size());
      end
      if (full) fulls++;
      if (empty) empties++;
      wr_en = (($urandom % 100) < bias) && (q.size() < D);
      rd_en = (($urandom % 100) < 100 - bias) && (q.size() > 0);
      din   = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(din);
    end
    checks++;
    if (fulls == 0 || empties == 0) begin failures++; $display("never full or never empty"); end
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
