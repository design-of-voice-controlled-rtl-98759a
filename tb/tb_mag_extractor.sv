// Self-checking test of mag_extractor: random and corner-case complex words
// are streamed one per cycle; every output is compared with
// floor(sqrt(re^2+im^2)) computed in the testbench, and the latency of a lone
// word is checked to be 18 cycles.
module tb_mag_extractor;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  logic [31:0] data_in = '0;
  logic [16:0] abs_out;
  int checks = 0, failures = 0;
  int unsigned exp_q [$];

  always #5 clk = ~clk;

  mag_extractor dut (.*);

  function automatic int unsigned isqrt(longint unsigned v);
    longint unsigned r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return int'(r);
  endfunction

  function automatic int unsigned model(logic [31:0] w);
    longint signed re = longint'($signed(w[15:0]));
    longint signed im = longint'($signed(w[31:16]));
    return isqrt(longint'(re*re + im*im));
  endfunction

  // outputs are checked on the falling edge, clear of the rising-edge updates
  always @(negedge clk) begin
    int unsigned e;
    if (valid_out) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output %0d", abs_out);
      end else begin
        e = exp_q.pop_front();
        if (abs_out !== 17'(e)) begin
          failures++; $display("mismatch got %0d exp %0d", abs_out, e);
        end
      end
    end
  end

  // inputs change on the falling edge; one word per clock
  task automatic send(logic [31:0] w);
    @(negedge clk);
    data_in = w; valid_in = 1; exp_q.push_back(model(w));
    @(posedge clk);
    #1 valid_in = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // latency of one word
    begin
      int lat = 0;
      send({16'sd4, 16'sd3});
      // the word was taken at the last rising edge; count edges until valid_out
      while (!valid_out) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 18) begin failures++; $display("latency %0d", lat); end
      @(posedge clk);
    end
    send({16'h8000, 16'h8000});
    send({16'h7fff, 16'h8000});
    send(32'h0);
    send({16'h0000, 16'hffff});
    for (int i = 0; i < 500; i++) send($urandom);
    for (int i = 0; i < 100; i++) send({16'($signed(($urandom % 201)) - 100), 16'($signed(($urandom % 201)) - 100)});
    repeat (30) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
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
