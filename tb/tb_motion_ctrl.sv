// Self-checking test of motion_ctrl. Each of the seven movements is
// commanded and the L293D levels are compared with a table written from the
// wheel directions (forward 10, backward 01, stop 00 per wheel). Then: a move
// with a pulse target must stop when either wheel count reaches it and raise
// target_reached; an obstacle must stop a forward move and raise
// stopped_obstacle until the next command, but must not stop a reverse move;
// every command must pulse clr_dist.
module tb_motion_ctrl;
  import mfcc_pkg::*;
  logic clk = 0, rst = 1, cmd_valid = 0, obstacle = 0;
  move_e cmd = MV_STOP, state;
  logic [15:0] target = '0, pulses_l = '0, pulses_r = '0;
  logic [3:0] motor;
  logic clr_dist, stopped_obstacle, target_reached;
  int checks = 0, failures = 0, nclr = 0, ncmd = 0;

  always #5 clk = ~clk;

  motion_ctrl dut (.*);

  always @(negedge clk) if (clr_dist) nclr++;

  function automatic logic [3:0] levels(move_e m);
    case (m)
      MV_FORWARD:    return 4'b1010;
      MV_REVERSE:    return 4'b0101;
      MV_LEFT:       return 4'b0110;   // left wheel back, right forward
      MV_RIGHT:      return 4'b1001;
      MV_SOFT_LEFT:  return 4'b0010;   // left wheel stopped
      MV_SOFT_RIGHT: return 4'b1000;   // right wheel stopped
      default:       return 4'b0000;
    endcase
  endfunction

  task automatic issue(move_e m, logic [15:0] t);
    @(negedge clk);
    cmd = m; target = t; cmd_valid = 1; ncmd++;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic expect_motor(move_e m, string what);
    checks++;
    if (motor != levels(m) || state != m) begin
      failures++; $display("%s: motor %b state %0d, expected %b", what, motor, state, levels(m));
    end
  endtask

  initial begin
    move_e all [7] = '{MV_FORWARD, MV_REVERSE, MV_LEFT, MV_RIGHT, MV_SOFT_LEFT, MV_SOFT_RIGHT, MV_STOP};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(negedge clk);
    expect_motor(MV_STOP, "after reset");
    foreach (all[i]) begin
      issue(all[i], 0);
      repeat (3) @(negedge clk);
      expect_motor(all[i], all[i].name());
    end
    // distance target on the right wheel
    issue(MV_SOFT_LEFT, 16'd20);
    for (int p = 0; p < 19; p++) begin @(negedge clk); pulses_r = 16'(p); end
    @(negedge clk);
    expect_motor(MV_SOFT_LEFT, "before target");
    pulses_r = 16'd20;
    @(negedge clk);
    @(negedge clk);
    expect_motor(MV_STOP, "at target");
    checks++;
    if (!target_reached) begin failures++; $display("target_reached low"); end
    pulses_r = 0;
    // obstacle while moving forward
    issue(MV_FORWARD, 0);
    repeat (2) @(negedge clk);
    obstacle = 1;
    @(negedge clk);
    @(negedge clk);
    expect_motor(MV_STOP, "obstacle");
    checks++;
    if (!stopped_obstacle) begin failures++; $display("stopped_obstacle low"); end
    // reverse away from it
    issue(MV_REVERSE, 0);
    repeat (3) @(negedge clk);
    expect_motor(MV_REVERSE, "reverse with obstacle");
    checks++;
    if (stopped_obstacle) begin failures++; $display("stopped_obstacle not cleared"); end
    obstacle = 0;
    issue(MV_STOP, 0);
    @(negedge clk);
    checks++;
    if (nclr != ncmd) begin failures++; $display("clr_dist %0d times for %0d commands", nclr, ncmd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
