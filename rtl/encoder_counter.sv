// Position-encoder interface for one wheel.
// The encoder output (a square wave already cleaned by a Schmitt trigger) is
// brought into the clock domain with two flip-flops and its rising edges are
// detected. Two counters use the edges:
//   pulses  counts edges since clr_dist; at 30 slots per wheel turn and a
//           2.55 cm wheel radius one pulse is 0.534 cm of travel, or 4.08
//           degrees of a spot turn and 2.04 degrees of a soft turn;
//   freq    frequency counter: the number of edges in each gate window of
//           GATE_CYCLES clocks, presented with a one-cycle freq_valid pulse
//           at the end of the window (pulses per second with the default
//           one-second gate at 66.67 MHz).
// Both counters saturate instead of wrapping. Edge detection adds two cycles
// of latency. The frequency counter and the distance use follow the
// description; the gate length, widths and saturation are this design's.
module encoder_counter #(
  parameter int GATE_CYCLES = 66_670_000,
  parameter int CNT_W       = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enc_in,
  input  logic             clr_dist,
  output logic [CNT_W-1:0] pulses,
  output logic [CNT_W-1:0] freq,
  output logic             freq_valid
);
  localparam int GW = $clog2(GATE_CYCLES);
  logic [2:0]       sh;
  logic             edge_p;
  logic [GW-1:0]    gate;
  logic [CNT_W-1:0] win;
  logic             gate_end;

  assign edge_p   = sh[1] && !sh[2];
  assign gate_end = (gate == GW'(GATE_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      sh <= '0; gate <= '0; win <= '0; freq <= '0; freq_valid <= 1'b0; pulses <= '0;
    end else begin
      sh         <= {sh[1:0], enc_in};
      freq_valid <= gate_end;
      if (gate_end) begin
        gate <= '0;
        freq <= win;
        win  <= CNT_W'(edge_p);
      end else begin
        gate <= gate + 1'b1;
        if (edge_p && win != '1) win <= win + 1'b1;
      end
      if (clr_dist)                      pulses <= '0;
      else if (edge_p && pulses != '1)   pulses <= pulses + 1'b1;
    end
  end
endmodule
