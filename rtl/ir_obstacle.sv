// Obstacle detection from the robot's IR sensors.
// The sharp IR range sensors give a reading that grows as an object comes
// closer (distance is about 27996 / reading^1.1546 cm), so an object is
// reported when any enabled range reading is at or above range_thr. The IR
// proximity sensors give a voltage near full scale when nothing is within
// about 10 cm and a lower one as an object approaches, so an object is
// reported when any proximity reading is at or below prox_thr. The readings
// come from the external ADC; en powers the sensors down through sens_en
// when they are not used (sens_en is en itself, brought out to the sensors'
// enable pin), and a disabled sensor bank reports nothing.
// obstacle is registered (one cycle after the readings).
// The sensor behaviour and the enable follow the description; the threshold
// comparison, the number of sensors and the widths are this design's choices.
module ir_obstacle #(
  parameter int NRANGE = 3,
  parameter int NPROX  = 3,
  parameter int AW     = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [AW-1:0] range_val [NRANGE],
  input  logic [AW-1:0] prox_val  [NPROX],
  input  logic [AW-1:0] range_thr,
  input  logic [AW-1:0] prox_thr,
  output logic          sens_en,
  output logic          obstacle
);
  logic hit;
  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < NRANGE; i++) if (range_val[i] >= range_thr) hit = 1'b1;
    for (int i = 0; i < NPROX;  i++) if (prox_val[i]  <= prox_thr)  hit = 1'b1;
  end
  assign sens_en = en;
  always_ff @(posedge clk) begin
    if (rst) obstacle <= 1'b0;
    else     obstacle <= en && hit;
  end
endmodule
