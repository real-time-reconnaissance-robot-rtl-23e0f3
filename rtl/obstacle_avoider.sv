// obstacle_avoider: drives the two robot motors away from obstacles.
//
// Behaviour, as the robot's control loop: when no sensor reports an obstacle
// the robot moves forward for one delay and then looks again; when a sensor
// reports one (sensor output 1) the robot stops for one delay, then turns
// for one delay, then looks again. The turn goes away from the sensor that
// fired: SENSOR[0] (taken as the left sensor) turns the robot right,
// SENSOR[1] (right sensor) turns it left; if both fire it turns left.
// Turns are pivot turns: one motor forward, the other backwards.
// The sensor inputs pass a two-flop synchronizer first. The motor pins use
// the L293D input code (01 clockwise, 10 anti-clockwise, 00 stop) and are
// registered; they change one clock after the state does.
// The loop structure (stop, delay, turn, delay, else forward, delay) and
// the motor code follow the document. The delay lengths, the choice of
// turn direction and the mounting sense of the motors are this design's.
module obstacle_avoider
  import robot_pkg::*;
#(
  parameter int unsigned FWD_CYCLES  = 5_000_000,    // 0.1 s at 50 MHz
  parameter int unsigned STOP_CYCLES = 25_000_000,   // 0.5 s at 50 MHz
  parameter int unsigned TURN_CYCLES = 25_000_000    // 0.5 s at 50 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] sensor,      // 1 = obstacle
  output logic [1:0] lm,          // left motor  (L293D inputs, pins 2/7)
  output logic [1:0] rm,          // right motor (L293D inputs, pins 10/15)
  output move_e      move         // current manoeuvre, for status display
);

  typedef enum logic [1:0] {S_DECIDE, S_FORWARD, S_STOP, S_TURN} state_e;

  state_e      state;
  logic [1:0]  sens_m, sens_s;
  logic [31:0] timer;
  logic        turn_left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sens_m    <= '0;
      sens_s    <= '0;
      state     <= S_DECIDE;
      timer     <= '0;
      turn_left <= 1'b0;
      move      <= MOVE_STOP;
      {lm, rm}  <= {MOTOR_STOP, MOTOR_STOP};
    end else begin
      sens_m <= sensor;
      sens_s <= sens_m;
      {lm, rm} <= move_to_motors(move);
      unique case (state)
        S_DECIDE: begin
          if (sens_s != 2'b00) begin
            state     <= S_STOP;
            timer     <= 32'(STOP_CYCLES - 1);
            turn_left <= sens_s[1];
            move      <= MOVE_STOP;
          end else begin
            state <= S_FORWARD;
            timer <= 32'(FWD_CYCLES - 1);
            move  <= MOVE_FORWARD;
          end
        end
        S_FORWARD: begin
          if (timer == 0) state <= S_DECIDE;
          else            timer <= timer - 1'b1;
        end
        S_STOP: begin
          if (timer == 0) begin
            state <= S_TURN;
            timer <= 32'(TURN_CYCLES - 1);
            move  <= turn_left ? MOVE_LEFT : MOVE_RIGHT;
          end else begin
            timer <= timer - 1'b1;
          end
        end
        S_TURN: begin
          if (timer == 0) state <= S_DECIDE;
          else            timer <= timer - 1'b1;
        end
      endcase
    end
  end

endmodule
