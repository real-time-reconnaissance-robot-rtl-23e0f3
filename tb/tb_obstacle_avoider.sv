// tb_obstacle_avoider: short delays (forward 6, stop 10, turn 8 clocks).
// With no obstacle the robot must keep going forward. When a sensor fires
// the motors must stop for the stop delay and then pivot away from that
// sensor for the turn delay before the sensors are looked at again:
// SENSOR[0] gives a right turn (left motor 01, right 10), SENSOR[1] and
// both sensors a left turn (left 10, right 01). Forward is 01/01, stop
// 00/00. Every manoeuvre's length is measured in clocks on the motor pins.
module tb_obstacle_avoider;
  import robot_pkg::*;
  localparam int FWD = 6, STP = 10, TRN = 8;
  logic clk = 0, rst_n = 0;
  logic [1:0] sensor = 0;
  logic [1:0] lm, rm;
  move_e move;
  int checks = 0, failures = 0;

  obstacle_avoider #(.FWD_CYCLES(FWD), .STOP_CYCLES(STP), .TURN_CYCLES(TRN)) dut (.*);

  always #5 clk = ~clk;

  // record runs of constant motor pins
  logic [3:0] run_val;
  int run_len;
  logic [3:0] runs_v[$];
  int runs_l[$];
  always @(posedge clk) if (rst_n) begin
    if ({lm, rm} == run_val) run_len++;
    else begin
      runs_v.push_back(run_val); runs_l.push_back(run_len);
      run_val = {lm, rm}; run_len = 1;
    end
  end

  task automatic fail(string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  // find the first run with pins v at or after index k; return its index
  function automatic int find_run(int k, logic [3:0] v);
    for (int i = k; i < runs_v.size(); i++) if (runs_v[i] == v) return i;
    return -1;
  endfunction

  task automatic avoid_test(logic [1:0] s, logic [3:0] turn_pins, string name);
    int i0, is, it;
    runs_v.delete(); runs_l.delete();
    sensor <= s;
    // hold the obstacle until the robot has stopped
    do @(posedge clk); while ({lm, rm} != 4'b00_00);
    sensor <= 2'b00;
    repeat (STP + TRN + 2 * FWD + 8) @(posedge clk);
    // stop run followed directly by the turn run, then forward again
    is = find_run(0, 4'b00_00);
    checks++;
    if (is < 0) begin fail({name, ": no stop"}); return; end
    checks++;
    if (runs_l[is] != STP) fail($sformatf("%s: stop lasted %0d", name, runs_l[is]));
    it = is + 1;
    checks++;
    if (it >= runs_v.size() || runs_v[it] != turn_pins) fail({name, ": wrong turn"});
    else begin
      // the turn includes the clock in which the sensors are looked at again
      checks++;
      if (runs_l[it] != TRN + 1) fail($sformatf("%s: turn lasted %0d", name, runs_l[it]));
      checks++;
      if ((it + 1 < runs_v.size()) ? (runs_v[it + 1] != 4'b01_01) : (run_val != 4'b01_01)) fail({name, ": no forward after turn"});
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run_val = 4'b0000; run_len = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // free path: forward only
    repeat (10 * FWD) @(posedge clk);
    checks++;
    if ({lm, rm} != 4'b01_01 || move != MOVE_FORWARD) fail("not forward on free path");
    checks++;
    if (find_run(1, 4'b00_00) >= 0) fail("stopped on free path");
    avoid_test(2'b01, 4'b01_10, "left sensor");
    avoid_test(2'b10, 4'b10_01, "right sensor");
    avoid_test(2'b11, 4'b10_01, "both sensors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
