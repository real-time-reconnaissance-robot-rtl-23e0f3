// tb_robot_pkg: checks the shared motor encoding and pixel word layout.
// Every manoeuvre is mapped to L293D input pairs and compared with the
// truth table (01 clockwise, 10 anti-clockwise, 00 stop); the pixel struct
// is checked for its packing order.
module tb_robot_pkg;
  import robot_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    pixel_t p;
    check(move_to_motors(MOVE_FORWARD), 4'b01_01, "forward");
    check(move_to_motors(MOVE_LEFT),    4'b10_01, "left");
    check(move_to_motors(MOVE_RIGHT),   4'b01_10, "right");
    check(move_to_motors(MOVE_STOP),    4'b00_00, "stop");
    p = '{r: 5'h1F, g: 6'h00, b: 5'h00, gray: 8'h5A};
    checks++;
    if ($bits(p) != 24 || p[23:19] != 5'h1F || p[7:0] != 8'h5A) begin
      failures++;
      $display("FAIL pixel_t layout %h", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
