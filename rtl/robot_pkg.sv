// robot_pkg: types and constants shared by the reconnaissance-robot design.
//
// Motor commands follow the L293D input truth table: input pair 01 turns a
// motor clockwise, 10 anti-clockwise, 00 and 11 stop it. Which rotation
// moves the robot forward depends on how the motors are mounted; this design
// takes clockwise on both sides as "forward" (its own choice).
// The display modes select what the VGA monitor shows: the colour camera
// image, its gray-scale version or the Sobel edge map.
// The stored pixel word packs RGB565 next to the 8-bit gray level so one
// frame buffer serves all three display modes (a choice of this design).
package robot_pkg;

  // L293D input pair for one motor
  typedef enum logic [1:0] {
    MOTOR_STOP  = 2'b00,
    MOTOR_CW    = 2'b01,
    MOTOR_CCW   = 2'b10,
    MOTOR_BRAKE = 2'b11   // also stops the motor
  } motor_cmd_e;

  // robot manoeuvre chosen by the obstacle controller
  typedef enum logic [1:0] {
    MOVE_STOP    = 2'd0,
    MOVE_FORWARD = 2'd1,
    MOVE_LEFT    = 2'd2,
    MOVE_RIGHT   = 2'd3
  } move_e;

  // what the monitor shows
  typedef enum logic [1:0] {
    DISP_RGB  = 2'd0,
    DISP_GRAY = 2'd1,
    DISP_EDGE = 2'd2,
    DISP_EDGE2 = 2'd3   // same as DISP_EDGE
  } disp_mode_e;

  // one stored pixel: colour reduced to 5/6/5 bits and the gray level
  typedef struct packed {
    logic [4:0] r;
    logic [5:0] g;
    logic [4:0] b;
    logic [7:0] gray;
  } pixel_t;

  // gradient direction in eight compass headings, counter-clockwise from
  // east in 45 degree steps; east = brighter to the right, north = brighter
  // above (rows numbered downwards)
  typedef enum logic [2:0] {
    DIR_E = 3'd0, DIR_NE = 3'd1, DIR_N = 3'd2, DIR_NW = 3'd3,
    DIR_W = 3'd4, DIR_SW = 3'd5, DIR_S = 3'd6, DIR_SE = 3'd7
  } edge_dir_e;

  // width of the gradient |Gx|+|Gy| of 8-bit pixels: at most 4*255*2 = 2040
  localparam int unsigned GRAD_W = 11;

  // left/right motor inputs for a manoeuvre (pivot turns: one side backwards)
  function automatic logic [3:0] move_to_motors(move_e mv);
    // returns {left[1:0], right[1:0]}
    case (mv)
      MOVE_FORWARD: return {MOTOR_CW,   MOTOR_CW};
      MOVE_LEFT:    return {MOTOR_CCW,  MOTOR_CW};
      MOVE_RIGHT:   return {MOTOR_CW,   MOTOR_CCW};
      default:      return {MOTOR_STOP, MOTOR_STOP};
    endcase
  endfunction

endpackage
