// sobel_edge: streaming Sobel edge detector on a gray-level raster.
//
// Pixels arrive in raster order with their coordinates, at most one per
// clock. Two line buffers hold the two rows above the current one; together
// with the incoming pixel they give one new 3x3 column per pixel, and a
// 3x3 window of registers slides along the row. With rows numbered down and
// the window centred on column c, row r:
//   Gx = (G[c+1,r-1] + 2 G[c+1,r] + G[c+1,r+1]) - (G[c-1,r-1] + 2 G[c-1,r] + G[c-1,r+1])
//   Gy = (G[c-1,r-1] + 2 G[c,r-1] + G[c+1,r-1]) - (G[c-1,r+1] + 2 G[c,r+1] + G[c+1,r+1])
// The gradient magnitude is taken as |Gx| + |Gy| and the pixel is an edge
// (1) when that sum is strictly greater than the threshold, else 0. Border
// pixels have no full neighbourhood and get no result, so a WIDTH x HEIGHT
// frame yields (WIDTH-2) x (HEIGHT-2) results; the display treats the
// border as non-edge.
// The detector also gives the gradient's heading in eight compass
// directions (out_dir, robot_pkg::edge_dir_e): horizontal when
// |Gy| < tan(22.5 deg)|Gx|, vertical when |Gx| < tan(22.5 deg)|Gy|,
// diagonal otherwise, the signs of Gx and Gy choosing the side; tan(22.5 deg)
// is taken as 1697/4096. A zero gradient reports east.
// The kernels, the sum-of-magnitudes, the eight headings and the threshold test follow the
// document; the line-buffer structure and the sum |Gx|+|Gy| in place of
// the square root are the usual hardware form.
// The display uses only the edge bit; out_dir is there for logic that
// needs the heading.
// Timing: the result for centre (x-1, y-1) appears one clock after pixel
// (x, y) is accepted, with out_valid high for that one clock.
module sobel_edge
  import robot_pkg::*;
#(
  parameter int unsigned WIDTH  = 640,
  parameter int unsigned HEIGHT = 480,
  parameter int unsigned XW = $clog2(WIDTH),
  parameter int unsigned YW = $clog2(HEIGHT)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [XW-1:0]     in_x,
  input  logic [YW-1:0]     in_y,
  input  logic [7:0]        in_gray,
  input  logic [GRAD_W-1:0] thresh,
  output logic              out_valid,
  output logic [XW-1:0]     out_x,
  output logic [YW-1:0]     out_y,
  output logic [GRAD_W-1:0] out_mag,
  output logic              out_edge,
  output edge_dir_e         out_dir
);

  logic [7:0] lb_prev  [WIDTH];   // row y-1
  logic [7:0] lb_prev2 [WIDTH];   // row y-2

  // window: w_t* top row (y-2), w_m* middle (y-1), w_b* bottom (y);
  // *0 column x-2, *1 column x-1 (registers); column x is the new column
  logic [7:0] w_t0, w_t1, w_m0, w_m1, w_b0, w_b1;
  logic [7:0] n_t, n_m, n_b;

  assign n_t = lb_prev2[in_x];
  assign n_m = lb_prev[in_x];
  assign n_b = in_gray;

  logic signed [11:0] gx, gy;
  logic        [10:0] ax, ay;
  logic [GRAD_W-1:0]  mag;
  edge_dir_e          dir;
  logic [22:0]        ax_s, ay_s, ax_t, ay_t;   // |G| * 4096 and |G| * 1697

  always_comb begin
    gx = (12'sd0 + $signed({4'b0, n_t}) + $signed({3'b0, n_m, 1'b0}) + $signed({4'b0, n_b}))
       - ($signed({4'b0, w_t0}) + $signed({3'b0, w_m0, 1'b0}) + $signed({4'b0, w_b0}));
    gy = (12'sd0 + $signed({4'b0, w_t0}) + $signed({3'b0, w_t1, 1'b0}) + $signed({4'b0, n_t}))
       - ($signed({4'b0, w_b0}) + $signed({3'b0, w_b1, 1'b0}) + $signed({4'b0, n_b}));
    ax  = gx[11] ? 11'(-gx) : gx[10:0];
    ay  = gy[11] ? 11'(-gy) : gy[10:0];
    mag = ax + ay;
    ax_s = {ax, 12'b0};
    ay_s = {ay, 12'b0};
    ax_t = 23'(ax) * 23'd1697;
    ay_t = 23'(ay) * 23'd1697;
    if (ay_s < ax_t)      dir = gx[11] ? DIR_W : DIR_E;        // mostly horizontal
    else if (ax_s < ay_t) dir = gy[11] ? DIR_S : DIR_N;        // mostly vertical
    else if (!gx[11])     dir = gy[11] ? DIR_SE : DIR_NE;
    else                  dir = gy[11] ? DIR_SW : DIR_NW;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb_prev2[in_x] <= lb_prev[in_x];
      lb_prev[in_x]  <= in_gray;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {w_t0, w_t1, w_m0, w_m1, w_b0, w_b1} <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_mag   <= '0;
      out_edge  <= 1'b0;
      out_dir   <= DIR_E;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        w_t0 <= w_t1;  w_t1 <= n_t;
        w_m0 <= w_m1;  w_m1 <= n_m;
        w_b0 <= w_b1;  w_b1 <= n_b;
        if (in_x >= XW'(2) && in_y >= YW'(2)) begin
          out_valid <= 1'b1;
          out_x     <= in_x - 1'b1;
          out_y     <= in_y - 1'b1;
          out_mag   <= mag;
          out_edge  <= (mag > thresh);
          out_dir   <= dir;
        end
      end
    end
  end

endmodule
