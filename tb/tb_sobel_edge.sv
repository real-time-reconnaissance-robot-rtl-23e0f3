// tb_sobel_edge: streams random-block gray frames (with idle gaps) through
// the detector and compares every result with a reference computed here
// from the kernels
//   Gx = right column (1,2,1) - left column (1,2,1)
//   Gy = top row (1,2,1) - bottom row (1,2,1)
// magnitude |Gx| + |Gy|, edge = magnitude > threshold. Every interior pixel
// must get exactly one result, the border none: (W-2) x (H-2) per frame.
// The result must appear one clock after the pixel that completes its
// window. Frames use different thresholds, and both edge values must occur.
// The heading output is compared with the angle atan2(Gy, Gx) rounded to
// the nearest multiple of 45 degrees; each of the eight headings must occur.
module tb_sobel_edge;
  import robot_pkg::*;
  localparam int W = 12, H = 9;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [3:0] in_x = 0;
  logic [3:0] in_y = 0;
  logic [7:0] in_gray = 0;
  logic [GRAD_W-1:0] thresh = 0;
  logic out_valid, out_edge;
  logic [3:0] out_x, out_y;
  logic [GRAD_W-1:0] out_mag;
  edge_dir_e out_dir;
  int n_dir [8];
  int img [H][W];
  int checks = 0, failures = 0, nout = 0, n_edge = 0, n_flat = 0;
  bit expect_next;
  int exp_cx, exp_cy;

  sobel_edge #(.WIDTH(W), .HEIGHT(H), .XW(4), .YW(4)) dut (.*);

  always #5 clk = ~clk;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  always @(posedge clk) if (rst_n) begin
    // latency: a result follows the pixel completing its window by one clock
    checks++;
    if (out_valid != expect_next) begin
      failures++;
      if (failures < 10) $display("FAIL out_valid=%0d expected %0d", out_valid, expect_next);
    end
    if (out_valid) begin
      int c, r, gx, gy, m;
      c = out_x; r = out_y;
      gx = (img[r-1][c+1] + 2*img[r][c+1] + img[r+1][c+1]) - (img[r-1][c-1] + 2*img[r][c-1] + img[r+1][c-1]);
      gy = (img[r-1][c-1] + 2*img[r-1][c] + img[r-1][c+1]) - (img[r+1][c-1] + 2*img[r+1][c] + img[r+1][c+1]);
      m = iabs(gx) + iabs(gy);
      checks++; nout++;
      if (m > int'(thresh)) n_edge++; else n_flat++;
      // heading from the real angle, skipping ratios within 0.1 % of a sector boundary
      if (gx != 0 || gy != 0) begin
        real ang, ratio, t;
        int sec;
        ang = $atan2(real'(gy), real'(gx)) * 180.0 / 3.14159265358979;
        if (ang < 0) ang += 360.0;
        sec = int'($floor(ang / 45.0 + 0.5)) % 8;
        t = 0.41421356;
        ratio = (iabs(gx) == 0) ? 1.0e9 : real'(iabs(gy)) / real'(iabs(gx));
        if (!((ratio > t * 0.999 && ratio < t * 1.001) || (ratio > 0.999 / t && ratio < 1.001 / t))) begin
          checks++;
          n_dir[sec]++;
          if (int'(out_dir) != sec) begin
            failures++;
            if (failures < 10) $display("FAIL dir gx=%0d gy=%0d got %0d exp %0d", gx, gy, out_dir, sec);
          end
        end
      end
      if (int'(out_x) != exp_cx || int'(out_y) != exp_cy || int'(out_mag) != m || out_edge != (m > int'(thresh))) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) mag %0d edge %0d exp (%0d,%0d) %0d", out_x, out_y, out_mag, out_edge, exp_cx, exp_cy, m);
      end
    end
    expect_next = in_valid && in_x >= 2 && in_y >= 2;
    exp_cx = int'(in_x) - 1; exp_cy = int'(in_y) - 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_next = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 4; f++) begin
      // blocks of constant level plus noise, sometimes full-range extremes
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[y][x] = (f == 3) ? (((x / 2 + y / 2) % 2) ? 255 : 0)
                               : ((((x / 3) * 7 + (y / 3) * 5) % 4) * 60 + $urandom_range(6));
      thresh <= GRAD_W'(f == 3 ? 2039 : 100 * (f + 1));
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          in_valid <= 1; in_x <= 4'(x); in_y <= 4'(y); in_gray <= 8'(img[y][x]);
          @(posedge clk);
          if ($urandom_range(4) == 0) begin in_valid <= 0; @(posedge clk); end
        end
        in_valid <= 0; repeat (2) @(posedge clk);
      end
      repeat (3) @(posedge clk);
    end
    checks++;
    if (nout != 4 * (W - 2) * (H - 2)) begin failures++; $display("FAIL result count %0d", nout); end
    for (int d = 0; d < 8; d++) begin
      checks++;
      if (n_dir[d] == 0) begin failures++; $display("FAIL heading %0d never seen", d); end
    end
    checks++;
    if (n_edge == 0 || n_flat == 0) begin failures++; $display("FAIL edges %0d flats %0d", n_edge, n_flat); end
    $display("edges=%0d non-edges=%0d", n_edge, n_flat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
