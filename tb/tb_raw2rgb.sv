// tb_raw2rgb: streams random Bayer frames (with idle gaps between pixels)
// through the converter and compares every colour pixel with the 2x2 quad
// it comes from: R and B taken directly, G the mean of the two greens.
// A W x H raw frame must yield exactly (W/2) x (H/2) pixels in raster order.
module tb_raw2rgb;
  localparam int W = 16, H = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [3:0] in_x = 0;
  logic [2:0] in_y = 0;
  logic [11:0] in_data = 0;
  logic out_valid;
  logic [2:0] out_x;
  logic [1:0] out_y;
  logic [11:0] out_r, out_g, out_b;
  logic [11:0] raw [H][W];
  int checks = 0, failures = 0, nout = 0, exp_k = 0;

  raw2rgb #(.RAW_W(W), .RAW_H(H), .XW(4), .YW(3)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid) begin
    int qx, qy; logic [11:0] er, eg, eb;
    qx = exp_k % (W / 2); qy = (exp_k / (W / 2)) % (H / 2);
    er = raw[2*qy][2*qx+1];
    eb = raw[2*qy+1][2*qx];
    eg = 12'((int'(raw[2*qy][2*qx]) + int'(raw[2*qy+1][2*qx+1])) / 2);
    checks++; nout++; exp_k++;
    if (int'(out_x) != qx || int'(out_y) != qy || out_r != er || out_g != eg || out_b != eb) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d,%0d) got %h %h %h exp (%0d,%0d) %h %h %h",
                                   out_x, out_y, out_r, out_g, out_b, qx, qy, er, eg, eb);
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 3; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) raw[y][x] = 12'($urandom);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          in_valid <= 1; in_x <= 4'(x); in_y <= 3'(y); in_data <= raw[y][x];
          @(posedge clk);
          if ($urandom_range(3) == 0) begin in_valid <= 0; @(posedge clk); end
        end
        in_valid <= 0; repeat (3) @(posedge clk);
      end
      repeat (3) @(posedge clk);
    end
    checks++;
    if (nout != 3 * (W / 2) * (H / 2)) begin failures++; $display("FAIL count %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
