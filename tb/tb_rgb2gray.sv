// tb_rgb2gray: random colour pixels through the gray converter; the gray
// level must be (R + 2G + B) / 4 reduced to 8 bits, the colour truncated to
// 5/6/5 bits, coordinates passed through, all one clock later.
module tb_rgb2gray;
  import robot_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [9:0] in_x = 0;
  logic [8:0] in_y = 0;
  logic [11:0] in_r = 0, in_g = 0, in_b = 0;
  logic out_valid;
  logic [9:0] out_x;
  logic [8:0] out_y;
  pixel_t out_pix;
  int checks = 0, failures = 0;

  rgb2gray #(.XW(10), .YW(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned r, g, b, gy;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      r = $urandom_range(4095); g = $urandom_range(4095); b = $urandom_range(4095);
      if (i < 4) begin r = 4095; g = 4095; b = 4095; end
      in_valid = 1; in_r = 12'(r); in_g = 12'(g); in_b = 12'(b);
      in_x = 10'($urandom); in_y = 9'($urandom);
      @(negedge clk);
      in_valid = 0;
      gy = (r + 2 * g + b) / 4;
      checks++;
      if (!out_valid || out_pix.gray != 8'(gy >> 4) || out_pix.r != 5'(r >> 7) ||
          out_pix.g != 6'(g >> 6) || out_pix.b != 5'(b >> 7) || out_x != in_x || out_y != in_y) begin
        failures++;
        if (failures < 10)
          $display("FAIL r=%0d g=%0d b=%0d got gray=%0d exp %0d", r, g, b, out_pix.gray, gy >> 4);
      end
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
