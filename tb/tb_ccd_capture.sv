// tb_ccd_capture: drives camera frames with line and frame blanking on a
// small raw size. The first frame is already running when reset is
// released and must be skipped; the following frames must come out pixel
// by pixel with the right data and column/row numbers, one frame_start per
// frame and the frame counter stepping.
module tb_ccd_capture;
  localparam int W = 12, H = 5;
  logic clk = 0, rst_n = 0;
  logic fval = 0, lval = 0;
  logic [11:0] data = 0;
  logic out_valid;
  logic [11:0] out_data;
  logic [3:0] out_x;
  logic [2:0] out_y;
  logic frame_start;
  logic [15:0] frame_count;
  int checks = 0, failures = 0;
  int exp_idx, got_pix, starts;
  logic [11:0] exp_q[$];
  int exp_x[$], exp_y[$];

  ccd_capture #(.RAW_W(W), .RAW_H(H), .XW(4), .YW(3)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [11:0] pixval(int f, int x, int y);
    return 12'((f * 1031 + y * 97 + x * 13) ^ 12'h5A5);
  endfunction

  task automatic send_frame(int f, bit expect_out, int start_line);
    fval <= 1;
    repeat (3) @(posedge clk);
    for (int y = start_line; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        lval <= 1; data <= pixval(f, x, y);
        if (expect_out) begin exp_q.push_back(pixval(f, x, y)); exp_x.push_back(x); exp_y.push_back(y); end
        @(posedge clk);
      end
      lval <= 0; data <= 12'hFFF;
      repeat (4) @(posedge clk);
    end
    fval <= 0;
    repeat (6) @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (frame_start) starts++;
    if (out_valid) begin
      checks++;
      got_pix++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected pixel %h at (%0d,%0d)", out_data, out_x, out_y);
      end else begin
        logic [11:0] e; int ex, ey;
        e = exp_q.pop_front(); ex = exp_x.pop_front(); ey = exp_y.pop_front();
        if (out_data != e || int'(out_x) != ex || int'(out_y) != ey) begin
          failures++;
          if (failures < 10) $display("FAIL got %h (%0d,%0d) exp %h (%0d,%0d)", out_data, out_x, out_y, e, ex, ey);
        end
      end
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
    starts = 0; got_pix = 0;
    // frame 0 is in progress when reset is released: must be ignored
    fval = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int y = 2; y < H; y++) begin
      for (int x = 0; x < W; x++) begin lval <= 1; data <= pixval(0, x, y); @(posedge clk); end
      lval <= 0; repeat (4) @(posedge clk);
    end
    fval <= 0; repeat (6) @(posedge clk);
    for (int f = 1; f <= 3; f++) send_frame(f, 1, 0);
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || got_pix != 3 * W * H) begin failures++; $display("FAIL pixel count %0d", got_pix); end
    checks++;
    if (starts != 3 || frame_count != 3) begin failures++; $display("FAIL frames %0d count %0d", starts, frame_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
