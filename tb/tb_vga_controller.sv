// tb_vga_controller: runs the default 640x480 timing for two frames with a
// pixel source that answers each request one clock later with a colour
// computed from the requested position. Checks: line length 800 clocks,
// hsync low for 96 clocks, 525 lines per frame with vsync low for 2 lines,
// 640x480 active pixels per frame, every active pixel carrying the colour of
// its own position (two-clock request-to-output latency), black in blanking.
module tb_vga_controller;
  logic clk = 0, rst_n = 0;
  logic req_valid;
  logic [9:0] req_x, req_y;
  logic [9:0] pix_r = 0, pix_g = 0, pix_b = 0;
  logic [9:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, vga_blank_n, frame_done;
  int checks = 0, failures = 0;

  vga_controller dut (.*);

  always #20 clk = ~clk;

  // pixel source with one clock latency
  always @(posedge clk) begin
    pix_r <= req_x;
    pix_g <= req_y;
    pix_b <= req_x ^ req_y;
  end

  int cyc, last_hs_fall, hs_low, lines_in_frame, last_vs_fall_line, vs_low_lines;
  int act_x, act_y, act_count, frames, line_no;
  bit hs_q, vs_q, blank_q;

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s (cycle %0d)", s, cyc);
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // hsync
    if (hs_q && !vga_hs) begin
      if (last_hs_fall >= 0) begin checks++; if (cyc - last_hs_fall != 800) fail("line length"); end
      last_hs_fall = cyc; hs_low = 0; line_no++;
    end
    if (!vga_hs) hs_low++;
    if (!hs_q && vga_hs && last_hs_fall >= 0) begin checks++; if (hs_low != 96) fail("hsync width"); end
    // vsync
    if (vs_q && !vga_vs) begin
      if (last_vs_fall_line >= 0) begin checks++; if (line_no - last_vs_fall_line != 525) fail("frame lines"); end
      last_vs_fall_line = line_no;
    end
    if (!vs_q && vga_vs && last_vs_fall_line >= 0) begin
      checks++; if (line_no - last_vs_fall_line != 2) fail("vsync width");
    end
    // active video
    if (vga_blank_n) begin
      checks++;
      if (vga_r != 10'(act_x) || vga_g != 10'(act_y) || vga_b != 10'(act_x ^ act_y)) fail("pixel colour");
      act_x++; act_count++;
      if (act_x == 640) begin act_x = 0; act_y++; end
    end else begin
      if (vga_r != 0 || vga_g != 0 || vga_b != 0) begin checks++; fail("colour in blanking"); end
    end
    if (!vs_q && vga_vs) begin
      // end of vsync pulse: a frame's active area is complete
      if (act_count != 0) begin
        checks++;
        if (act_count != 640 * 480) fail("active pixels per frame");
        frames++;
      end
      act_count = 0; act_x = 0; act_y = 0;
    end
    hs_q = vga_hs; vs_q = vga_vs; blank_q = vga_blank_n;
  end

  initial begin
    repeat (3 * 420000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cyc = 0; last_hs_fall = -1; last_vs_fall_line = -1; line_no = 0;
    act_x = 0; act_y = 0; act_count = 0; frames = 0; hs_q = 1; vs_q = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (frames == 2);
    @(posedge clk);
    checks++;
    if (frames != 2) fail("frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
