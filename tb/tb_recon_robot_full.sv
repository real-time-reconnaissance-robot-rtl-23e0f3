// tb_recon_robot_full: end-to-end test of the whole robot design at its
// default sizes (1280x960 raw camera frames, 640x480 display, motor delays
// of 0.1 s / 0.5 s / 0.5 s at 50 MHz).
//
// Video part: a synthetic Bayer scene (blocks of different brightness, so
// the Sobel detector finds both edges and flat areas) is sent as a camera
// frame with line and frame blanking; the edge map goes to a behavioural
// model of the board's 16-bit SRAM on a 50 MHz pixel clock while the VGA
// side runs at 25.2 MHz. After the frame, whole VGA frames are captured and
// every active pixel is compared with a reference computed here: 2x2 Bayer
// binning, gray = (R + 2G + B)/4, Sobel |Gx|+|Gy| > threshold, border drawn
// as non-edge, edge black on white. The colour, gray and edge display modes
// are each checked on one frame; a second camera frame with another
// threshold checks that the threshold changes the edge map.
// The top is instantiated with its default parameters.
// Motor part: with the video clocks stopped, the obstacle controller runs
// at 50 MHz: free path -> forward; SENSOR[0] -> stop 0.5 s then right turn
// 0.5 s; SENSOR[1] -> stop then left turn. Durations are checked in clocks.
// Each mechanism (three display modes, edge and non-edge pixels, border
// handling, two thresholds, forward / stop / left / right) is counted, and
// one that never happened counts as a failure.
module tb_recon_robot_full;
  import robot_pkg::*;
  localparam int W = 640, H = 480, RW = 1280, RH = 960;
  localparam int FWD = 5_000_000, STP = 25_000_000, TRN = 25_000_000;

  logic pix_clk = 0, clk_vga = 0, clk_ctrl = 0, rst_n = 0;
  bit   pix_en = 1, vga_en = 1, ctrl_en = 1;
  logic ccd_fval = 0, ccd_lval = 0;
  logic [11:0] ccd_data = 0;
  logic [1:0] disp_mode = 0;
  logic [GRAD_W-1:0] edge_thresh = 0;
  logic [1:0] sensor = 0;
  logic [1:0] lm, rm;
  logic [9:0] vga_r, vga_g, vga_b;
  logic vga_hs, vga_vs, vga_blank_n, vga_frame_done, fifo_overflow;
  logic [15:0] cam_frames;
  move_e robot_move;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;

  recon_robot_top dut (.*);

  sram_model #(.AW(18)) u_sram (
    .clk(clk_vga), .addr(sram_addr), .dq_i(sram_dq_o), .dq_o(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n)
  );

  always #10    if (pix_en)  pix_clk  = ~pix_clk;
  always #19.86 if (vga_en)  clk_vga  = ~clk_vga;
  always #10    if (ctrl_en) clk_ctrl = ~clk_ctrl;

  int checks = 0, failures = 0;
  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // scene block size in colour pixels
  localparam int BX = W / 16, BY = H / 16;

  // ------------------------------------------------------------ scene and reference
  function automatic int level(int qx, int qy, int variant);
    int blk;
    blk = ((qx / BX) ^ (qy / BY) ^ variant) & 3;
    // unequal steps between levels give a spread of gradient magnitudes
    case (blk)
      0: return 200;
      1: return 700;
      2: return 1700;
      default: return 3200;
    endcase
  endfunction

  function automatic logic [11:0] raw_pix(int x, int y, int variant);
    int qx, qy, base;
    qx = x / 2; qy = y / 2; base = level(qx, qy, variant);
    case ({y[0], x[0]})
      2'b00: return 12'(base + 100);                   // G1
      2'b01: return 12'(base + (qx % 7) * 3);          // R
      2'b10: return 12'(base + 50 + (qy % 5) * 4);     // B
      default: return 12'(base + 300 - (qy % 5) * 2);  // G2
    endcase
  endfunction

  int          gray_ref [H][W];
  logic [23:0] pix_ref  [H][W];
  int          mag_ref  [H][W];

  task automatic build_reference(int variant);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int r, g, b;
        r = raw_pix(2*x+1, 2*y, variant);
        g = (int'(raw_pix(2*x, 2*y, variant)) + int'(raw_pix(2*x+1, 2*y+1, variant))) / 2;
        b = raw_pix(2*x, 2*y+1, variant);
        gray_ref[y][x] = ((r + 2*g + b) / 4) >> 4;
        pix_ref[y][x]  = {5'(r >> 7), 6'(g >> 6), 5'(b >> 7), 8'(gray_ref[y][x])};
      end
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        int gx, gy;
        gx = (gray_ref[y-1][x+1] + 2*gray_ref[y][x+1] + gray_ref[y+1][x+1])
           - (gray_ref[y-1][x-1] + 2*gray_ref[y][x-1] + gray_ref[y+1][x-1]);
        gy = (gray_ref[y-1][x-1] + 2*gray_ref[y-1][x] + gray_ref[y-1][x+1])
           - (gray_ref[y+1][x-1] + 2*gray_ref[y+1][x] + gray_ref[y+1][x+1]);
        mag_ref[y][x] = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
      end
  endtask

  task automatic send_camera_frame(int variant);
    @(posedge pix_clk);
    ccd_fval <= 1;
    repeat (8) @(posedge pix_clk);
    for (int y = 0; y < RH; y++) begin
      for (int x = 0; x < RW; x++) begin
        ccd_lval <= 1; ccd_data <= raw_pix(x, y, variant);
        @(posedge pix_clk);
      end
      ccd_lval <= 0; ccd_data <= 12'h000;
      repeat (32) @(posedge pix_clk);
    end
    ccd_fval <= 0;
    repeat (200) @(posedge pix_clk);
  endtask

  // ------------------------------------------------------------ VGA monitor
  int  chk_mode;         // -1: do not check, else a disp_mode value
  int  k_pix;            // active pixel index in the frame
  int  frame_pixels;
  int  n_rgb, n_gray, n_edge_mode, n_edge_px, n_flat_px, n_border;
  int  edges_this_frame;

  always @(posedge clk_vga) if (rst_n) begin
    if (!vga_vs) begin
      if (k_pix > 0) frame_pixels = k_pix;
      k_pix = 0;
    end else if (vga_blank_n) begin
      if (chk_mode >= 0) begin
        int x, y;
        logic [9:0] er, eg, eb;
        logic [23:0] p;
        x = k_pix % W; y = k_pix / W;
        p = (y < H) ? pix_ref[y][x] : 24'h0;
        if (chk_mode == DISP_RGB) begin
          er = {p[23:19], p[23:19]}; eg = {p[18:13], p[18:15]}; eb = {p[12:8], p[12:8]};
          n_rgb++;
        end else if (chk_mode == DISP_GRAY) begin
          er = {p[7:0], p[7:6]}; eg = er; eb = er;
          n_gray++;
        end else begin
          bit border, e;
          border = (x == 0 || y == 0 || x == W - 1 || y == H - 1);
          e = !border && (y < H) && (mag_ref[y][x] > int'(edge_thresh));
          er = e ? 10'd0 : 10'd1023; eg = er; eb = er;
          n_edge_mode++;
          if (border) n_border++;
          else if (e) begin n_edge_px++; edges_this_frame++; end
          else n_flat_px++;
        end
        checks++;
        if (vga_r != er || vga_g != eg || vga_b != eb)
          fail($sformatf("mode %0d pixel (%0d,%0d) got %h/%h/%h exp %h/%h/%h",
                         chk_mode, x, y, vga_r, vga_g, vga_b, er, eg, eb));
      end
      k_pix++;
    end
  end

  // check one whole VGA frame in the given mode
  task automatic check_vga_frame(int mode);
    @(negedge vga_vs);
    disp_mode <= 2'(mode);
    chk_mode = mode;
    edges_this_frame = 0;
    @(posedge vga_vs);
    @(negedge vga_vs);
    chk_mode = -1;
    checks++;
    if (frame_pixels != W * H) fail($sformatf("frame had %0d active pixels", frame_pixels));
  endtask

  // ------------------------------------------------------------ motor monitor
  logic [3:0] run_val;
  longint     run_len;
  logic [3:0] runs_v[$];
  longint     runs_l[$];
  int n_fwd, n_stop, n_left, n_right;
  always @(posedge clk_ctrl) if (rst_n) begin
    if ({lm, rm} == run_val) run_len++;
    else begin
      runs_v.push_back(run_val); runs_l.push_back(run_len);
      run_val = {lm, rm}; run_len = 1;
    end
  end

  task automatic obstacle(logic [1:0] s, logic [3:0] turn_pins, string name);
    int is;
    runs_v.delete(); runs_l.delete();
    sensor <= s;
    do @(posedge clk_ctrl); while ({lm, rm} != 4'b00_00);
    sensor <= 2'b00;
    repeat (STP + TRN + FWD + 100) @(posedge clk_ctrl);
    is = -1;
    for (int i = 0; i < runs_v.size(); i++) if (runs_v[i] == 4'b00_00 && is < 0) is = i;
    checks++;
    if (is < 0 || is + 1 >= runs_v.size()) begin fail({name, ": no stop and turn"}); return; end
    n_stop++;
    checks++;
    if (runs_l[is] != STP) fail($sformatf("%s: stop lasted %0d clocks", name, runs_l[is]));
    checks++;
    if (runs_v[is + 1] != turn_pins) fail($sformatf("%s: turn pins %b", name, runs_v[is + 1]));
    else begin
      if (turn_pins == 4'b10_01) n_left++; else n_right++;
      checks++;
      if (runs_l[is + 1] != TRN + 1) fail($sformatf("%s: turn lasted %0d clocks", name, runs_l[is + 1]));
    end
    checks++;
    if ({lm, rm} != 4'b01_01) fail({name, ": not forward afterwards"});
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    #3_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ sequence
  int edges_t1, edges_t2;
  initial begin
    chk_mode = -1; k_pix = 0; frame_pixels = 0;
    n_rgb = 0; n_gray = 0; n_edge_mode = 0; n_edge_px = 0; n_flat_px = 0; n_border = 0;
    n_fwd = 0; n_stop = 0; n_left = 0; n_right = 0;
    run_val = 4'b0000; run_len = 0;
    repeat (5) @(posedge clk_vga);
    rst_n = 1;
    repeat (20) @(posedge pix_clk);

    // frame 1, threshold 200: colour, gray and edge display
    edge_thresh <= GRAD_W'(100);
    build_reference(0);
    send_camera_frame(0);
    checks++;
    if (cam_frames != 1) fail($sformatf("camera frames %0d", cam_frames));
    check_vga_frame(DISP_RGB);
    check_vga_frame(DISP_GRAY);
    check_vga_frame(DISP_EDGE);
    edges_t1 = edges_this_frame;

    // frame 2, another scene and a higher threshold
    edge_thresh <= GRAD_W'(240);
    build_reference(1);
    send_camera_frame(1);
    check_vga_frame(DISP_EDGE);
    edges_t2 = edges_this_frame;
    checks++;
    if (fifo_overflow) fail("pixels lost at the clock crossing");
    $display("mechanism counts: rgb_px=%0d gray_px=%0d edge_mode_px=%0d edge=%0d flat=%0d border=%0d edges@100=%0d edges@240=%0d",
             n_rgb, n_gray, n_edge_mode, n_edge_px, n_flat_px, n_border, edges_t1, edges_t2);

    // motors, video clocks stopped
    pix_en = 0; vga_en = 0;
    repeat (3 * FWD) @(posedge clk_ctrl);
    checks++;
    if ({lm, rm} == 4'b01_01 && robot_move == MOVE_FORWARD) n_fwd++;
    else fail("not moving forward on a free path");
    obstacle(2'b01, 4'b01_10, "SENSOR[0]");
    obstacle(2'b10, 4'b10_01, "SENSOR[1]");
    $display("mechanism counts: sram_writes=%0d sram_reads=%0d", u_sram.n_writes, u_sram.n_reads);
    $display("mechanism counts: forward=%0d stop=%0d left=%0d right=%0d", n_fwd, n_stop, n_left, n_right);

    // every mechanism must have happened
    checks++; if (n_rgb == 0)       fail("RGB mode never shown");
    checks++; if (n_gray == 0)      fail("gray mode never shown");
    checks++; if (n_edge_mode == 0) fail("edge mode never shown");
    checks++; if (n_edge_px == 0)   fail("no edge pixel");
    checks++; if (n_flat_px == 0)   fail("no non-edge pixel");
    checks++; if (n_border == 0)    fail("border never drawn");
    checks++; if (edges_t1 == edges_t2) fail("threshold change had no effect");
    checks++; if (u_sram.n_writes == 0 || u_sram.n_reads == 0) fail("edge map SRAM never written or read");
    checks++; if (n_fwd == 0 || n_stop == 0 || n_left == 0 || n_right == 0) fail("a manoeuvre never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
