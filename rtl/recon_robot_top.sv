// recon_robot_top: FPGA design of the camera-carrying reconnaissance robot.
//
// Two independent parts share the chip.
// Video: the camera's Bayer pixels are captured on its own pixel clock,
// turned into RGB (one colour pixel per 2x2 quad, RAW_W x RAW_H raw ->
// IMG_W x IMG_H colour) and into a gray level, and sent with their
// coordinates through a dual-clock FIFO to the video clock domain. There
// every pixel is written into the frame buffer (colour + gray) and fed to
// the Sobel detector, whose 1-bit results go into the edge map kept in an
// external 16-bit SRAM, 16 pixels per word. The VGA
// controller reads both stores in raster order and shows the colour image,
// the gray image or the edge map, as disp_mode selects; edge_thresh is the
// Sobel threshold. disp_mode and edge_thresh are meant for slide switches
// and are used directly in the video domain.
// Motors: the obstacle controller reads the two sensors and drives the
// L293D inputs of the left and right motors.
// Clocks: pix_clk (camera), clk_vga (VGA pixel clock, 25.175 MHz for the
// default timing, made by a PLL outside this module), clk_ctrl (motor
// controller, 50 MHz for its default delays). rst_n is asynchronous and is
// released per domain through a reset synchronizer.
// The chain of steps follows the document's image flow. The edge map is in
// the SRAM as on the board; the colour/gray frame buffer is an on-chip
// memory here, where the board uses its SDRAM. IMG_W must be a multiple
// of 16.
module recon_robot_top
  import robot_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480,
  parameter int unsigned RAW_W = 2 * IMG_W,
  parameter int unsigned RAW_H = 2 * IMG_H,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned SRAM_AW = 18,
  parameter int unsigned FWD_CYCLES  = 5_000_000,
  parameter int unsigned STOP_CYCLES = 25_000_000,
  parameter int unsigned TURN_CYCLES = 25_000_000
) (
  input  logic              pix_clk,
  input  logic              clk_vga,
  input  logic              clk_ctrl,
  input  logic              rst_n,
  // camera (GPIO_1)
  input  logic              ccd_fval,
  input  logic              ccd_lval,
  input  logic [11:0]       ccd_data,
  // switches
  input  logic [1:0]        disp_mode,
  input  logic [GRAD_W-1:0] edge_thresh,
  // sensors and motor driver (GPIO_0)
  input  logic [1:0]        sensor,
  output logic [1:0]        lm,
  output logic [1:0]        rm,
  // VGA
  output logic [9:0]        vga_r,
  output logic [9:0]        vga_g,
  output logic [9:0]        vga_b,
  output logic              vga_hs,
  output logic              vga_vs,
  output logic              vga_blank_n,
  output logic              vga_frame_done,
  // SRAM holding the edge map (bidirectional pad outside this module)
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [15:0]       sram_dq_o,
  input  logic [15:0]       sram_dq_i,
  output logic              sram_dq_oe,
  output logic              sram_ce_n,
  output logic              sram_oe_n,
  output logic              sram_we_n,
  output logic              sram_ub_n,
  output logic              sram_lb_n,
  // status
  output logic              fifo_overflow,
  output logic [15:0]       cam_frames,     // camera frames captured
  output move_e             robot_move      // manoeuvre under way
);

  localparam int unsigned XW   = $clog2(IMG_W);
  localparam int unsigned YW   = $clog2(IMG_H);
  localparam int unsigned RXW  = XW + 1;
  localparam int unsigned RYW  = YW + 1;
  localparam int unsigned NPIX = IMG_W * IMG_H;
  localparam int unsigned AW   = $clog2(NPIX);
  localparam int unsigned FW   = XW + YW + $bits(pixel_t);

  logic rst_pix_n, rst_vga_n, rst_ctrl_n;

  reset_sync u_rs_pix  (.clk(pix_clk),  .rst_n_in(rst_n), .rst_n_out(rst_pix_n));
  reset_sync u_rs_vga  (.clk(clk_vga),  .rst_n_in(rst_n), .rst_n_out(rst_vga_n));
  reset_sync u_rs_ctrl (.clk(clk_ctrl), .rst_n_in(rst_n), .rst_n_out(rst_ctrl_n));

  // ------------------------------------------------------------------ camera domain
  logic           cap_valid;
  logic [11:0]    cap_data;
  logic [RXW-1:0] cap_x;
  logic [RYW-1:0] cap_y;
  logic           cap_fs;

  ccd_capture #(.RAW_W(RAW_W), .RAW_H(RAW_H), .XW(RXW), .YW(RYW)) u_capture (
    .clk(pix_clk), .rst_n(rst_pix_n),
    .fval(ccd_fval), .lval(ccd_lval), .data(ccd_data),
    .out_valid(cap_valid), .out_data(cap_data), .out_x(cap_x), .out_y(cap_y),
    .frame_start(cap_fs), .frame_count(cam_frames)
  );

  logic          rgb_valid;
  logic [XW-1:0] rgb_x;
  logic [YW-1:0] rgb_y;
  logic [11:0]   rgb_r, rgb_g, rgb_b;

  raw2rgb #(.RAW_W(RAW_W), .RAW_H(RAW_H), .XW(RXW), .YW(RYW)) u_raw2rgb (
    .clk(pix_clk), .rst_n(rst_pix_n),
    .in_valid(cap_valid), .in_x(cap_x), .in_y(cap_y), .in_data(cap_data),
    .out_valid(rgb_valid), .out_x(rgb_x), .out_y(rgb_y),
    .out_r(rgb_r), .out_g(rgb_g), .out_b(rgb_b)
  );

  logic          gray_valid;
  logic [XW-1:0] gray_x;
  logic [YW-1:0] gray_y;
  pixel_t        gray_pix;

  rgb2gray #(.XW(XW), .YW(YW)) u_rgb2gray (
    .clk(pix_clk), .rst_n(rst_pix_n),
    .in_valid(rgb_valid), .in_x(rgb_x), .in_y(rgb_y),
    .in_r(rgb_r), .in_g(rgb_g), .in_b(rgb_b),
    .out_valid(gray_valid), .out_x(gray_x), .out_y(gray_y), .out_pix(gray_pix)
  );

  // ------------------------------------------------------------------ clock crossing
  logic          fifo_full, fifo_empty;
  logic [FW-1:0] fifo_rd;

  async_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wr_clk(pix_clk), .wr_rst_n(rst_pix_n),
    .wr_en(gray_valid), .wr_data({gray_x, gray_y, gray_pix}),
    .full(fifo_full), .overflow(fifo_overflow),
    .rd_clk(clk_vga), .rd_rst_n(rst_vga_n),
    .rd_en(1'b1), .rd_data(fifo_rd), .empty(fifo_empty)
  );

  // ------------------------------------------------------------------ video domain
  logic          px_valid;
  logic [XW-1:0] px_x;
  logic [YW-1:0] px_y;
  pixel_t        px_pix;

  assign px_valid = !fifo_empty;
  assign {px_x, px_y, px_pix} = fifo_rd;

  logic          sob_valid, sob_edge;
  logic [XW-1:0] sob_x;
  logic [YW-1:0] sob_y;
  logic [GRAD_W-1:0] sob_mag;
  edge_dir_e     sob_dir;

  sobel_edge #(.WIDTH(IMG_W), .HEIGHT(IMG_H), .XW(XW), .YW(YW)) u_sobel (
    .clk(clk_vga), .rst_n(rst_vga_n),
    .in_valid(px_valid), .in_x(px_x), .in_y(px_y), .in_gray(px_pix.gray),
    .thresh(edge_thresh),
    .out_valid(sob_valid), .out_x(sob_x), .out_y(sob_y),
    .out_mag(sob_mag), .out_edge(sob_edge), .out_dir(sob_dir)
  );

  // VGA request position
  localparam int unsigned VXW = $clog2(IMG_W + 16 + 96 + 48);
  localparam int unsigned VYW = $clog2(IMG_H + 10 + 2 + 33);
  logic           req_valid;
  logic [VXW-1:0] req_x;
  logic [VYW-1:0] req_y;
  logic [AW-1:0]  rd_addr;
  pixel_t         fb_rd;
  logic           em_rd;
  logic           border_q;
  logic [9:0]     mux_r, mux_g, mux_b;

  assign rd_addr = AW'(req_y) * AW'(IMG_W) + AW'(req_x);

  frame_ram #(.DATA_W($bits(pixel_t)), .DEPTH(NPIX)) u_frame_buf (
    .clk(clk_vga),
    .we(px_valid), .wr_addr(AW'(px_y) * AW'(IMG_W) + AW'(px_x)), .wr_data(px_pix),
    .rd_addr(rd_addr), .rd_data(fb_rd)
  );

  sram_edge_store #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .SRAM_AW(SRAM_AW), .XW(XW), .YW(YW), .RXW(VXW), .RYW(VYW)
  ) u_edge_map (
    .clk(clk_vga), .rst_n(rst_vga_n),
    .wr_valid(sob_valid), .wr_x(sob_x), .wr_y(sob_y), .wr_edge(sob_edge),
    .rd_req(req_valid), .rd_x(req_x), .rd_y(req_y), .rd_edge(em_rd),
    .sram_addr(sram_addr), .sram_dq_o(sram_dq_o), .sram_dq_i(sram_dq_i), .sram_dq_oe(sram_dq_oe),
    .sram_ce_n(sram_ce_n), .sram_oe_n(sram_oe_n), .sram_we_n(sram_we_n),
    .sram_ub_n(sram_ub_n), .sram_lb_n(sram_lb_n)
  );

  always_ff @(posedge clk_vga or negedge rst_vga_n) begin
    if (!rst_vga_n) border_q <= 1'b1;
    else border_q <= (req_x == '0) || (req_x == VXW'(IMG_W - 1)) ||
                     (req_y == '0) || (req_y == VYW'(IMG_H - 1));
  end

  display_mux u_mux (
    .mode(disp_mode_e'(disp_mode)), .pix(fb_rd), .edge_bit(em_rd), .border(border_q),
    .r(mux_r), .g(mux_g), .b(mux_b)
  );

  vga_controller #(.H_ACTIVE(IMG_W), .V_ACTIVE(IMG_H), .XW(VXW), .YW(VYW)) u_vga (
    .clk(clk_vga), .rst_n(rst_vga_n),
    .req_valid(req_valid), .req_x(req_x), .req_y(req_y),
    .pix_r(mux_r), .pix_g(mux_g), .pix_b(mux_b),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b),
    .vga_hs(vga_hs), .vga_vs(vga_vs), .vga_blank_n(vga_blank_n),
    .frame_done(vga_frame_done)
  );

  // ------------------------------------------------------------------ motors
  obstacle_avoider #(
    .FWD_CYCLES(FWD_CYCLES), .STOP_CYCLES(STOP_CYCLES), .TURN_CYCLES(TURN_CYCLES)
  ) u_motors (
    .clk(clk_ctrl), .rst_n(rst_ctrl_n), .sensor(sensor), .lm(lm), .rm(rm), .move(robot_move)
  );

endmodule
