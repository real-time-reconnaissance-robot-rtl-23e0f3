// vga_controller: 640x480 VGA timing generator with a pixel request port.
//
// Horizontal and vertical counters run over the whole frame, blanking
// included (800 x 525 clocks at the default timing, about 60 frames per
// second from a 25.175 MHz pixel clock). In each clock the controller asks
// for the pixel at its current position (req_valid, req_x, req_y); the
// pixel source must answer one clock later on pix_r/g/b. The answer is
// registered together with the sync and blank signals, which are delayed
// to match, so the VGA outputs lag the request by two clocks and stay
// aligned with each other. Sync pulses are active low, as the 640x480
// mode requires; outputs are black outside the active area.
// The document only names the VGA output and its PLL-derived clock; the
// standard 640x480 timing values are the defaults here.
module vga_controller #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned XW = $clog2(H_ACTIVE + H_FP + H_SYNC + H_BP),
  parameter int unsigned YW = $clog2(V_ACTIVE + V_FP + V_SYNC + V_BP)
) (
  input  logic          clk,
  input  logic          rst_n,
  // pixel request, answered one clock later
  output logic          req_valid,
  output logic [XW-1:0] req_x,
  output logic [YW-1:0] req_y,
  input  logic [9:0]    pix_r,
  input  logic [9:0]    pix_g,
  input  logic [9:0]    pix_b,
  // to the video DAC and connector
  output logic [9:0]    vga_r,
  output logic [9:0]    vga_g,
  output logic [9:0]    vga_b,
  output logic          vga_hs,
  output logic          vga_vs,
  output logic          vga_blank_n,
  output logic          frame_done     // one pulse after the last active pixel request
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [XW-1:0] h_cnt;
  logic [YW-1:0] v_cnt;
  logic          hs0, vs0, act0;
  logic          hs1, vs1, act1;

  assign act0      = (h_cnt < XW'(H_ACTIVE)) && (v_cnt < YW'(V_ACTIVE));
  assign hs0       = !((h_cnt >= XW'(H_ACTIVE + H_FP)) && (h_cnt < XW'(H_ACTIVE + H_FP + H_SYNC)));
  assign vs0       = !((v_cnt >= YW'(V_ACTIVE + V_FP)) && (v_cnt < YW'(V_ACTIVE + V_FP + V_SYNC)));
  assign req_valid = act0;
  assign req_x     = h_cnt;
  assign req_y     = v_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_cnt       <= '0;
      v_cnt       <= '0;
      {hs1, vs1, act1} <= 3'b110;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      vga_hs      <= 1'b1;
      vga_vs      <= 1'b1;
      vga_blank_n <= 1'b0;
      frame_done  <= 1'b0;
    end else begin
      // counters
      if (h_cnt == XW'(H_TOTAL - 1)) begin
        h_cnt <= '0;
        v_cnt <= (v_cnt == YW'(V_TOTAL - 1)) ? '0 : v_cnt + 1'b1;
      end else begin
        h_cnt <= h_cnt + 1'b1;
      end
      frame_done <= (h_cnt == XW'(H_ACTIVE - 1)) && (v_cnt == YW'(V_ACTIVE - 1));
      // stage 1: pixel source answers
      hs1  <= hs0;
      vs1  <= vs0;
      act1 <= act0;
      // stage 2: registered outputs
      vga_hs      <= hs1;
      vga_vs      <= vs1;
      vga_blank_n <= act1;
      vga_r       <= act1 ? pix_r : '0;
      vga_g       <= act1 ? pix_g : '0;
      vga_b       <= act1 ? pix_b : '0;
    end
  end

endmodule
