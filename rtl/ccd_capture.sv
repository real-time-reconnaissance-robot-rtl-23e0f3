// ccd_capture: samples the raw pixel bus of the TRDB-D5M camera.
//
// The camera drives a 12-bit Bayer pixel with frame-valid (FVAL) and
// line-valid (LVAL) on its pixel clock. A pixel is taken on every clock where
// both are high, while a frame is being captured. The block numbers the
// pixels: column x counts within a line and restarts when LVAL falls, row y
// counts lines and restarts at a new frame. A frame is captured only if FVAL
// was seen low first, so capture starts on a whole frame after reset. All
// outputs are registered: a pixel sampled at clock edge n appears with its
// coordinates after that edge and stays one cycle (out_valid).
// The document only names the camera input; the counting scheme and the
// whole-frame start are this design's choices.
module ccd_capture #(
  parameter int unsigned RAW_W = 1280,   // pixels per raw line
  parameter int unsigned RAW_H = 960,    // raw lines per frame
  parameter int unsigned XW = $clog2(RAW_W),
  parameter int unsigned YW = $clog2(RAW_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fval,
  input  logic          lval,
  input  logic [11:0]   data,
  output logic          out_valid,
  output logic [11:0]   out_data,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output logic          frame_start,   // one pulse with the first pixel of a frame
  output logic [15:0]   frame_count    // frames started since reset
);

  logic          fval_d, lval_d;
  logic          armed;                // FVAL was low: next frame is whole
  logic          in_frame;
  logic [XW-1:0] x_cnt;
  logic [YW-1:0] y_cnt;
  logic          first_pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fval_d      <= 1'b0;
      lval_d      <= 1'b0;
      armed       <= 1'b0;
      in_frame    <= 1'b0;
      x_cnt       <= '0;
      y_cnt       <= '0;
      first_pix   <= 1'b0;
      out_valid   <= 1'b0;
      out_data    <= '0;
      out_x       <= '0;
      out_y       <= '0;
      frame_start <= 1'b0;
      frame_count <= '0;
    end else begin
      fval_d      <= fval;
      lval_d      <= lval;
      out_valid   <= 1'b0;
      frame_start <= 1'b0;
      if (!fval) armed <= 1'b1;
      // frame begins
      if (fval && !fval_d && armed) begin
        in_frame  <= 1'b1;
        y_cnt     <= '0;
        x_cnt     <= '0;
        first_pix <= 1'b1;
      end else if (!fval) begin
        in_frame <= 1'b0;
      end
      if (in_frame && fval && lval) begin
        out_valid   <= 1'b1;
        out_data    <= data;
        out_x       <= x_cnt;
        out_y       <= y_cnt;
        x_cnt       <= x_cnt + 1'b1;
        first_pix   <= 1'b0;
        if (first_pix) begin
          frame_start <= 1'b1;
          frame_count <= frame_count + 1'b1;
        end
      end
      // end of a line inside the frame
      if (in_frame && lval_d && !lval) begin
        x_cnt <= '0;
        y_cnt <= y_cnt + 1'b1;
      end
    end
  end

endmodule
