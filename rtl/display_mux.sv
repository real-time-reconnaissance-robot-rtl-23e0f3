// display_mux: chooses what the monitor shows.
//
// Three modes: the colour camera image, its gray-scale version, or the Sobel
// edge map. Colour and gray come from the stored pixel word and are widened
// to the 10-bit DAC inputs by repeating their top bits. In edge mode an
// edge pixel is drawn black and the rest white, so edges appear as dark
// lines on a light background; pixels on the frame border, which have no
// Sobel result, are drawn as non-edge. Purely combinational.
// The three modes follow the document; the mode encoding, bit widening and
// black-on-white drawing are this design's choices.
module display_mux
  import robot_pkg::*;
(
  input  disp_mode_e  mode,
  input  pixel_t      pix,
  input  logic        edge_bit,
  input  logic        border,
  output logic [9:0]  r,
  output logic [9:0]  g,
  output logic [9:0]  b
);

  always_comb begin
    unique case (mode)
      DISP_RGB: begin
        r = {pix.r, pix.r};
        g = {pix.g, pix.g[5:2]};
        b = {pix.b, pix.b};
      end
      DISP_GRAY: begin
        r = {pix.gray, pix.gray[7:6]};
        g = r;
        b = r;
      end
      default: begin   // DISP_EDGE, DISP_EDGE2
        r = (edge_bit && !border) ? 10'h000 : 10'h3FF;
        g = r;
        b = r;
      end
    endcase
  end

endmodule
