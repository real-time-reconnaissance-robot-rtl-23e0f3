// rgb2gray: colour to gray-level conversion, one pixel per clock.
//
// gray = (R + 2G + B) / 4 on the 12-bit components, the top 8 bits of which
// are the output gray level; the colour is also passed on reduced to 5/6/5
// bits for the frame buffer. The weights 1/4, 1/2, 1/4 approximate the usual
// luminance weights with shifts only; the document names the conversion but
// not its weights, so they are this design's choice. Pixel coordinates travel
// with the data. Latency: one clock (registered outputs).
module rgb2gray
  import robot_pkg::*;
#(
  parameter int unsigned XW = 10,
  parameter int unsigned YW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  input  logic [11:0]   in_r,
  input  logic [11:0]   in_g,
  input  logic [11:0]   in_b,
  output logic          out_valid,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output pixel_t        out_pix
);

  logic [13:0] sum;
  assign sum = {2'b00, in_r} + {1'b0, in_g, 1'b0} + {2'b00, in_b};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_x        <= in_x;
        out_y        <= in_y;
        out_pix.r    <= in_r[11:7];
        out_pix.g    <= in_g[11:6];
        out_pix.b    <= in_b[11:7];
        out_pix.gray <= sum[13:6];
      end
    end
  end

endmodule
