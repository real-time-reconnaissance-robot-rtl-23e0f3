// raw2rgb: Bayer raw stream to RGB, one colour pixel per 2x2 Bayer quad.
//
// The camera delivers a Bayer mosaic, taken here as rows alternating
// G1 R G1 R ... (even rows) and B G2 B G2 ... (odd rows). Every 2x2 quad
// becomes one RGB pixel: R and B straight from the quad, G as the mean of the
// two greens. A RAW_W x RAW_H raw frame therefore gives a
// (RAW_W/2) x (RAW_H/2) colour frame, 1280x960 -> 640x480, the resolution the
// design displays. On even rows the (G1,R) pairs are written into a line
// buffer of RAW_W/2 entries; on the odd row the B pixel is held one cycle and
// the quad completes on the G2 pixel.
// Interface: in_valid/in_x/in_y/in_data from the capture block; out_valid
// pulses one clock after the G2 pixel with out_x = in_x/2, out_y = in_y/2.
// The document names this step only; the Bayer order, binning and line buffer
// are this design's choices.
module raw2rgb #(
  parameter int unsigned RAW_W = 1280,
  parameter int unsigned RAW_H = 960,
  parameter int unsigned XW = $clog2(RAW_W),
  parameter int unsigned YW = $clog2(RAW_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  input  logic [11:0]   in_data,
  output logic          out_valid,
  output logic [XW-2:0] out_x,
  output logic [YW-2:0] out_y,
  output logic [11:0]   out_r,
  output logic [11:0]   out_g,
  output logic [11:0]   out_b
);

  localparam int unsigned HALF_W = RAW_W / 2;

  // line buffer of {G1, R} pairs from the even row
  logic [23:0] line_buf [HALF_W];
  logic [11:0] prev_pix;           // previous pixel of the current row
  logic [23:0] rd_pair;
  logic [12:0] g_sum;

  assign rd_pair = line_buf[in_x[XW-1:1]];
  assign g_sum   = {1'b0, rd_pair[23:12]} + {1'b0, in_data};

  always_ff @(posedge clk) begin
    if (in_valid && !in_y[0] && in_x[0])
      line_buf[in_x[XW-1:1]] <= {prev_pix, in_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_pix  <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      out_r     <= '0;
      out_g     <= '0;
      out_b     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        prev_pix <= in_data;
        if (in_y[0] && in_x[0]) begin
          // odd row, odd column: G2 arrives, quad complete
          out_valid <= 1'b1;
          out_x     <= in_x[XW-1:1];
          out_y     <= in_y[YW-1:1];
          out_r     <= rd_pair[11:0];
          out_g     <= g_sum[12:1];
          out_b     <= prev_pix;
        end
      end
    end
  end

endmodule
