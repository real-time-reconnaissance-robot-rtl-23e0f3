// async_fifo: dual-clock FIFO that carries pixels from the camera clock to
// the video clock.
//
// The camera side and the VGA side run on unrelated clocks; this FIFO is the
// crossing between them (the "SDRAM FIFO" step of the image flow). Classic
// Gray-code design: each side keeps a binary pointer one bit wider than the
// address, converts it to Gray code and passes it through a two-flop
// synchronizer to the other side. Full and empty are computed from the local
// pointer and the synchronized remote pointer, so both are conservative.
// Write side: wr_en with !full stores wr_data. A write while full is dropped
// and sets the sticky overflow flag. Read side: rd_data shows the oldest
// word whenever !empty (first-word fall-through); rd_en with !empty pops it.
// DEPTH must be a power of two. Depth, width and the drop-on-full policy are
// this design's choices.
module async_fifo #(
  parameter int unsigned WIDTH = 43,
  parameter int unsigned DEPTH = 256
) (
  input  logic             wr_clk,
  input  logic             wr_rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  output logic             overflow,
  input  logic             rd_clk,
  input  logic             rd_rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_w1, rd_gray_w2;   // read pointer seen by the write side
  logic [AW:0] wr_gray_r1, wr_gray_r2;   // write pointer seen by the read side
  logic [AW:0] wr_bin_nx, rd_bin_nx;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side
  assign full      = (wr_gray == {~rd_gray_w2[AW:AW-1], rd_gray_w2[AW-2:0]});
  assign wr_bin_nx = wr_bin + 1'b1;

  always_ff @(posedge wr_clk) begin
    if (wr_en && !full) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
      overflow   <= 1'b0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
      if (wr_en && !full) begin
        wr_bin  <= wr_bin_nx;
        wr_gray <= bin2gray(wr_bin_nx);
      end
      if (wr_en && full) overflow <= 1'b1;
    end
  end

  // ---------------- read side
  assign empty     = (rd_gray == wr_gray_r2);
  assign rd_bin_nx = rd_bin + 1'b1;
  assign rd_data   = mem[rd_bin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
      if (rd_en && !empty) begin
        rd_bin  <= rd_bin_nx;
        rd_gray <= bin2gray(rd_bin_nx);
      end
    end
  end

endmodule
