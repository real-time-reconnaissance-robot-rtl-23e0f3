// frame_ram: one frame of pixel storage with a write port and a read port on
// the same clock.
//
// The design keeps two frames: the camera image (RGB565 plus gray level per
// pixel, the job of the board's SDRAM) and the 1-bit Sobel edge map (the job
// of the board's SRAM). Both are this memory, addressed by pixel number
// y*WIDTH+x. The write is taken at the clock edge when we is high; the read
// is registered: rd_addr presented before an edge gives rd_data after it
// (one clock latency). A read and a write of the same address in one cycle
// return the old word. The external memory chips and their command protocols
// are not modelled: this is the on-chip equivalent of the two frame stores.
module frame_ram #(
  parameter int unsigned DATA_W = 24,
  parameter int unsigned DEPTH  = 640 * 480,
  parameter int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
