// tb_sram_edge_store: a 32x6 edge map through the SRAM store and a
// behavioural SRAM. Sobel-like results (interior pixels in raster order,
// random values, random gaps) are written while a display-like raster scan
// keeps reading, so reads and writes compete for the SRAM. A later scan
// checks that every interior pixel reads back its bit one clock after the
// request and that the border columns of interior rows read 0. It also
// checks that each interior row took exactly IMG_W/16 word writes, that
// only one SRAM read happens per 16 requested pixels, and that the SRAM is
// never asked to read and write in the same clock.
module tb_sram_edge_store;
  localparam int W = 32, H = 6, HT = W + 8, VT = H + 2;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_edge = 0;
  logic [4:0] wr_x = 0;
  logic [2:0] wr_y = 0;
  logic rd_req;
  logic [5:0] rd_x;
  logic [2:0] rd_y;
  logic rd_edge;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  bit ref_edge [H][W];
  int checks = 0, failures = 0;
  bit checking = 0;

  sram_edge_store #(.IMG_W(W), .IMG_H(H), .SRAM_AW(18), .XW(5), .YW(3), .RXW(6), .RYW(3)) dut (.*);
  sram_model #(.AW(18)) u_sram (
    .clk(clk), .addr(sram_addr), .dq_i(sram_dq_o), .dq_o(sram_dq_i),
    .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n)
  );

  always #5 clk = ~clk;

  // display-like scan
  int hc = 0, vc = 0;
  assign rd_req = rst_n && hc < W && vc < H;
  assign rd_x = 6'(hc);
  assign rd_y = 3'(vc);
  bit   prev_req;
  int   prev_x, prev_y, n_req, n_reads_seen;

  always @(posedge clk) if (rst_n) begin
    // pin protocol
    if (!sram_ce_n) begin
      checks++;
      if (!sram_oe_n && !sram_we_n) begin failures++; $display("FAIL read and write together"); end
      if (!sram_we_n && !sram_dq_oe) begin failures++; $display("FAIL write without driving the bus"); end
    end
    if (!sram_ce_n && !sram_oe_n) n_reads_seen++;
    // result of the previous request
    if (checking && prev_req && prev_y >= 1 && prev_y <= H - 2) begin
      bit e;
      e = (prev_x == 0 || prev_x == W - 1) ? 1'b0 : ref_edge[prev_y][prev_x];
      checks++;
      if (rd_edge != e) begin
        failures++;
        if (failures < 10) $display("FAIL pixel (%0d,%0d) got %0d exp %0d", prev_x, prev_y, rd_edge, e);
      end
    end
    if (checking && rd_req) n_req++;
    prev_req = rd_req; prev_x = hc; prev_y = vc;
    hc <= (hc == HT - 1) ? 0 : hc + 1;
    if (hc == HT - 1) vc <= (vc == VT - 1) ? 0 : vc + 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int writes0;
    n_req = 0; n_reads_seen = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 2; f++) begin
      writes0 = u_sram.n_writes;
      for (int y = 1; y < H - 1; y++)
        for (int x = 1; x < W - 1; x++) begin
          ref_edge[y][x] = 1'($urandom);
          wr_valid <= 1; wr_x <= 5'(x); wr_y <= 3'(y); wr_edge <= ref_edge[y][x];
          @(posedge clk);
          while ($urandom_range(3) == 0) begin wr_valid <= 0; @(posedge clk); end
          if (x == W - 2) begin wr_valid <= 0; repeat (3) @(posedge clk); end
        end
      wr_valid <= 0;
      repeat (4) @(posedge clk);
      checks++;
      if (int'(u_sram.n_writes) - writes0 != (H - 2) * (W / 16)) begin
        failures++; $display("FAIL %0d word writes", int'(u_sram.n_writes) - writes0);
      end
      // check over one whole scan
      wait (hc == 0 && vc == 0);
      n_req = 0; n_reads_seen = 0;
      checking = 1;
      wait (vc == 1);
      wait (hc == 0 && vc == 0);
      @(posedge clk);
      checking = 0;
      checks++;
      if (n_reads_seen * 16 != n_req || n_req != W * H) begin
        failures++; $display("FAIL %0d SRAM reads for %0d requests", n_reads_seen, n_req);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
