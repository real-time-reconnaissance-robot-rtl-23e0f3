// tb_async_fifo: pushes random words from a fast write clock and pops them
// on an unrelated slower read clock with random stalls; a reference queue
// checks order and content. Then the reader stops, the writer fills the
// FIFO until full and writes once more: overflow must be flagged, no word
// may be lost or duplicated, and exactly DEPTH words come back out.
module tb_async_fifo;
  localparam int WIDTH = 16, DEPTH = 16;
  logic wr_clk = 0, rd_clk = 0, wr_rst_n = 0, rd_rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] wr_data = 0, rd_data;
  logic full, empty, overflow;
  logic [WIDTH-1:0] q[$];
  int checks = 0, failures = 0, popped = 0;
  bit reader_on = 1;

  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #3 wr_clk = ~wr_clk;
  always #7.3 rd_clk = ~rd_clk;

  // reader
  always @(posedge rd_clk) begin
    if (rd_rst_n && rd_en && !empty) begin
      checks++; popped++;
      if (q.size() == 0) begin failures++; $display("FAIL pop from empty model"); end
      else begin
        logic [WIDTH-1:0] e;
        e = q.pop_front();
        if (rd_data !== e) begin
          failures++;
          if (failures < 10) $display("FAIL got %h exp %h", rd_data, e);
        end
      end
    end
    rd_en <= reader_on && ($urandom_range(3) != 0);
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20 wr_rst_n = 1; rd_rst_n = 1;
    // streaming phase
    for (int i = 0; i < 2000; i++) begin
      @(negedge wr_clk);
      wr_en = ($urandom_range(3) == 0);
      wr_data = WIDTH'($urandom);
      if (wr_en && !full) q.push_back(wr_data);
    end
    @(negedge wr_clk); wr_en = 0;
    wait (q.size() == 0);
    #100;
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow while streaming"); end
    // fill phase
    reader_on = 0;
    #100;
    popped = 0;
    while (!full) begin
      @(negedge wr_clk);
      wr_en = 1; wr_data = WIDTH'($urandom);
      if (!full) q.push_back(wr_data);
    end
    @(negedge wr_clk);
    wr_en = 1; wr_data = 16'hDEAD;   // dropped
    @(negedge wr_clk);
    wr_en = 0;
    checks++;
    if (!overflow) begin failures++; $display("FAIL no overflow flag"); end
    checks++;
    if (q.size() != DEPTH) begin failures++; $display("FAIL held %0d words", q.size()); end
    reader_on = 1;
    wait (q.size() == 0);
    #200;
    checks++;
    if (!empty || popped != DEPTH) begin failures++; $display("FAIL drain popped %0d", popped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
