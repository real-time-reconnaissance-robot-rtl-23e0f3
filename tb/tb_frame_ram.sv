// tb_frame_ram: writes random words to random addresses of a small frame
// memory, keeps a reference copy, and reads addresses back checking the
// one-clock registered read, including read-during-write (old data).
module tb_frame_ram;
  localparam int DEPTH = 300;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  logic we = 0;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0;
  logic [23:0] wr_data = 0, rd_data;
  logic [23:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  frame_ram #(.DATA_W(24), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill everything
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wr_addr = AW'(a); wr_data = 24'($urandom); ref_mem[a] = wr_data;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 3000; i++) begin
      int ra, wa;
      logic [23:0] exp;
      @(negedge clk);
      ra = $urandom_range(DEPTH - 1);
      wa = (i % 7 == 0) ? ra : $urandom_range(DEPTH - 1);
      rd_addr = AW'(ra);
      exp = ref_mem[ra];
      we = ($urandom_range(1) == 1);
      wr_addr = AW'(wa); wr_data = 24'($urandom);
      @(posedge clk);
      if (we) ref_mem[wa] = wr_data;
      #1;
      checks++;
      if (rd_data !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", ra, rd_data, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
