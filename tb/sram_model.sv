// sram_model: behavioural model of a 16-bit asynchronous SRAM (256K words
// by default) for simulation only. Reads are combinational: with CE# and
// OE# low and WE# high, dq_o shows the addressed word (0 otherwise). Writes
// are taken at the rising edge of the controller's clock while CE# and WE#
// are low, with both byte lanes enabled by UB#/LB#; sampling on the clock
// instead of the WE# edge keeps the two-state simulation free of races.
// Words that were never written read as 0. It counts reads and writes.
module sram_model #(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   dq_i,     // data from the controller
  output logic [15:0]   dq_o,     // data to the controller
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic          ub_n,
  input  logic          lb_n
);
  logic [15:0] mem [int unsigned];
  int unsigned n_reads = 0, n_writes = 0;

  always_comb begin
    dq_o = 16'h0;
    if (!ce_n && !oe_n && we_n && mem.exists(int'(addr))) dq_o = mem[int'(addr)];
  end

  always @(posedge clk) begin
    if (!ce_n && !oe_n && we_n) n_reads++;
    if (!ce_n && !we_n) begin
      logic [15:0] w;
      w = mem.exists(int'(addr)) ? mem[int'(addr)] : 16'h0;
      if (!ub_n) w[15:8] = dq_i[15:8];
      if (!lb_n) w[7:0]  = dq_i[7:0];
      mem[int'(addr)] = w;
      n_writes++;
    end
  end
endmodule
