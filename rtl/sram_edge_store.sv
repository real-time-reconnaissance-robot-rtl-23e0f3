// sram_edge_store: keeps the 1-bit Sobel edge map in an external 16-bit
// asynchronous SRAM, 16 pixels per word.
//
// Address of pixel (x, y): word y*(IMG_W/16) + x/16, bit x%16 (IMG_W must be
// a multiple of 16, so a word never spans two rows).
// Write side: Sobel results arrive in raster order. They are collected in a
// 16-bit word; when a result belongs to another word, or the last interior
// pixel of a row (x = IMG_W-2) has arrived, the collected word is handed to
// a one-entry write slot. Bits with no result (the border columns) are 0.
// Read side: it answers the VGA controller's pixel requests with the same
// one-clock latency as an on-chip memory. On a request whose x is a multiple
// of 16 the SRAM is read in that same clock and the word is registered; the
// edge bit for each of the following 15 requests comes from that register.
// SRAM port use per clock: a read when one is due, otherwise the pending
// write. Reads use 1 clock in 16 during active video, so a pending write
// waits at most one clock; an assertion checks that the write slot is
// never overrun. SRAM signals are driven combinationally from registers:
// the read is an asynchronous read within one clock, the write holds
// address, data and WE# low for one whole clock, which suits a 10 ns
// SRAM at a 25 MHz video clock. Both byte lanes are always used, so UB#
// and LB# are tied low. The data bus is split into dq_o/dq_i and an
// output enable; the bidirectional pad is outside this module.
// The document only says that the edge result is output to the SRAM; the
// packing, scheduling and bus timing are this design's.
module sram_edge_store #(
  parameter int unsigned IMG_W   = 640,
  parameter int unsigned IMG_H   = 480,
  parameter int unsigned SRAM_AW = 18,
  parameter int unsigned XW      = $clog2(IMG_W),
  parameter int unsigned YW      = $clog2(IMG_H),
  parameter int unsigned RXW     = XW,   // width of the read request coordinates
  parameter int unsigned RYW     = YW
) (
  input  logic               clk,
  input  logic               rst_n,
  // Sobel results
  input  logic               wr_valid,
  input  logic [XW-1:0]      wr_x,
  input  logic [YW-1:0]      wr_y,
  input  logic               wr_edge,
  // display requests, answered one clock later on rd_edge
  input  logic               rd_req,
  input  logic [RXW-1:0]     rd_x,
  input  logic [RYW-1:0]     rd_y,
  output logic               rd_edge,
  // SRAM pins
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [15:0]        sram_dq_o,
  input  logic [15:0]        sram_dq_i,
  output logic               sram_dq_oe,
  output logic               sram_ce_n,
  output logic               sram_oe_n,
  output logic               sram_we_n,
  output logic               sram_ub_n,
  output logic               sram_lb_n
);

  localparam int unsigned WPL = IMG_W / 16;   // words per line

  // ---------------------------------------------------------------- write side
  logic [SRAM_AW-1:0] acc_addr;
  logic [15:0]        acc_bits;
  logic               acc_valid;
  logic [SRAM_AW-1:0] pend_addr;
  logic [15:0]        pend_bits;
  logic               pend_valid;

  logic [SRAM_AW-1:0] in_word;
  logic [3:0]         in_bit;
  logic [15:0]        in_mask;
  logic               last_in_row;

  assign in_word     = SRAM_AW'(wr_y) * SRAM_AW'(WPL) + SRAM_AW'(wr_x >> 4);
  assign in_bit      = wr_x[3:0];
  assign in_mask     = wr_edge ? (16'h1 << in_bit) : 16'h0;
  assign last_in_row = (wr_x == XW'(IMG_W - 2));

  // ---------------------------------------------------------------- port schedule
  logic read_now, write_now;
  logic [SRAM_AW-1:0] rd_word;

  assign rd_word   = SRAM_AW'(rd_y) * SRAM_AW'(WPL) + SRAM_AW'(rd_x >> 4);
  assign read_now  = rd_req && (rd_x[3:0] == 4'd0);
  assign write_now = pend_valid && !read_now;

  assign sram_addr  = read_now ? rd_word : pend_addr;
  assign sram_dq_o  = pend_bits;
  assign sram_dq_oe = write_now;
  assign sram_ce_n  = !(read_now || write_now);
  assign sram_oe_n  = !read_now;
  assign sram_we_n  = !write_now;
  assign sram_ub_n  = 1'b0;
  assign sram_lb_n  = 1'b0;

  // a new word may be handed over only when the slot is free or leaving
  logic hand_over;
  always_comb begin
    hand_over = 1'b0;
    if (wr_valid) begin
      if (acc_valid && acc_addr != in_word) hand_over = 1'b1;   // previous word complete
      if (last_in_row)                      hand_over = 1'b1;   // row complete
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_addr   <= '0;
      acc_bits   <= '0;
      acc_valid  <= 1'b0;
      pend_addr  <= '0;
      pend_bits  <= '0;
      pend_valid <= 1'b0;
    end else begin
      if (write_now) pend_valid <= 1'b0;
      if (wr_valid) begin
        if (last_in_row) begin
          // flush this word including the new bit
          pend_addr  <= in_word;
          pend_bits  <= ((acc_valid && acc_addr == in_word) ? acc_bits : 16'h0) | in_mask;
          pend_valid <= 1'b1;
          acc_valid  <= 1'b0;
          acc_bits   <= '0;
        end else begin
          if (acc_valid && acc_addr != in_word) begin
            pend_addr  <= acc_addr;
            pend_bits  <= acc_bits;
            pend_valid <= 1'b1;
          end
          if (acc_valid && acc_addr == in_word) begin
            acc_bits <= acc_bits | in_mask;
          end else begin
            acc_addr <= in_word;
            acc_bits <= in_mask;
          end
          acc_valid <= 1'b1;
        end
      end
    end
  end

  // the write slot must be empty (or emptied this clock) when a word arrives
  property p_no_slot_overrun;
    @(posedge clk) disable iff (!rst_n) hand_over |-> (!pend_valid || write_now);
  endproperty
  a_no_slot_overrun: assert property (p_no_slot_overrun)
    else $error("edge store write slot overrun");

  // ---------------------------------------------------------------- read side
  logic [15:0] rd_buf;
  logic [3:0]  rd_bit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_buf    <= '0;
      rd_bit_q  <= '0;
    end else begin
      if (read_now) rd_buf <= sram_dq_i;
      rd_bit_q  <= rd_x[3:0];
    end
  end

  assign rd_edge = rd_buf[rd_bit_q];

endmodule
