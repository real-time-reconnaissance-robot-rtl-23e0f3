// tb_display_mux: drives random stored pixels and edge bits in every
// display mode and checks the 10-bit colour outputs against the expected
// widening (colour, gray) and black-edge-on-white drawing with the border
// forced to non-edge.
module tb_display_mux;
  import robot_pkg::*;
  disp_mode_e mode;
  pixel_t pix;
  logic edge_bit, border;
  logic [9:0] r, g, b;
  int checks = 0, failures = 0;

  display_mux dut (.*);

  initial begin
    logic [9:0] er, eg, eb;
    for (int i = 0; i < 4000; i++) begin
      mode = disp_mode_e'(i % 4);
      pix = pixel_t'($urandom);
      edge_bit = 1'($urandom);
      border = ($urandom_range(7) == 0);
      #1;
      case (i % 4)
        0: begin
          er = {pix.r, pix.r}; eg = {pix.g, pix.g[5:2]}; eb = {pix.b, pix.b};
        end
        1: begin
          er = {pix.gray, pix.gray[7:6]}; eg = er; eb = er;
        end
        default: begin
          er = (edge_bit && !border) ? 10'd0 : 10'd1023; eg = er; eb = er;
        end
      endcase
      checks++;
      if (r !== er || g !== eg || b !== eb) begin
        failures++;
        if (failures < 10) $display("FAIL mode %0d got %h %h %h exp %h %h %h", i % 4, r, g, b, er, eg, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
