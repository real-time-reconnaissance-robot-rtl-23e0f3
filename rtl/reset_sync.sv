// reset_sync: turns an asynchronous active-low reset into one that is
// asserted at once and released in step with the local clock, after two
// clock edges. One is used per clock domain of the design.
module reset_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      meta      <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      meta      <= 1'b1;
      rst_n_out <= meta;
    end
  end

endmodule
