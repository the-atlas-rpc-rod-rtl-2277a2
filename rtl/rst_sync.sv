// rst_sync: reset synchronizer. The reset is asserted asynchronously and
// released two clock edges after rst_n_in rises, in step with clk, so every
// clock domain of the ROD FPGA leaves reset cleanly on its own clock.
module rst_sync (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst_n_out
);
  logic s1;
  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) begin
      s1        <= 1'b0;
      rst_n_out <= 1'b0;
    end else begin
      s1        <= 1'b1;
      rst_n_out <= s1;
    end
  end
endmodule
