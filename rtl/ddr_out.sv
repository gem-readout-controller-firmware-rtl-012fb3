// ddr_out: double-data-rate output register. d_rise is captured on the
// rising edge of clk and driven while clk is high; d_fall is captured on the
// falling edge and driven while clk is low. With d_rise=0 and d_fall=1 the
// output is a copy of the clock launched from its falling edge, which is how
// the GEM CLK outputs are forwarded. In an FPGA this maps onto the I/O cell's
// DDR output register.
module ddr_out (
  input  logic clk,
  input  logic rst,
  input  logic d_rise,
  input  logic d_fall,
  output logic q
);

  logic q_r, q_f;

  always_ff @(posedge clk) begin
    if (rst) q_r <= 1'b0;
    else     q_r <= d_rise;
  end

  always_ff @(negedge clk) begin
    if (rst) q_f <= 1'b0;
    else     q_f <= d_fall;
  end

  assign q = clk ? q_r : q_f;

endmodule
