// sd_modulator_model: behavioural model of a sigma-delta modulator, used only
// by testbenches to produce a realistic single-bit stream.
// It is a first-order, discrete-time, error-feedback modulator: an integrator
// accumulates the difference between the input level and the fed-back output
// bit, and the bit is the integrator's sign. The input level is a fraction
// level/2^LW of full scale (0 = all zeros, 2^LW = all ones); on average the
// density of ones in dout equals that fraction. One bit per clk cycle.
module sd_modulator_model #(
  parameter int unsigned LW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [LW:0]   level,
  output logic          dout
);
  logic signed [LW+2:0] integ;

  always_ff @(posedge clk) begin
    if (rst) integ <= '0;
    else     integ <= integ + $signed({2'b00, level}) - (dout ? $signed((LW+3)'(1) << LW) : '0);
  end

  assign dout = (integ >= 0);
endmodule
