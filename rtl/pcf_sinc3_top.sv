// pcf_sinc3_top: multiplier-free polyphase SINC^3 decimator for a single-bit
// sigma-delta modulator output, decimating by M = 8.
//
// The bit stream din arrives at the modulator rate Fs, one bit per clk cycle.
// A controller counts the M cycles of a frame and enables one sub-filter per
// cycle, so each input bit goes straight to the sub-filter it belongs to: no
// input delay line and no commutator switches. Each of the M Partial Product
// Generating blocks turns its bits into coefficient products with 2:1
// multiplexers (coefficient or zero), and the Partial Product Summation block
// accumulates the products of all sub-filters over a frame with K shared
// adders and adds the K sums together. One output sample per frame results:
//   y[f] = sum_{k=0}^{K(M-1)} h[k] * din[M*f + M-1 - k],
// where din[n] is the n-th bit after reset (bits before reset count as 0) and
// h[k] are the coefficients of (1 + z^-1 + ... + z^-(M-1))^K.
// For K = 3, M = 8 the result lies in 0 .. 512 (input bit 1 weighs +1, bit 0
// weighs 0).
//
// Interface:
//   clk, rst      Fs clock; synchronous active-high reset
//   din           modulator bit, sampled every clk cycle
//   dout          ACC_W-bit output sample, held for a frame
//   dout_strobe   one-cycle pulse when a new dout appears (every M cycles)
//   e, s, rst_in, oe, me   controller signals, brought out for observation
// Timing: the first bit after reset is the first bit of frame 0; the result
// of frame f appears two cycles after its last bit, at cycle M*f + M + 1
// counted from the first cycle after reset.
//
// Block structure, signal names, coefficients and widths follow the published
// design; the reset style and the exact output timing are this design's
// choices.
module pcf_sinc3_top #(
  parameter int unsigned M      = pcf_pkg::PCF_M,
  parameter int unsigned K      = pcf_pkg::PCF_K,
  parameter int unsigned COEF_W = pcf_pkg::PCF_COEF_W,
  parameter int unsigned ACC_W  = pcf_pkg::PCF_ACC_W,
  localparam int unsigned SW    = (M > 1) ? $clog2(M) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             din,
  output logic [ACC_W-1:0] dout,
  output logic             dout_strobe,
  output logic [M-1:0]     e,
  output logic [SW-1:0]    s,
  output logic             rst_in,
  output logic             oe,
  output logic             me
);

  logic [COEF_W-1:0] prod [M][K];

  pcf_controller #(.M(M)) u_ctrl (
    .clk, .rst, .e, .s, .rst_in, .oe, .me
  );

  generate
    for (genvar i = 0; i < M; i++) begin : g_ppg
      pcf_ppg #(.M(M), .K(K), .I(i), .COEF_W(COEF_W)) u_ppg (
        .clk, .rst, .en(e[i]), .din, .prod(prod[i])
      );
    end
  endgenerate

  pcf_pps #(.M(M), .K(K), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_pps (
    .clk, .rst, .prod, .s, .me, .rst_in, .oe, .dout, .dout_strobe
  );

endmodule
