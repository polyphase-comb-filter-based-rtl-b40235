// pcf_ppg: Partial Product Generating block of polyphase branch E_I.
//
// Sub-filter E_I(z) = h[I] + h[I+M] z^-1 + h[I+2M] z^-2 + ... has NT non-zero
// products (NT = 3 for E_0..E_5 and 2 for E_6, E_7 in the SINC^3, M = 8
// configuration). Because the input is a single bit, each product
// "coefficient times input sample" is a 2:1 multiplexer choosing between zero
// and the coefficient. The first multiplexer is steered by the input bit of
// the current frame, the others by the bits of the same phase from earlier
// frames, held in a chain of NT-1 flip-flops. These flip-flops advance only
// when the branch is enabled, so they delay by one frame (M Fs cycles), and
// every multiplexer outputs zero while the branch is disabled.
//
// Interface:
//   en       E_I from the controller, high for one Fs cycle per frame
//   din      sigma-delta bit stream, one bit per Fs cycle
//   prod[j]  h[I+j*M] if the bit belonging to product j is 1, else 0; forced
//            to 0 when en is low and for j >= NT
// Timing: prod is combinational from din and the delay chain; the chain
// shifts on the rising clk edge that ends the enabled cycle.
//
// The multiplexer-per-product structure, the flip-flop count of NT-1 per
// branch, the E_I enable on flip-flops and multiplexers and the 8-bit
// coefficients follow the published design. The published flip-flops are
// clocked by E_I; here they share clk and use E_I as a clock enable. Their
// synchronous clear to zero on rst is also this implementation's choice.
module pcf_ppg #(
  parameter int unsigned M      = pcf_pkg::PCF_M,
  parameter int unsigned K      = pcf_pkg::PCF_K,
  parameter int unsigned I      = 0,
  parameter int unsigned COEF_W = pcf_pkg::PCF_COEF_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              din,
  output logic [COEF_W-1:0] prod [K]
);

  localparam int unsigned NT = pcf_pkg::branch_taps(M, K, I);

  // sel[0] is the current input bit, sel[j] the bit of this phase j frames ago.
  logic [K-1:0] sel;

  assign sel[0] = din;

  generate
    for (genvar j = 1; j < K; j++) begin : g_dly
      if (j < NT) begin : g_ff
        always_ff @(posedge clk) begin
          if (rst)     sel[j] <= 1'b0;
          else if (en) sel[j] <= sel[j-1];
        end
      end else begin : g_none
        assign sel[j] = 1'b0;
      end
    end

    for (genvar j = 0; j < K; j++) begin : g_mux
      localparam int unsigned COEF = (j < NT) ? pcf_pkg::sinc_coef(M, K, I + j*M) : 0;
      localparam logic [COEF_W-1:0] C = COEF_W'(COEF);
      assign prod[j] = (en && sel[j]) ? C : '0;
    end
  endgenerate

endmodule
