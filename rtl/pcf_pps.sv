// pcf_pps: Partial Product Summation block of the polyphase comb decimator.
//
// The M sub-filters are active one at a time, so one adder per product
// position is shared among all of them by time division. For product position
// j (j = 0 .. K-1) an M:1 multiplexer, steered by the controller's select word
// s, picks product j of sub-filter E_(M-1-s); adder j adds it to accumulator
// register R_j. Over the M cycles of a frame R_j collects product j of all
// sub-filters. Each R_j has two outputs: the running sum fed back to its
// adder, and an output copy loaded when oe is high. The output copies are
// added by a chain of K-1 further adders (Adder4 and Adder5 for K = 3), giving
// the decimated filter output. For K = 3 that is five adders in all, with an
// adder depth of three from product to output.
//
// Interface:
//   prod[i][j]  product j of sub-filter E_i (zero when E_i is idle)
//   s           select word; cycle s of a frame belongs to E_(M-1-s)
//   me          multiplexer enable; the multiplexers output zero when low
//   rst_in      first cycle of a frame: the adder's feedback operand is taken
//               as zero, so R_j restarts from this cycle's product
//   oe          copies the finished sums R_j into the output copies
//   dout        sum of the output copies, ACC_W bits, held for a whole frame
//   dout_strobe high for the one cycle in which a new dout first appears
// Timing: with oe in the first cycle of frame f+1, dout carries the result of
// frame f from the following cycle on, two cycles after its last input bit.
//
// The multiplexer, adder and register arrangement, the OE and reset inputs of
// the registers and the 12-bit width follow the published design. How the
// register reset is sequenced (feedback forced to zero rather than a separate
// clear cycle), the output copy behind OE and dout_strobe are this
// implementation's reading of it. The design's largest output is 512, so
// ACC_W = 12 never overflows; nothing saturates.
module pcf_pps #(
  parameter int unsigned M      = pcf_pkg::PCF_M,
  parameter int unsigned K      = pcf_pkg::PCF_K,
  parameter int unsigned COEF_W = pcf_pkg::PCF_COEF_W,
  parameter int unsigned ACC_W  = pcf_pkg::PCF_ACC_W,
  localparam int unsigned SW    = (M > 1) ? $clog2(M) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [COEF_W-1:0] prod [M][K],
  input  logic [SW-1:0]     s,
  input  logic              me,
  input  logic              rst_in,
  input  logic              oe,
  output logic [ACC_W-1:0]  dout,
  output logic              dout_strobe
);

  logic [COEF_W-1:0] mux_out [K];   // outputs of the M:1 multiplexers
  logic [ACC_W-1:0]  held    [K];   // R_j output copies, gathered
  logic [ACC_W-1:0]  chain   [K];   // Adder4, Adder5, ... partial sums

  // Select value s belongs to sub-filter E_(M-1-s).
  logic [SW-1:0] branch;
  assign branch = SW'(M-1) - s;

  always_comb begin
    for (int j = 0; j < K; j++) mux_out[j] = me ? prod[branch][j] : '0;
  end

  generate
    for (genvar j = 0; j < K; j++) begin : g_acc
      logic [ACC_W-1:0] acc_q;    // R_j running sum (Out2)
      logic [ACC_W-1:0] held_q;   // R_j output copy (Out1)
      logic [ACC_W-1:0] feedback;
      assign feedback = rst_in ? '0 : acc_q;
      always_ff @(posedge clk) begin
        if (rst) begin
          acc_q  <= '0;
          held_q <= '0;
        end else begin
          acc_q <= feedback + ACC_W'(mux_out[j]);
          if (oe) held_q <= acc_q;
        end
      end
      assign held[j] = held_q;
    end
  endgenerate

  always_comb begin
    chain[0] = held[0];
    for (int j = 1; j < K; j++) chain[j] = chain[j-1] + held[j];
  end

  assign dout = chain[K-1];

  always_ff @(posedge clk) begin
    if (rst) dout_strobe <= 1'b0;
    else     dout_strobe <= oe;
  end

endmodule
