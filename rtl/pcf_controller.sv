// pcf_controller: dispatcher of the polyphase comb decimator.
//
// An M-state counter (M = 8 in the main configuration) runs on the full-rate
// clock Fs. In state s it activates exactly one sub-filter, E_(M-1-s): the
// first bit of every frame of M input bits goes to E_(M-1), the last to E_0,
// the commutator order of the classical polyphase structure. The state number
// itself is the select word S of the summation multiplexers, so select value s
// picks the products of E_(M-1-s).
//
// Outputs, all registered-state decodes valid in the current Fs cycle:
//   e[i]    one-hot sub-filter enable; clock-enables the delay flip-flops and
//           enables the product multiplexers of PPG i
//   s       select word of the summation multiplexers (S2..S0 for M = 8)
//   rst_in  high in state 0: the accumulators start a new frame
//   oe      high in state 0 once a whole frame has been accumulated: the
//           finished sums are copied to the output registers
//   me      multiplexer enable, high whenever the controller is out of reset
// Reset (rst, synchronous, active high) returns the counter to state 0.
//
// The eight states, the one-hot E_7..E_0 order, and the S, Reset-in, oe and me
// signal names follow the published design. The state encoding, the exact
// cycle in which rst_in and oe are asserted, the meaning given to me and the
// reset style are choices of this implementation.
module pcf_controller #(
  parameter int unsigned M  = pcf_pkg::PCF_M,
  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst,
  output logic [M-1:0]  e,
  output logic [SW-1:0] s,
  output logic          rst_in,
  output logic          oe,
  output logic          me
);

  logic [SW-1:0] state;
  logic          primed;   // a complete frame has been accumulated since reset

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= '0;
      primed <= 1'b0;
    end else begin
      if (state == SW'(M-1)) begin
        state  <= '0;
        primed <= 1'b1;
      end else begin
        state <= state + 1'b1;
      end
    end
  end

  // State s enables sub-filter E_(M-1-s); nothing is enabled in reset.
  always_comb begin
    e = '0;
    if (!rst) e[SW'(M-1) - state] = 1'b1;
  end

  assign s      = state;
  assign rst_in = (state == '0);
  assign oe     = (state == '0) && primed;
  assign me     = !rst;

  // Outside reset exactly one sub-filter is enabled, inside reset none.
  a_onehot: assert property (@(posedge clk) me |-> $onehot(e));
  a_idle:   assert property (@(posedge clk) !me |-> e == '0);
  a_range:  assert property (@(posedge clk) me |-> int'(state) < M);

endmodule
