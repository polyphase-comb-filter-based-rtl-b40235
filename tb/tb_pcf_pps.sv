// tb_pcf_pps: self-checking test of the Partial Product Summation block.
// Random products are offered for all sub-filters while the select word
// walks through the frame as the controller drives it; rst_in marks the first
// cycle of each frame and oe copies finished sums. A cycle-level reference
// model of the three accumulators, their output copies and the final adders
// checks dout and dout_strobe every cycle. Product values up to the largest
// coefficient (48) and frames of all-maximum products exercise the widest
// sums; me is dropped for some cycles to check that it blanks the
// multiplexers.
module tb_pcf_pps;
  localparam int M = 8, K = 3, W = 8, A = 12;
  logic clk = 0, rst = 1;
  logic [W-1:0] prod [M][K];
  logic [2:0] s;
  logic me, rst_in, oe;
  logic [A-1:0] dout;
  logic dout_strobe;
  int checks = 0, failures = 0;
  int acc_r [K], held_r [K];
  bit strobe_r;
  int max_seen = 0;

  always #5 clk = ~clk;

  pcf_pps dut (.clk, .rst, .prod, .s, .me, .rst_in, .oe, .dout, .dout_strobe);

  initial begin
    s = 0; me = 0; rst_in = 0; oe = 0;
    for (int i = 0; i < M; i++) for (int j = 0; j < K; j++) prod[i][j] = '0;
    for (int j = 0; j < K; j++) begin acc_r[j] = 0; held_r[j] = 0; end
    strobe_r = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      automatic int pos = cyc % M;
      automatic int frame = cyc / M;
      int exp_out;
      @(negedge clk);
      s      = 3'(pos);
      rst_in = (pos == 0);
      oe     = (pos == 0) && (cyc >= M);
      me     = (frame % 17 == 5) ? 1'b0 : 1'b1;
      for (int i = 0; i < M; i++)
        for (int j = 0; j < K; j++)
          prod[i][j] = (frame % 13 == 3) ? W'(255) : W'($urandom_range(0, 48));
      #1;
      exp_out = (held_r[0] + held_r[1] + held_r[2]) % (1 << A);
      checks += 2;
      if (int'(dout) != exp_out) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d dout=%0d exp %0d", cyc, dout, exp_out);
      end
      if (dout_strobe != strobe_r) failures++;
      if (exp_out > max_seen) max_seen = exp_out;
      // reference update at the coming edge
      for (int j = 0; j < K; j++) begin
        automatic int m = me ? int'(prod[M-1-pos][j]) : 0;
        if (oe) held_r[j] = acc_r[j];
        acc_r[j] = ((rst_in ? 0 : acc_r[j]) + m) % (1 << A);
      end
      strobe_r = oe;
      @(posedge clk);
    end
    // frames of maximum products must have produced sums above 10 bits
    checks++;
    if (max_seen < 1024) begin
      failures++;
      $display("FAIL largest output %0d", max_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
