// tb_pcf_sinc3_top: end-to-end test of the polyphase SINC^3 decimator at its
// default size (M = 8, K = 3, 8-bit coefficients, 12-bit output) with a
// 100 MHz Fs clock.
// The input bit stream comes in phases: random bits, a run of ones long enough
// to fill the whole 22-tap response (output 512, the largest value, checks that
// 12 bits never wrap), a run of zeros, the output of a first-order
// sigma-delta modulator model following a slow ramp of input levels and then
// three constant levels (where the output must settle at 512 times the ones
// density, the decimator's DC gain), a reset
// in the middle of a frame, and random bits again. Every output sample is
// compared with the direct convolution
//   y[f] = sum_{k=0}^{21} h[k] x[8f + 7 - k],
// with h[k] computed here as the number of triples in 0..7 summing to k, and
// x[n] the n-th bit after reset. The test also checks that one output appears
// every 8 cycles, two cycles after the frame's last bit, and counts how often
// each mechanism occurred: every sub-filter enable, full-scale output, the
// modulator stream, and the mid-frame reset.
module tb_pcf_sinc3_top;
  localparam int M = 8, NTAP = 22, MAXN = 40000;
  logic clk = 0, rst = 1, din = 0;
  logic [11:0] dout;
  logic dout_strobe;
  logic [7:0] e;
  logic [2:0] s;
  logic rst_in, oe, me;
  int checks = 0, failures = 0;
  int h [NTAP];
  bit x [MAXN];
  int n = 0;                 // bits fed since the last reset
  int outputs = 0, last_strobe = -1;
  int en_count [M];
  int full_scale = 0, mid_resets = 0, sd_bits = 0, dc_checks = 0;
  bit dout_strobe_seen;      // step() saw dout_strobe in the cycle just run
  logic [10:0] level = 0;
  logic sd_bit;

  always #5ns clk = ~clk;

  pcf_sinc3_top dut (.clk, .rst, .din, .dout, .dout_strobe, .e, .s, .rst_in, .oe, .me);
  sd_modulator_model #(.LW(10)) u_mod (.clk, .rst(1'b0), .level, .dout(sd_bit));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int ref_out(int f);
    int acc = 0;
    for (int k = 0; k < NTAP; k++) begin
      int idx = M*f + M - 1 - k;
      if (idx >= 0 && x[idx]) acc += h[k];
    end
    return acc;
  endfunction

  // One Fs cycle: drive the bit, check outputs, record.
  // Called at a falling edge; returns at the next one.
  task automatic step(bit b);
    din = b;
    #1;
    for (int i = 0; i < M; i++) if (e[i]) en_count[i]++;
    check(e == (8'h80 >> (n % M)), "dispatch order");
    dout_strobe_seen = dout_strobe;
    if (dout_strobe) begin
      int f = (n - M - 1) / M;
      check(n >= M + 1 && (n - M - 1) % M == 0, $sformatf("output timing n=%0d", n));
      if (last_strobe >= 0) check(n - last_strobe == M, "output rate");
      last_strobe = n;
      check(int'(dout) == ref_out(f), $sformatf("frame %0d dout=%0d exp %0d", f, dout, ref_out(f)));
      if (dout == 12'd512) full_scale++;
      outputs++;
    end
    x[n] = b;
    n++;
    @(negedge clk);
  endtask

  task automatic do_reset();
    rst = 1;
    @(negedge clk);
    rst = 0;
    n = 0;
    last_strobe = -1;
  endtask

  initial begin
    for (int k = 0; k < NTAP; k++) begin
      h[k] = 0;
      for (int a = 0; a < 8; a++)
        for (int b = 0; b < 8; b++)
          for (int c = 0; c < 8; c++)
            if (a + b + c == k) h[k]++;
    end
    for (int i = 0; i < M; i++) en_count[i] = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 8*400; c++) step(1'($urandom));
    for (int c = 0; c < 8*6; c++)   step(1'b1);
    for (int c = 0; c < 8*6; c++)   step(1'b0);
    // modulator stream, level ramping over the full scale and back
    for (int c = 0; c < 8*1000; c++) begin
      level = (c < 4000) ? 11'(c * 1024 / 4000) : 11'((8000 - c) * 1024 / 4000);
      step(sd_bit);
      sd_bits++;
    end
    // constant levels: after the 22-bit response has filled, the output must
    // sit at 512 times the ones density, within the modulator's ripple
    for (int lv = 0; lv < 3; lv++) begin
      automatic int dc_level = (lv == 0) ? 256 : (lv == 1) ? 640 : 768;
      automatic int target = 512 * dc_level / 1024;
      level = 11'(dc_level);
      for (int c = 0; c < 8*40; c++) begin
        step(sd_bit);
        sd_bits++;
        if (c >= 8*4 && dout_strobe_seen) begin
          check(int'(dout) >= target - 12 && int'(dout) <= target + 12,
                $sformatf("dc level %0d: dout=%0d target %0d", dc_level, dout, target));
          dc_checks++;
        end
      end
    end
    for (int c = 0; c < 8*10 + 3; c++) step(1'($urandom));
    do_reset();
    mid_resets++;
    for (int c = 0; c < 8*300; c++) step(1'($urandom));
    repeat (3) step(1'b0);
    // every mechanism must have occurred
    for (int i = 0; i < M; i++) check(en_count[i] > 0, $sformatf("E%0d never enabled", i));
    check(full_scale > 0, "full-scale output never reached");
    check(sd_bits > 0, "modulator stream never applied");
    check(mid_resets > 0, "mid-frame reset never applied");
    check(dc_checks > 0, "constant-level outputs never checked");
    check(outputs > 1500, "too few outputs");
    $display("mechanisms: outputs=%0d full_scale=%0d sd_bits=%0d dc_checks=%0d mid_resets=%0d E0..E7 enables=%0d..%0d",
             outputs, full_scale, sd_bits, dc_checks, mid_resets, en_count[0], en_count[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
