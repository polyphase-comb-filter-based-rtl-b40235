// tb_pcf_controller: self-checking test of the 8-state dispatcher.
// After reset it runs 10 frames, plus a reset in the middle of a frame, and
// checks every cycle that exactly the expected sub-filter enable is high
// (E_7 in the first cycle of a frame, E_0 in the last), that the select word
// equals the position in the frame, that rst_in marks the first cycle of each
// frame, that oe marks it only after a full frame, and that me is high. It
// also checks that every enable recurs exactly every 8 cycles.
module tb_pcf_controller;
  localparam int M = 8;
  logic clk = 0, rst = 1;
  logic [M-1:0] e;
  logic [2:0] s;
  logic rst_in, oe, me;
  int checks = 0, failures = 0;
  int last_seen [M];
  int gcyc;   // cycles since the last reset

  pcf_controller dut (.clk, .rst, .e, .s, .rst_in, .oe, .me);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // pos: position in the frame; cyc: cycles since reset
  task automatic run(int ncyc);
    for (int c = 0; c < ncyc; c++) begin
      int cyc = gcyc;
      int pos = cyc % M;
      #1;
      check(e == (M'(1) << (M-1-pos)), $sformatf("e=%b pos=%0d", e, pos));
      check(s == 3'(pos), $sformatf("s=%0d pos=%0d", s, pos));
      check(rst_in == (pos == 0), "rst_in");
      check(oe == (pos == 0 && cyc >= M), "oe");
      check(me == 1'b1, "me");
      for (int i = 0; i < M; i++)
        if (e[i]) begin
          if (last_seen[i] >= 0) check(cyc - last_seen[i] == M, "enable period");
          last_seen[i] = cyc;
        end
      gcyc++;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(e == '0 && me == 1'b0, "idle in reset");
    rst = 0;
    gcyc = 0;
    for (int i = 0; i < M; i++) last_seen[i] = -1;
    run(80);
    run(3);
    rst = 1;
    @(negedge clk);
    rst = 0;
    gcyc = 0;
    for (int i = 0; i < M; i++) last_seen[i] = -1;
    run(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
