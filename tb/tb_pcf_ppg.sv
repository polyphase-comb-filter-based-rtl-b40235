// tb_pcf_ppg: self-checking test of the Partial Product Generating blocks.
// All eight branches E_0..E_7 of the SINC^3, M = 8 filter are instantiated and
// driven with random input bits and random enables (including enables in the
// same cycle and long idle gaps). A reference model keeps, per branch, the
// bits seen while enabled and checks each product against h[i+8j] times the
// corresponding bit. h[k] is computed here independently as the number of
// triples (a, b, c) in 0..7 with a + b + c = k.
module tb_pcf_ppg;
  localparam int M = 8, K = 3, W = 8;
  logic clk = 0, rst = 1;
  logic din;
  logic [M-1:0] en;
  logic [W-1:0] prod [M][K];
  int checks = 0, failures = 0;
  int hist [M][K];
  int h [0:21];

  always #5 clk = ~clk;

  for (genvar i = 0; i < M; i++) begin : g
    pcf_ppg #(.I(i)) dut (.clk, .rst, .en(en[i]), .din, .prod(prod[i]));
  end

  initial begin
    for (int k = 0; k < 22; k++) begin
      h[k] = 0;
      for (int a = 0; a < 8; a++)
        for (int b = 0; b < 8; b++)
          for (int c = 0; c < 8; c++)
            if (a + b + c == k) h[k]++;
    end
  end

  function automatic int coef(int i, int j);
    return (i + 8*j <= 21) ? h[i + 8*j] : 0;
  endfunction

  initial begin
    din = 0;
    en  = '0;
    for (int i = 0; i < M; i++) for (int j = 0; j < K; j++) hist[i][j] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    // Fixed checks against the values printed for E_7 and E_0.
    @(negedge clk);
    check_fixed();
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      din = 1'($urandom);
      if (cyc < 1500) en = M'(1) << (M - 1 - (cyc % M));  // dispatcher order
      else            en = M'($urandom) & M'($urandom);  // stress: any pattern
      #1;
      for (int i = 0; i < M; i++) begin
        hist[i][0] = int'(din);
        for (int j = 0; j < K; j++) begin
          automatic int exp_v = (en[i] && hist[i][j] != 0) ? coef(i, j) : 0;
          checks++;
          if (int'(prod[i][j]) != exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL E%0d prod%0d=%0d exp %0d", i, j, prod[i][j], exp_v);
          end
        end
      end
      @(posedge clk);
      for (int i = 0; i < M; i++)
        if (en[i]) begin
          for (int j = K-1; j > 0; j--) hist[i][j] = hist[i][j-1];
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // E_7 products are 36 and 28, E_0 products 1, 42 and 21 when all bits are 1.
  task automatic check_fixed();
    en = '0;
    din = 1;
    for (int f = 0; f < 3; f++) begin
      en = 8'h81;
      @(posedge clk);
      @(negedge clk);
    end
    en = 8'h81;
    #1;
    checks += 5;
    if (prod[7][0] != 8'b00100100 || prod[7][1] != 8'b00011100 || prod[7][2] != 0) failures++;
    if (prod[0][0] != 8'b00000001 || prod[0][1] != 8'b00101010) failures++;
    if (prod[0][2] != 8'b00010101) failures++;
    en = '0;
    #1;
    if (prod[7][0] != 0 || prod[0][1] != 0) failures++;
    din = 0;
    en = 8'h81;
    #1;
    if (prod[7][0] != 0 || prod[7][1] != 28 || prod[0][2] != 21) failures++;
    // flush so the random phase starts from all-zero history
    for (int f = 0; f < 3; f++) begin
      @(posedge clk);
      @(negedge clk);
    end
    en = '1;
    @(posedge clk);
    @(negedge clk);
    @(posedge clk);
    @(negedge clk);
    en = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
