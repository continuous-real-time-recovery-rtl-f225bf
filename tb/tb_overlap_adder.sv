// tb_overlap_adder: self-checking test of the overlap adder (64-sample
// segments advancing by 28, so each segment overlaps the next two).
// Three invalid segments of random garbage are followed by K valid random
// segments and more invalid ones, streamed back to back at the fast clock.
// The slow-clock output must be, sample by sample, the overlap-add sum
// out[j] = sum_k y_k[j - 28k] over the valid segments; the garbage must not
// leak in. underflow must stay clear until the last sample of the burst
// has been delivered (it then reports, correctly, that the stream ran dry).
// Samples that sum three segments are counted and must occur.
module tb_overlap_adder;
  localparam int LOG2N = 6;
  localparam int N     = 2 ** LOG2N;
  localparam int L     = 28;
  localparam int W     = 16;
  localparam int K     = 12;
  localparam int NPRE  = 3;
  localparam int NSEGS = NPRE + K + 4;

  logic fast_clk = 0, slow_clk = 0, fast_rst = 1, slow_rst = 1;
  logic signed [W-1:0] data_in = '0, data_out;
  logic in_start = 0, in_valid = 0, out_valid, overflow, underflow;

  overlap_adder #(.LOG2N(LOG2N), .L(L), .W(W), .OFIFO_AW(6)) dut (
    .fast_clk, .fast_rst, .data_in, .in_start, .in_valid,
    .slow_clk, .slow_rst, .data_out, .out_valid, .overflow, .underflow);

  always #16 slow_clk = ~slow_clk;
  always #7  fast_clk = ~fast_clk;

  int checks = 0, failures = 0, three = 0;
  int yseg [K][N];
  int expv [K*L];
  int n_out = 0;

  always @(posedge slow_clk) begin
    if (!slow_rst && out_valid) begin
      if (n_out < K * L) begin
        checks++;
        if (int'(data_out) != expv[n_out]) begin
          failures++;
          if (failures < 10) $display("out %0d: got %0d expected %0d", n_out, data_out, expv[n_out]);
        end
      end else begin
        checks++;
        failures++;
        $display("extra output sample %0d", n_out);
      end
      n_out <= n_out + 1;
      // the stream may run dry only after the burst's last samples (the flag
      // rises when the last word leaves the FIFO, two cycles before data_out)
      if (n_out == K * L - 4) begin
        checks++;
        if (underflow) begin failures++; $display("underflow before end of burst"); end
      end
    end
  end

  initial begin
    for (int k = 0; k < K; k++)
      for (int i = 0; i < N; i++) yseg[k][i] = int'($urandom_range(0, 2000)) - 1000;
    for (int j = 0; j < K * L; j++) begin
      int terms;
      expv[j] = 0;
      terms = 0;
      for (int k = 0; k < K; k++)
        if (j - k * L >= 0 && j - k * L < N) begin expv[j] += yseg[k][j - k * L]; terms++; end
      if (terms == 3) three++;
    end
    repeat (3) @(posedge slow_clk);
    @(negedge fast_clk);
    fast_rst = 0;
    slow_rst = 0;
    repeat (5) @(negedge fast_clk);
    for (int s = 0; s < NSEGS; s++)
      for (int i = 0; i < N; i++) begin
        in_start = (i == 0);
        in_valid = (s >= NPRE && s < NPRE + K);
        data_in  = in_valid ? W'(yseg[s - NPRE][i]) : W'($urandom);
        @(negedge fast_clk);
      end
    in_start = 0;
    repeat (200) @(negedge slow_clk);
    checks++;
    if (n_out != K * L) begin failures++; $display("%0d outputs, expected %0d", n_out, K * L); end
    checks++;
    if (overflow) begin failures++; $display("overflow"); end
    checks++;
    if (three == 0) failures++;
    $display("three-segment sums: %0d", three);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSEGS * N + 3000) @(posedge fast_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
