// tb_circular_convolver: self-checking test of the two-segments-per-pass
// convolver at 64-point size (segments of 28 samples padded to 64, 37 taps).
// A random real filter is loaded into the coefficient RAM as its 64-bin
// spectrum (2^12 = 1.0, shifts 2/13/3 give unity gain), then 12 random
// zero-padded segments and 6 zero segments are streamed with seg_start on
// every 64th cycle. Every valid result segment must equal the linear
// convolution of its input segment with the filter within +-4 LSB, results
// must arrive in input order, the first one at the latency stated in the
// convolver's header, and sync_error must stay clear. Finally a seg_start
// off the 64-cycle grid must set sync_error.
module tb_circular_convolver;
  localparam int  LOG2N = 6;
  localparam int  N     = 2 ** LOG2N;
  localparam int  L     = 28;
  localparam int  M     = N - L + 1;
  localparam int  W     = 16;
  localparam int  QH    = 12;
  localparam int  NSEG  = 12;
  localparam int  NZ    = 6;
  localparam real TOL   = 4.0;
  localparam real PI    = 3.14159265358979323846;
  localparam int  LAT   = 6 * N + 2 * LOG2N + 4;   // first seg_start to first valid out_start

  logic clk = 0, slow_clk = 0, rst = 1;
  logic signed [W-1:0] data_in = '0, data_out;
  logic seg_start = 0, out_start, out_valid, sync_error;
  logic [LOG2N-1:0] filt_ram_addr = '0;
  logic [2*W-1:0]   filt_ram_data = '0;
  logic             filt_ram_we = 0;

  circular_convolver #(.LOG2N(LOG2N), .W(W), .FFT_SHIFT(2), .MULT_SHIFT(13), .IFFT_SHIFT(3)) dut (
    .clk, .rst, .data_in, .seg_start, .data_out, .out_start, .out_valid, .sync_error,
    .slow_clk, .filt_ram_addr, .filt_ram_data, .filt_ram_we);

  always #7  clk = ~clk;
  always #16 slow_clk = ~slow_clk;

  int  checks = 0, failures = 0;
  int  x [NSEG][L];
  real h [M];
  real y [NSEG][N];
  real max_err = 0.0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic logic [31:0] coef_word(input int k);
    real re, im, a;
    re = 0.0;
    im = 0.0;
    for (int m = 0; m < M; m++) begin
      a  = 2.0 * PI * real'(m * k) / real'(N);
      re += h[m] * $cos(a);
      im -= h[m] * $sin(a);
    end
    return {16'($rtoi($floor(re * real'(2 ** QH) + 0.5))), 16'($rtoi($floor(im * real'(2 ** QH) + 0.5)))};
  endfunction

  // output checker: result segments in input order
  longint cyc = 0, t_first_start = -1, t_first_out = -1;
  int oseg = -1, opos = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      int s, p;
      s = out_start ? oseg + 1 : oseg;
      p = out_start ? 0 : opos;
      if (out_start) begin
        oseg <= oseg + 1;
        if (oseg < 0) t_first_out = cyc;
      end
      opos <= p + 1;
      if (s >= 0 && s < NSEG) begin
        checks++;
        if (fabs(real'(data_out) - y[s][p]) > max_err) max_err = fabs(real'(data_out) - y[s][p]);
        if (fabs(real'(data_out) - y[s][p]) > TOL) begin
          failures++;
          if (failures < 10) $display("segment %0d sample %0d: got %0d expected %f", s, p, data_out, y[s][p]);
        end
      end else if (s >= NSEG) begin
        checks++;
        if (fabs(real'(data_out)) > TOL) begin failures++; $display("zero segment %0d sample %0d: %0d", s, p, data_out); end
      end
    end
  end

  initial begin
    for (int m = 0; m < M; m++) h[m] = (real'($urandom_range(0, 2000)) - 1000.0) / 20000.0;
    for (int s = 0; s < NSEG; s++)
      for (int i = 0; i < L; i++) x[s][i] = int'($urandom_range(0, 1000)) - 500;
    for (int s = 0; s < NSEG; s++)
      for (int i = 0; i < N; i++) begin
        y[s][i] = 0.0;
        for (int m = 0; m < M; m++)
          if (i - m >= 0 && i - m < L) y[s][i] += h[m] * real'(x[s][i - m]);
      end

    // load the filter spectrum through the slow-clock write port
    for (int k = 0; k < N; k++) begin
      @(posedge slow_clk);
      filt_ram_we   <= 1'b1;
      filt_ram_addr <= LOG2N'(k);
      filt_ram_data <= coef_word(k);
    end
    @(posedge slow_clk);
    filt_ram_we <= 1'b0;
    @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);

    for (int s = 0; s < NSEG + NZ + 6; s++)
      for (int i = 0; i < N; i++) begin
        seg_start = (i == 0);
        if (s == 0 && i == 0) t_first_start = cyc;
        data_in   = (s < NSEG && i < L) ? W'(x[s][i]) : '0;
        @(negedge clk);
      end
    seg_start = 0;
    repeat (2 * N) @(negedge clk);

    checks++;
    if (oseg < NSEG + NZ - 1) begin failures++; $display("only %0d result segments", oseg + 1); end
    checks++;
    if (t_first_out - t_first_start != LAT) begin
      failures++;
      $display("latency %0d cycles, expected %0d", t_first_out - t_first_start, LAT);
    end
    checks++;
    if (sync_error) begin failures++; $display("sync_error on a regular stream"); end

    // a seg_start off the grid must be reported
    repeat (5) @(negedge clk);
    seg_start = 1;
    @(negedge clk);
    seg_start = 0;
    repeat (N + 3) @(negedge clk);
    seg_start = 1;
    @(negedge clk);
    seg_start = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (!sync_error) begin failures++; $display("off-grid seg_start not reported"); end

    $display("max error %f LSB, latency %0d cycles", max_err, t_first_out - t_first_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
