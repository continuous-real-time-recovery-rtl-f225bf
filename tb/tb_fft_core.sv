// tb_fft_core: self-checking test of the streaming FFT/IFFT core.
//
// Streams NF back-to-back random frames of a 64-point transform, alternating
// forward and inverse, and compares every output bin with a DFT computed here
// in floating point (tolerance covers the truncation of the fixed-point
// core). Also checks the frame tags on the output and the latency
// 2N + 2*LOG2N + 1 from the first input sample to the first output bin.
module tb_fft_core;
  localparam int LOG2N = 6;
  localparam int N     = 2 ** LOG2N;
  localparam int IW    = 16;
  localparam int OW    = IW + LOG2N + 1;
  localparam int NF    = 6;
  localparam int LAT   = 2 * N + 2 * LOG2N + 1;
  localparam real PI   = 3.14159265358979323846;

  logic clk = 0, rst = 1, run = 0;
  logic signed [IW-1:0] xn_re, xn_im;
  logic [LOG2N:0] xn_index, xk_index;
  logic signed [OW-1:0] xk_re, xk_im;
  logic xk_inv, xk_valid, inv;

  fft_core #(.LOG2N(LOG2N), .IW(IW)) dut (
    .clk, .rst, .run, .inv, .xn_valid(1'b1), .xn_re, .xn_im, .xn_index,
    .xk_re, .xk_im, .xk_index, .xk_inv, .xk_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  int in_re [NF][N];
  int in_im [NF][N];
  real ex_re [NF][N];
  real ex_im [NF][N];
  real peak [NF];

  int frame_in = 0, frame_out = -1, nbins = 0;
  longint cyc = 0, t_first_in = -1, t_first_out = -1;

  // input: the core samples xn at the clock edge while xn_index names it
  always_comb begin
    if (run && frame_in < NF) begin
      xn_re = IW'(in_re[frame_in][xn_index[LOG2N-1:0]]);
      xn_im = IW'(in_im[frame_in][xn_index[LOG2N-1:0]]);
    end else begin
      xn_re = '0;
      xn_im = '0;
    end
    inv = frame_in[0];
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (run) begin
      if (t_first_in < 0) t_first_in <= cyc;
      if (xn_index[LOG2N-1:0] == LOG2N'(N - 1)) frame_in <= frame_in + 1;
    end
  end

  // output checker
  always @(posedge clk) begin
    if (!rst && xk_valid) begin
      automatic int f = frame_out;
      automatic int k = int'(xk_index[LOG2N-1:0]);
      automatic real tol;
      if (k == 0) begin
        f = frame_out + 1;
        frame_out <= f;
        if (t_first_out < 0) t_first_out <= cyc;
      end
      if (f >= 0 && f < NF) begin
        tol = 12.0 + 2.0e-3 * peak[f];
        checks++;
        if (fabs(real'(xk_re) - ex_re[f][k]) > tol || fabs(real'(xk_im) - ex_im[f][k]) > tol) begin
          failures++;
          if (failures < 10)
            $display("frame %0d bin %0d: got (%0d,%0d) expected (%f,%f)", f, k, xk_re, xk_im,
                     ex_re[f][k], ex_im[f][k]);
        end
        checks++;
        if (xk_inv !== f[0]) failures++;
        nbins++;
      end
    end
  end

  initial begin
    // stimulus and reference DFT
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < N; n++) begin
        in_re[f][n] = int'($urandom_range(0, 24000)) - 12000;
        in_im[f][n] = int'($urandom_range(0, 24000)) - 12000;
      end
      if (f == 2) begin  // an impulse frame and a single tone are easy to reason about
        for (int n = 0; n < N; n++) begin in_re[f][n] = 0; in_im[f][n] = 0; end
        in_re[f][3] = 20000;
      end
      peak[f] = 0.0;
      for (int k = 0; k < N; k++) begin
        real sr, si, sg, a;
        sr = 0.0;
        si = 0.0;
        sg = f[0] ? 1.0 : -1.0;
        for (int n = 0; n < N; n++) begin
          a = 2.0 * PI * real'(n * k) / real'(N);
          sr += real'(in_re[f][n]) * $cos(a) - sg * real'(in_im[f][n]) * $sin(a);
          si += real'(in_im[f][n]) * $cos(a) + sg * real'(in_re[f][n]) * $sin(a);
        end
        ex_re[f][k] = sr;
        ex_im[f][k] = si;
        if (fabs(sr) > peak[f]) peak[f] = fabs(sr);
        if (fabs(si) > peak[f]) peak[f] = fabs(si);
      end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    run <= 1;
    wait (nbins == NF * N);
    @(posedge clk);
    checks++;
    if (t_first_out - t_first_in != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", t_first_out - t_first_in, LAT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
