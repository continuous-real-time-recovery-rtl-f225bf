// tb_s2_recovery_top_full: end-to-end test of the recovery processor and the
// chirp generator at full size, with every parameter at its default (8192-
// point transform, 3584-sample segments, 4609-tap filter, shifts 7/15/9,
// 40-lane chirp generator), clocks in the ratio 16/7.
//
// The ADC stream is two bursts of random 14-bit samples separated by a long
// run of zeros. Filter A is loaded before the first burst, filter B during
// the gap. With the default shifts the processor's gain is N * (filter word)
// / 2^31 = (filter word) / 2^18, so 16-bit words give gains below 1/8 and
// the taps used here are small (|sum| 0.117). The filters have taps only at
// delays 0, N/4 and N/2, whose spectra (+-1, +-j per tap) are exactly
// representable, so the reference is the exact linear convolution and the
// tolerance only covers the transform's own rounding. The tap at delay N/2
// (beyond two segment lengths) makes output samples sum three segments.
// Also checked: latency from first ADC sample to first result within 8N fast
// cycles, the sticky FIFO/synchronisation flags, and a complete chirp whose
// serialised bit stream must equal one direct digital synthesizer at 40
// times the clock rate.
// Counted mechanisms (each must occur): forward/inverse frames, three-
// segment sums, filter reloads, chirps. Simulation takes about a minute.
module tb_s2_recovery_top_full;
  localparam int  LOG2N = 13;
  localparam int  N     = 2 ** LOG2N;
  localparam int  L     = 3584;
  localparam int  M     = N - L + 1;
  localparam int  QH    = 18;                 // gain N/2^(7+15+9): word 2^18 is 1.0
  localparam int  NB1   = 6 * L;
  localparam int  GAP   = 16 * L;
  localparam int  NB2   = 6 * L;
  localparam int  NX    = NB1 + GAP + NB2 + 10 * L;
  localparam real TOL   = 3.0;
  localparam real PI    = 3.14159265358979323846;
  localparam int  LANES = 40;
  localparam int  CAW   = 24;

  logic slow_clk = 0, fast_clk = 0, chirp_clk = 0, rst = 1;
  logic [15:0] data_in, data_out;
  logic data_out_valid;
  logic [LOG2N-1:0] filt_ram_addr = '0;
  logic [31:0] filt_ram_data = '0;
  logic filt_ram_we = 0;
  logic [4:0] status;
  logic chirp_start = 0, chirp_done;
  logic [LANES-1:0] chirp_out;
  logic [CAW-1:0] chirp_rate = '0, chirp_dur = '0, phase_in = '0, freq_in = '0;
  logic phase_en = 0, freq_en = 0;

  s2_recovery_top dut (
    .slow_clk, .fast_clk, .rst, .data_in, .data_out, .data_out_valid,
    .filt_ram_addr, .filt_ram_data, .filt_ram_we, .status,
    .chirp_clk, .chirp_start, .chirp_done, .chirp_out, .chirp_rate, .chirp_dur,
    .phase_init_shift_in(phase_in), .phase_init_shift_en(phase_en),
    .freq_init_shift_in(freq_in), .freq_init_shift_en(freq_en));

  // 16 : 7 clock periods give a fast clock 16/7 times the slow one
  always #16 slow_clk  = ~slow_clk;
  always #7  fast_clk  = ~fast_clk;
  always #4  chirp_clk = ~chirp_clk;

  int checks = 0, failures = 0;
  int x [NX];
  real ha [M], hb [M];
  real y [NX];

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic logic [31:0] coef_word(input real h [M], input int k);
    real re, im, a;
    re = 0.0;
    im = 0.0;
    for (int m = 0; m < M; m += N / 4) begin
      a  = 2.0 * PI * real'(m * k) / real'(N);
      re += h[m] * $cos(a);
      im -= h[m] * $sin(a);
    end
    return {16'($rtoi($floor(re * real'(2 ** QH) + 0.5))), 16'($rtoi($floor(im * real'(2 ** QH) + 0.5)))};
  endfunction

  // ADC: sample n is on data_in while the n-th FIFO write happens
  int n_in = 0;
  longint t_first_in = -1, t_first_out = -1;
  assign data_in = (n_in < NX) ? 16'(x[n_in]) : 16'd0;
  always @(posedge slow_clk) begin
    if (!dut.slow_rst) begin
      if (n_in == 0) t_first_in = $time;
      n_in <= n_in + 1;
    end
  end

  // output checker
  int n_out = 0;
  real max_err = 0.0;
  always @(posedge slow_clk) begin
    if (!dut.slow_rst && data_out_valid) begin
      if (n_out == 0) t_first_out = $time;
      if (n_out < NX) begin
        checks++;
        if (fabs(real'($signed(data_out)) - y[n_out]) > max_err) max_err = fabs(real'($signed(data_out)) - y[n_out]);
        if (fabs(real'($signed(data_out)) - y[n_out]) > TOL) begin
          failures++;
          if (failures < 10) $display("out %0d: got %0d expected %f", n_out, $signed(data_out), y[n_out]);
        end
      end
      n_out <= n_out + 1;
    end
  end

  // mechanism counters
  int n_fwd_frames = 0, n_inv_frames = 0, n_three_way = 0, n_reloads = 0, n_chirps = 0;
  always @(posedge fast_clk) begin
    if (!dut.fast_rst && dut.u_convolver.xk_valid && dut.u_convolver.xk_index[LOG2N-1:0] == '0) begin
      if (dut.u_convolver.xk_inv) n_inv_frames++;
      else                        n_fwd_frames++;
    end
    // a finished sample whose tail holds parts of two earlier segments
    if (dut.u_overlap_adder.of_wr && dut.u_overlap_adder.i_q < LOG2N'(N - 2 * L)
        && dut.u_overlap_adder.tail != 0)
      n_three_way++;
  end

  task automatic load_filter(input real h [M]);
    for (int k = 0; k < N; k++) begin
      @(posedge slow_clk);
      filt_ram_we   <= 1'b1;
      filt_ram_addr <= LOG2N'(k);
      filt_ram_data <= coef_word(h, k);
    end
    @(posedge slow_clk);
    filt_ram_we <= 1'b0;
    n_reloads++;
  endtask

  // chirp: single DDS at 40x the clock, split over the lanes
  localparam logic [CAW-1:0] F0 = 24'd300000;   // start frequency per serial sample
  localparam logic [CAW-1:0] RS = 24'd37;       // frequency step per serial sample
  localparam int             CDUR = 200;
  int chirp_bits = 0;
  task automatic run_chirp();
    // shift in lane LANES-1 first so that lane i ends up holding value i
    for (int i = LANES - 1; i >= 0; i--) begin
      @(posedge chirp_clk);
      phase_en <= 1'b1;
      freq_en  <= 1'b1;
      phase_in <= CAW'(F0 * CAW'(i) + RS * CAW'(i * (i - 1) / 2));
      freq_in  <= CAW'(CAW'(LANES) * F0 + RS * CAW'(LANES * i + LANES * (LANES - 1) / 2));
    end
    @(posedge chirp_clk);
    phase_en    <= 1'b0;
    freq_en     <= 1'b0;
    chirp_rate  <= CAW'(RS * CAW'(LANES * LANES));
    chirp_dur   <= CAW'(CDUR);
    chirp_start <= 1'b1;
    @(posedge chirp_clk);
    chirp_start <= 1'b0;
    // chirp_out shows clock c's phases one clock later
    for (int c = 0; c <= CDUR; c++) begin
      @(posedge chirp_clk);
      #1;
      for (int i = 0; i < LANES; i++) begin
        longint unsigned sn;
        logic [CAW-1:0] ph;
        sn = longint'(c) * LANES + i;
        ph = CAW'(F0 * CAW'(sn) + RS * CAW'(sn * (sn - 1) / 2));
        checks++;
        chirp_bits++;
        if (chirp_out[i] !== ph[CAW-1]) begin
          failures++;
          if (failures < 10) $display("chirp clock %0d lane %0d wrong", c, i);
        end
      end
    end
    @(posedge chirp_clk);
    @(posedge chirp_clk);
    checks++;
    if (n_chirps != 1) begin failures++; $display("chirp_done count %0d", n_chirps); end
  endtask
  always @(posedge chirp_clk) if (!dut.chirp_rst && chirp_done) n_chirps++;

  initial begin
    // stimulus and reference
    for (int n = 0; n < NX; n++) x[n] = 0;
    for (int n = 0; n < NB1; n++) x[n] = int'($urandom_range(0, 16000)) - 8000;
    for (int n = 0; n < NB2; n++) x[NB1 + GAP + n] = int'($urandom_range(0, 16000)) - 8000;
    for (int m = 0; m < M; m++) begin
      ha[m] = 0.0;
      hb[m] = 0.0;
    end
    // sum of |taps| is 0.1171875: every filter word stays within 30720
    ha[0] = 0.0625;    ha[N/4] = -0.03125; ha[N/2] = 0.0234375;
    hb[0] = -0.046875; hb[N/4] = 0.03125;  hb[N/2] = 0.0390625;
    for (int n = 0; n < NX; n++) begin
      y[n] = 0.0;
      for (int t = 0; t < 3; t++) begin
        int m;
        m = t * N / 4;
        if (m <= n) y[n] += ((n < NB1 + GAP / 2) ? ha[m] : hb[m]) * real'(x[n - m]);
      end
    end
    load_filter(ha);           // the RAM is written while the processor is held in reset
    rst <= 0;
    fork
      run_chirp();
      begin
        wait (n_in == NB1 + 5 * L);
        load_filter(hb);
      end
    join
    wait (n_out == NX);
    @(posedge slow_clk);
    checks++;
    if (status != '0) begin failures++; $display("status flags %b", status); end
    checks++;
    if ((t_first_out - t_first_in) / 14 > 8 * N) begin
      failures++;
      $display("latency %0d fast cycles exceeds 8N", (t_first_out - t_first_in) / 14);
    end
    $display("largest output error: %0.2f", max_err);
    $display("latency: %0d fast cycles (%0.2f N)", (t_first_out - t_first_in) / 14,
             real'(t_first_out - t_first_in) / 14.0 / real'(N));
    $display("mechanisms: fwd frames %0d, inv frames %0d, three-segment sums %0d, filter loads %0d, chirps %0d (%0d bits)",
             n_fwd_frames, n_inv_frames, n_three_way, n_reloads, n_chirps, chirp_bits);
    checks += 5;
    if (n_fwd_frames == 0) failures++;
    if (n_inv_frames == 0) failures++;
    if (n_three_way == 0)  failures++;
    if (n_reloads < 2)     failures++;
    if (n_chirps == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NX + 20 * N) @(posedge slow_clk);
    failures++;
    $display("watchdog expired: %0d outputs", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
