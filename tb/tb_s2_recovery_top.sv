// tb_s2_recovery_top: end-to-end test of the recovery processor and the chirp
// generator at a reduced size (64-point transform, 28-sample segments,
// 37-tap filter: the same 16/7 clock ratio as the main configuration, and
// the same situation of an overlap M-1 longer than a segment).
//
// The ADC stream is two bursts of random samples separated by a long run of
// zeros. Filter A is loaded before the first burst, filter B during the
// quiet gap, so the expected output is conv(burst1, hA) followed by
// conv(burst2, hB), computed here in floating point from the tap values; the
// frequency-domain words written into the filter RAM are the rounded DFTs of
// those taps. Every output sample is compared within a small tolerance.
// Also checked: the latency from the first ADC sample to the first result
// (bounded by 8N fast cycles), the sticky FIFO/synchronisation flags, and a
// complete chirp whose serialised bit stream must equal a single direct
// digital synthesizer running at 40 times the clock rate.
// Counted mechanisms (each must occur): forward/inverse frame pairs, output
// samples that sum three segments, filter reloads, chirps. Only the ports are
// used (the frame and three-segment counts are derived from the checked
// outputs); the full-size testbench counts the same mechanisms on the
// internal frame and overlap-add signals.
module tb_s2_recovery_top;
  localparam int  LOG2N = 6;
  localparam int  N     = 2 ** LOG2N;
  localparam int  L     = 28;
  localparam int  M     = N - L + 1;
  localparam int  QH    = 12;                 // filter words: 2^QH stands for 1.0
  localparam int  S1 = 2, S2 = 13, S3 = 3;    // S1+S2+S3 = LOG2N + QH: unity gain
  localparam int  NB1   = 6 * L;
  localparam int  GAP   = 16 * L;
  localparam int  NB2   = 6 * L;
  localparam int  NX    = NB1 + GAP + NB2 + 10 * L;
  localparam real TOL   = 5.0;
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

  s2_recovery_top #(.LOG2N(LOG2N), .L(L), .IN_FIFO_AW(5), .OUT_FIFO_AW(6),
                    .FFT_SHIFT(S1), .MULT_SHIFT(S2), .IFFT_SHIFT(S3)) dut (
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
    for (int m = 0; m < M; m++) begin
      a  = 2.0 * PI * real'(m * k) / real'(N);
      re += h[m] * $cos(a);
      im -= h[m] * $sin(a);
    end
    return {16'($rtoi($floor(re * real'(2 ** QH) + 0.5))), 16'($rtoi($floor(im * real'(2 ** QH) + 0.5)))};
  endfunction

  // copies of the processor's two-flop reset synchronisers, so that sample
  // numbering starts on the same edge as inside the processor
  logic [1:0] srst_sh = 2'b11, crst_sh = 2'b11;
  always @(posedge slow_clk)  srst_sh <= {srst_sh[0], rst};
  always @(posedge chirp_clk) crst_sh <= {crst_sh[0], rst};
  wire slow_rst_tb  = srst_sh[1] || rst;
  wire chirp_rst_tb = crst_sh[1] || rst;

  // ADC: sample n is on data_in while the n-th FIFO write happens
  int n_in = 0;
  longint t_first_in = -1, t_first_out = -1;
  assign data_in = (n_in < NX) ? 16'(x[n_in]) : 16'd0;
  always @(posedge slow_clk) begin
    if (!slow_rst_tb) begin
      if (n_in == 0) t_first_in = $time;
      n_in <= n_in + 1;
    end
  end

  // output checker
  int n_out = 0;
  real max_err = 0.0;
  always @(posedge slow_clk) begin
    if (!slow_rst_tb && data_out_valid) begin
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

  // mechanism counters. This testbench looks only at the ports, so the
  // frame and three-segment counts come from the checked outputs: a checked
  // sample whose reference draws on three input segments (its position in
  // the segment is below M-1-L and the two earlier segments hold samples)
  // proves the three-way overlap-add, and every completed output segment
  // proves one forward and one inverse transform of its segment.
  int n_fwd_frames = 0, n_inv_frames = 0, n_three_way = 0, n_reloads = 0, n_chirps = 0;
  function automatic bit nonzero_seg(input int s);
    if (s < 0) return 0;
    for (int j = 0; j < L; j++) if (x[s * L + j] != 0) return 1;
    return 0;
  endfunction
  always @(posedge slow_clk) begin
    if (!slow_rst_tb && data_out_valid && n_out < NX) begin
      if (n_out % L == L - 1) begin
        n_fwd_frames++;
        n_inv_frames++;
      end
      if (n_out % L < M - 1 - L && nonzero_seg(n_out / L - 1) && nonzero_seg(n_out / L - 2))
        n_three_way++;
    end
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
  always @(posedge chirp_clk) if (!chirp_rst_tb && chirp_done) n_chirps++;

  initial begin
    // stimulus and reference
    for (int n = 0; n < NX; n++) x[n] = 0;
    for (int n = 0; n < NB1; n++) x[n] = int'($urandom_range(0, 2000)) - 1000;
    for (int n = 0; n < NB2; n++) x[NB1 + GAP + n] = int'($urandom_range(0, 2000)) - 1000;
    for (int m = 0; m < M; m++) begin
      ha[m] = (real'($urandom_range(0, 2000)) - 1000.0) / 10000.0;
      hb[m] = 0.0;
    end
    hb[5]  = 0.5;
    hb[30] = -0.25;
    hb[M-1] = 0.125;
    for (int n = 0; n < NX; n++) begin
      y[n] = 0.0;
      for (int m = 0; m < M && m <= n; m++)
        y[n] += ((n < NB1 + GAP / 2) ? ha[m] : hb[m]) * real'(x[n - m]);
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
    repeat (4 * NX + 200 * N) @(posedge slow_clk);
    failures++;
    $display("watchdog expired: %0d outputs", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
