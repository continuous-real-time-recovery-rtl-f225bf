// tb_chirp_gen_workloads: the chirp generator at its defaults (40 lanes,
// 24-bit accumulators, 250 MHz lane clock = 10 Gb/s) running two complete
// chirps:
//   A: 50 MHz to 5 GHz at 10 MHz/us (495 us, 123,750 clocks, 4.95 Mbit),
//   B: 50 MHz to 600 MHz at 20 MHz/us (27.5 us, 6,875 clocks).
// Set-up values are worked out here from the frequencies, as a host would:
// with Ts = 100 ps the serial start frequency is F0 = f0*Ts*2^24 and the
// serial chirp step RS = rate*Ts^2*2^24 (units of 2^-24 turn); the lane
// chirp rate is round(1600*RS), and the lane initial values
// phase_init[i] = F0*i + RS*i*(i-1)/2 and freq_init[i] = 40*F0 + RS*(40*i+780)
// are rounded to integers. RS is not an integer here (1.68 for A), so the
// bit stream is not an exact integer DDS; it is compared instead with the
// ideal chirp phase F0*n + RSq*n*(n-1)/2 (RSq = lane rate / 1600) computed
// in floating point. The rounding of the initial values can move a lane's
// phase by at most 0.4% of a turn over chirp A, so bits whose ideal phase
// lies within 1% of a turn of a 0/1 transition are not compared (and are
// counted). Also checked: chirp_done pulses exactly once, after the
// programmed number of clocks, and the output is zero afterwards.
module tb_chirp_gen_workloads;
  localparam int  LANES = 40;
  localparam int  AW    = 24;
  localparam real TS    = 1.0e-10;         // serial bit period
  localparam real FL    = 250.0e6;         // lane clock
  localparam real TWO24 = 16777216.0;
  localparam real EPS   = 0.01;

  logic clk = 0, rst = 1;
  logic chirp_start = 0, chirp_done;
  logic [LANES-1:0] chirp_out;
  logic [AW-1:0] chirp_rate = '0, chirp_dur = '0, phase_in = '0, freq_in = '0;
  logic phase_en = 0, freq_en = 0;

  chirp_gen dut (
    .clk, .rst, .chirp_start, .chirp_done, .chirp_out, .chirp_rate, .chirp_dur,
    .phase_init_shift_in(phase_in), .phase_init_shift_en(phase_en),
    .freq_init_shift_in(freq_in), .freq_init_shift_en(freq_en));

  always #2 clk = ~clk;   // 4 ns

  int     checks = 0, failures = 0, n_done = 0;
  longint compared = 0, skipped = 0;
  always @(posedge clk) if (!rst && chirp_done) n_done++;

  function automatic logic [AW-1:0] wrap24(input real v);
    real w;
    w = v - TWO24 * $floor(v / TWO24);
    return AW'(longint'($floor(w + 0.5)));
  endfunction

  task automatic run_chirp(input real f0, input real f1, input real rate);
    real f0w, rs, rsq, ph, fr;
    longint clocks, n;
    int done_before;
    f0w    = f0 * TS * TWO24;
    rs     = rate * TS * TS * TWO24;
    clocks = longint'($floor((f1 - f0) / rate * FL + 0.5));
    chirp_rate = AW'(longint'($floor(1600.0 * rs + 0.5)));
    rsq    = real'(longint'($floor(1600.0 * rs + 0.5))) / 1600.0;
    for (int i = LANES - 1; i >= 0; i--) begin
      @(posedge clk);
      phase_en <= 1'b1;
      freq_en  <= 1'b1;
      phase_in <= wrap24(f0w * real'(i) + rsq * real'(i * (i - 1)) / 2.0);
      freq_in  <= wrap24(real'(LANES) * f0w + rsq * real'(LANES * i + 780));
    end
    @(posedge clk);
    phase_en    <= 1'b0;
    freq_en     <= 1'b0;
    chirp_dur   <= AW'(clocks - 1);
    chirp_start <= 1'b1;
    done_before = n_done;
    @(posedge clk);
    chirp_start <= 1'b0;
    for (longint c = 0; c < clocks; c++) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < LANES; i++) begin
        n  = c * LANES + i;
        ph = (f0w * real'(n) + rsq * real'(n) * real'(n - 1) / 2.0) / TWO24;
        fr = ph - $floor(ph);
        if (fr < EPS || fr > 1.0 - EPS || (fr > 0.5 - EPS && fr < 0.5 + EPS)) skipped++;
        else begin
          compared++;
          if (chirp_out[i] != (fr >= 0.5)) begin
            failures++;
            if (failures < 10) $display("clock %0d lane %0d: bit %b, ideal phase %f", c, i, chirp_out[i], fr);
          end
        end
      end
      // chirp_done rises together with the last word
      if (c == clocks - 2) begin
        checks++;
        if (n_done != done_before) begin failures++; $display("chirp_done early at clock %0d", c); end
      end
    end
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (n_done != done_before + 1) begin failures++; $display("chirp_done pulsed %0d times", n_done - done_before); end
    checks++;
    if (chirp_out != '0) begin failures++; $display("output not zero after the chirp"); end
    $display("chirp %0.0f MHz to %0.0f MHz at %0.0f MHz/us: %0d clocks, lane rate word %0d, start word %0d",
             f0 / 1.0e6, f1 / 1.0e6, rate / 1.0e12, clocks, chirp_rate, wrap24(real'(LANES) * f0w));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    run_chirp(50.0e6, 5.0e9, 10.0e12);
    run_chirp(50.0e6, 600.0e6, 20.0e12);
    checks += int'(compared);
    $display("bits compared %0d, bits within %0.2f turn of a transition %0d", compared, EPS, skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (123750 + 6875 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
