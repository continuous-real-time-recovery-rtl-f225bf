// tb_chirp_gen: self-checking test of the 40-lane binary chirp generator.
// Shifts random initial phases and frequencies into the lanes, runs a chirp
// and compares every output bit with a per-lane accumulator model kept here;
// checks the output is zero while idle, that chirp_done pulses once, after
// chirp_dur+1 sending clocks, and that a second chirp with another rate
// starts again from the stored initial values.
module tb_chirp_gen;
  localparam int LANES = 40;
  localparam int AW    = 24;
  logic clk = 0, rst = 1;
  logic chirp_start = 0, chirp_done;
  logic [LANES-1:0] chirp_out;
  logic [AW-1:0] chirp_rate = '0, chirp_dur = '0, pin = '0, fin = '0;
  logic pen = 0, fen = 0;

  chirp_gen #(.LANES(LANES), .AW(AW)) dut (
    .clk, .rst, .chirp_start, .chirp_done, .chirp_out, .chirp_rate, .chirp_dur,
    .phase_init_shift_in(pin), .phase_init_shift_en(pen),
    .freq_init_shift_in(fin), .freq_init_shift_en(fen));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [AW-1:0] p0 [LANES], f0 [LANES];

  task automatic chirp(input logic [AW-1:0] rate, input int dur);
    logic [AW-1:0] ph [LANES], fr [LANES];
    int done_seen;
    for (int i = 0; i < LANES; i++) begin ph[i] = p0[i]; fr[i] = f0[i]; end
    @(negedge clk);
    chirp_rate = rate; chirp_dur = AW'(dur); chirp_start = 1;
    @(negedge clk);
    chirp_start = 0;
    done_seen = 0;
    // the state enters SEND at the edge that saw chirp_start; outputs follow one edge later
    for (int c = 0; c <= dur; c++) begin
      @(negedge clk);
      for (int i = 0; i < LANES; i++) begin
        checks++;
        if (chirp_out[i] !== ph[i][AW-1]) begin
          failures++;
          if (failures < 10) $display("clock %0d lane %0d: got %b", c, i, chirp_out[i]);
        end
        ph[i] = ph[i] + fr[i];
        fr[i] = fr[i] + rate;
      end
      if (chirp_done) done_seen++;
      checks++;
      if ((c == dur) != (chirp_done == 1'b1)) begin
        failures++;
        $display("chirp_done=%b at clock %0d of %0d", chirp_done, c, dur);
      end
    end
    @(negedge clk);
    checks++;
    if (chirp_out !== '0 || chirp_done !== 1'b0 || done_seen != 1) begin
      failures++;
      $display("not idle after chirp");
    end
  endtask

  initial begin
    for (int i = 0; i < LANES; i++) begin p0[i] = AW'($urandom); f0[i] = AW'($urandom); end
    repeat (2) @(negedge clk);
    rst = 0;
    // lane LANES-1 is shifted in first
    for (int i = LANES - 1; i >= 0; i--) begin
      @(negedge clk);
      pen = 1; fen = 1; pin = p0[i]; fin = f0[i];
      checks++;
      if (chirp_out !== '0) failures++;
    end
    @(negedge clk);
    pen = 0; fen = 0;
    chirp(AW'(12345), 60);
    chirp(AW'(999), 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
