// tb_zero_padder: self-checking test of the zero padder (64-sample frames,
// 28-sample segments, clocks in the ratio 16/7).
// The ADC stream is a counter (1, 2, 3, ...), so every output sample can be
// predicted: each frame must carry the next 28 stream values in order and
// then 36 zeros, seg_start must mark every frame's first sample exactly 64
// fast cycles apart, and the FIFO must neither over- nor underflow over
// 40 frames. Two more instances run with a wrong clock ratio: a fast clock
// 16/6 times the slow one must raise underflow, one 16/8 times it overflow,
// and neither may raise the other flag.
module tb_zero_padder;
  localparam int LOG2N = 6;
  localparam int N     = 2 ** LOG2N;
  localparam int L     = 28;
  localparam int W     = 16;
  localparam int NSEG  = 40;

  logic slow_clk = 0, fast_clk = 0, slow_rst = 1, fast_rst = 1;
  logic [W-1:0] data_in = 16'd1, data_out;
  logic seg_start, running, overflow, underflow;

  zero_padder #(.LOG2N(LOG2N), .L(L), .W(W), .FIFO_AW(5)) dut (
    .slow_clk, .slow_rst, .data_in, .fast_clk, .fast_rst,
    .data_out, .seg_start, .running, .overflow, .underflow);

  always #16 slow_clk = ~slow_clk;
  always #7  fast_clk = ~fast_clk;

  // wrong clock ratios: too fast (underflow) and too slow (overflow)
  logic hi_clk = 0, lo_clk = 0;
  logic [W-1:0] hi_out, lo_out;
  logic hi_start, lo_start, hi_run, lo_run, hi_ovf, lo_ovf, hi_unf, lo_unf;
  always #6 hi_clk = ~hi_clk;
  always #8 lo_clk = ~lo_clk;
  zero_padder #(.LOG2N(LOG2N), .L(L), .W(W), .FIFO_AW(5)) dut_fast (
    .slow_clk, .slow_rst, .data_in, .fast_clk(hi_clk), .fast_rst,
    .data_out(hi_out), .seg_start(hi_start), .running(hi_run), .overflow(hi_ovf), .underflow(hi_unf));
  zero_padder #(.LOG2N(LOG2N), .L(L), .W(W), .FIFO_AW(5)) dut_slow (
    .slow_clk, .slow_rst, .data_in, .fast_clk(lo_clk), .fast_rst,
    .data_out(lo_out), .seg_start(lo_start), .running(lo_run), .overflow(lo_ovf), .underflow(lo_unf));

  // ADC counter: the value on data_in is written at each slow edge after reset
  always @(posedge slow_clk) if (!slow_rst) data_in <= data_in + 1'b1;

  int checks = 0, failures = 0;
  int seg = -1, pos = 0, expect_val = 1;
  longint last_start = -1, cyc = 0;

  always @(posedge fast_clk) begin
    cyc <= cyc + 1;
    if (!fast_rst && seg_start) begin
      if (seg >= 0) begin
        checks++;
        if (cyc - last_start != N) begin failures++; $display("segment spacing %0d", cyc - last_start); end
      end
      last_start <= cyc;
      seg <= seg + 1;
      pos <= 1;
      checks++;
      if (data_out != W'(expect_val)) begin failures++; $display("segment %0d starts with %0d expected %0d", seg + 1, data_out, expect_val); end
      expect_val <= expect_val + 1;
    end else if (seg >= 0) begin
      checks++;
      if (pos < L) begin
        if (data_out != W'(expect_val)) begin
          failures++;
          if (failures < 10) $display("segment %0d pos %0d: %0d expected %0d", seg, pos, data_out, expect_val);
        end
        expect_val <= expect_val + 1;
      end else if (data_out != '0) begin
        failures++;
        if (failures < 10) $display("segment %0d pos %0d: %0d expected zero", seg, pos, data_out);
      end
      pos <= pos + 1;
    end
  end

  initial begin
    repeat (3) @(posedge slow_clk);
    slow_rst <= 0;
    fast_rst <= 0;
    wait (seg == NSEG);
    checks++;
    if (overflow || underflow) begin failures++; $display("overflow %b underflow %b", overflow, underflow); end
    checks += 2;
    if (!hi_unf || hi_ovf) begin failures++; $display("fast clock too fast: underflow %b overflow %b", hi_unf, hi_ovf); end
    if (!lo_ovf || lo_unf) begin failures++; $display("fast clock too slow: overflow %b underflow %b", lo_ovf, lo_unf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSEG * N + 2000) @(posedge fast_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
