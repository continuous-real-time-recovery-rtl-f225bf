// zero_padder: cuts the ADC stream into zero-padded segments.
//
// ADC samples enter an asynchronous FIFO at the slow clock, one per cycle,
// without pause. On the fast side the block emits frames of N = 2^LOG2N
// samples: L samples read from the FIFO followed by N-L = M-1 zeros, where M
// is the filter length. With the fast clock N/L times the slow clock (16/7
// in the main configuration) one frame takes exactly as long as L ADC
// samples, so the FIFO level repeats from frame to frame.
//
// Start-up: the first frame starts once the FIFO holds START_LEVEL samples,
// ceil(L*(N-L)/N) plus a margin for the pointer synchronisers; that is the
// least that lets L samples be drained at the fast rate without running
// dry, and it keeps the peak level low (2024 of 2048 words by default).
// After that a frame starts every N fast cycles. seg_start marks the first
// sample of each frame; the circular convolver locks to it.
// Timing: data_out/seg_start come from registers, two fast cycles after the
// FIFO read is issued. overflow/underflow are sticky error flags.
// The FIFO and the zero multiplexer follow the source; the level-based start
// is this design's choice.
module zero_padder #(
  parameter int unsigned LOG2N   = 13,
  parameter int unsigned L       = 3584,
  parameter int unsigned W       = 16,
  parameter int unsigned FIFO_AW = 11
) (
  input  logic         slow_clk,
  input  logic         slow_rst,
  input  logic [W-1:0] data_in,
  input  logic         fast_clk,
  input  logic         fast_rst,
  output logic [W-1:0] data_out,
  output logic         seg_start,
  output logic         running,
  output logic         overflow,
  output logic         underflow
);
  localparam int unsigned N           = 2 ** LOG2N;
  localparam int unsigned START_LEVEL = (L * (N - L) + N - 1) / N + 8;

  logic               f_full, f_empty, rd_en;
  logic [FIFO_AW:0]   rd_count;
  logic [W-1:0]       f_dout;
  logic [LOG2N-1:0]   cnt;
  logic               rd_q, start_q;

  async_fifo #(.W(W), .AW(FIFO_AW)) u_fifo (
    .wclk(slow_clk), .wrst(slow_rst), .wr_en(1'b1), .din(data_in),
    .full(f_full),
    .rclk(fast_clk), .rrst(fast_rst), .rd_en(rd_en), .dout(f_dout),
    .empty(f_empty), .rd_count(rd_count));

  always_ff @(posedge slow_clk) begin
    if (slow_rst)    overflow <= 1'b0;
    else if (f_full) overflow <= 1'b1;
  end

  assign rd_en = running && (cnt < LOG2N'(L));

  always_ff @(posedge fast_clk) begin
    if (fast_rst) begin
      running   <= 1'b0;
      cnt       <= '0;
      rd_q      <= 1'b0;
      start_q   <= 1'b0;
      data_out  <= '0;
      seg_start <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (!running) begin
        if (rd_count >= (FIFO_AW+1)'(START_LEVEL)) running <= 1'b1;
        cnt <= '0;
      end else begin
        cnt <= cnt + 1'b1;  // wraps every N
      end
      if (rd_en && f_empty) underflow <= 1'b1;
      rd_q      <= rd_en;
      start_q   <= running && (cnt == '0);
      data_out  <= rd_q ? f_dout : '0;
      seg_start <= start_q;
    end
  end

  // The FIFO must be deep enough for the start level plus the synchroniser lag.
  initial assert (START_LEVEL + 4 <= 2 ** FIFO_AW)
    else $error("zero_padder: FIFO of 2^%0d words too small for start level %0d", FIFO_AW, START_LEVEL);
endmodule
