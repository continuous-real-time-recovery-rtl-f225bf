// overlap_adder: reassembles the linear convolution from circular-convolution
// segments and returns it to the ADC clock.
//
// Each incoming segment y_k is N = L+M-1 samples long and starts L samples
// after the previous one in output time, so it overlaps the next segments by
// M-1 samples. With M-1 > L (4608 > 3584 in the main configuration) a sample
// can collect parts of three segments. The block keeps one tail buffer: a
// FIFO of fixed occupancy N-L, i.e. a delay line of N-L fast cycles. For
// sample i of a segment it forms sum = y[i] + tail, where tail is what the
// buffer returns (the running sum of the earlier segments' tails at this
// position, zero for i >= N-L). Samples i < L are finished and go to the
// output; samples i >= L are pushed back into the buffer, to meet the next
// segment N-L cycles later. Invalid segments push zeros.
// Results enter an asynchronous FIFO at the fast clock, L per segment, and
// leave at the slow clock, one per cycle, once 16 samples are buffered.
// Timing: a sample's sum is formed one fast cycle after it arrives. Sums
// saturate to W bits. overflow/underflow are sticky error flags.
// The source overlaps and adds with two FIFOs and a three-input adder; the
// recirculating single buffer is this design's equivalent.
module overlap_adder #(
  parameter int unsigned LOG2N    = 13,
  parameter int unsigned L        = 3584,
  parameter int unsigned W        = 16,
  parameter int unsigned OFIFO_AW = 11
) (
  input  logic                fast_clk,
  input  logic                fast_rst,
  input  logic signed [W-1:0] data_in,
  input  logic                in_start,
  input  logic                in_valid,
  input  logic                slow_clk,
  input  logic                slow_rst,
  output logic signed [W-1:0] data_out,
  output logic                out_valid,
  output logic                overflow,
  output logic                underflow
);
  import recovery_pkg::*;

  localparam int unsigned N  = 2 ** LOG2N;
  localparam int unsigned D  = N - L;          // overlap M-1
  localparam int unsigned DW = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned OUT_START = 16;

  // segment position counter, locked to in_start
  logic [LOG2N-1:0] pos, cur;
  logic             locked, seg_v, cur_v;

  assign cur   = in_start ? '0 : pos;
  assign cur_v = in_start ? in_valid : seg_v;

  always_ff @(posedge fast_clk) begin
    if (fast_rst) begin
      pos    <= '0;
      locked <= 1'b0;
      seg_v  <= 1'b0;
    end else begin
      if (in_start) locked <= 1'b1;
      pos   <= cur + 1'b1;
      seg_v <= cur_v;
    end
  end

  // stage 1: sample, position and tail value, one cycle after arrival
  logic signed [W-1:0] y_q;
  logic [LOG2N-1:0]    i_q;
  logic                v_q, l_q;

  always_ff @(posedge fast_clk) begin
    if (fast_rst) begin
      y_q <= '0;
      i_q <= '0;
      v_q <= 1'b0;
      l_q <= 1'b0;
    end else begin
      y_q <= data_in;
      i_q <= cur;
      v_q <= cur_v;
      l_q <= locked || in_start;
    end
  end

  // tail buffer: delay line of D cycles (read at tp, write at the previous tp)
  logic signed [W-1:0] tail_mem [D];
  logic [DW-1:0]       tp, tp_q;
  logic signed [W-1:0] tail_rd, tail, push_val;
  logic signed [W:0]   sum_full;
  logic signed [W-1:0] sum;
  logic [DW+1:0]       fill;   // counts cycles since reset up to D+2
  logic                push_ok;

  always_ff @(posedge fast_clk) begin
    tail_rd <= tail_mem[tp];
    tail_mem[tp_q] <= push_val;
  end

  always_ff @(posedge fast_clk) begin
    if (fast_rst) begin
      tp   <= '0;
      tp_q <= '0;
      fill <= '0;
    end else begin
      tp   <= (tp == DW'(D - 1)) ? '0 : tp + 1'b1;
      tp_q <= tp;
      if (fill != (DW+2)'(D + 2)) fill <= fill + 1'b1;
    end
  end

  // contents written before reset are masked until the line has been refilled
  assign tail     = (fill == (DW+2)'(D + 2) && i_q < LOG2N'(D)) ? tail_rd : '0;
  assign sum_full = (W+1)'(y_q) + (W+1)'(tail);
  assign sum      = W'(shift_sat(64'(sum_full), 0, W));
  assign push_ok  = l_q && v_q && (i_q >= LOG2N'(L));
  assign push_val = push_ok ? sum : '0;

  // output FIFO
  logic           of_wr, of_full, of_empty, of_rd, streaming, rd_q;
  logic [OFIFO_AW:0] of_rcount;
  logic [W-1:0]   of_dout;

  assign of_wr = l_q && v_q && (i_q < LOG2N'(L));

  async_fifo #(.W(W), .AW(OFIFO_AW)) u_ofifo (
    .wclk(fast_clk), .wrst(fast_rst), .wr_en(of_wr), .din(sum),
    .full(of_full),
    .rclk(slow_clk), .rrst(slow_rst), .rd_en(of_rd), .dout(of_dout),
    .empty(of_empty), .rd_count(of_rcount));

  always_ff @(posedge fast_clk) begin
    if (fast_rst)             overflow <= 1'b0;
    else if (of_wr && of_full) overflow <= 1'b1;
  end

  assign of_rd = streaming;

  always_ff @(posedge slow_clk) begin
    if (slow_rst) begin
      streaming <= 1'b0;
      rd_q      <= 1'b0;
      underflow <= 1'b0;
      out_valid <= 1'b0;
      data_out  <= '0;
    end else begin
      if (of_rcount >= (OFIFO_AW+1)'(OUT_START)) streaming <= 1'b1;
      if (streaming && of_empty) underflow <= 1'b1;
      rd_q      <= streaming && !of_empty;
      out_valid <= rd_q;
      data_out  <= rd_q ? of_dout : '0;
    end
  end
endmodule
