// circular_convolver: circular convolution of zero-padded segments with the
// stored filter, two real segments per pass through one FFT core.
//
// A real segment a and the following segment b are packed as a + j*b. Because
// the filter is real, IDFT(DFT(a + j*b) * DFT(h)) has a*h in its real part
// and b*h in its imaginary part, so one forward transform, one complex
// multiply by the stored filter spectrum and one inverse transform serve two
// segments, and the FFT core, alternating forward and inverse frames, is busy
// every cycle.
//
// Schedule, in steps of N fast cycles, counted from the first seg_start
// (segment k arrives during step k):
//   even k : the segment is written into FIFO1; the core loads an inverse
//            frame from the multiplier (real data from step 4 on).
//   odd  k : the core loads a forward frame, FIFO1 (segment k-1) on the real
//            input and the arriving segment k on the imaginary input.
//   forward results leave the core two steps later, cut to W bits, and wait
//            in the Cmult FIFO for the next even step, when they are read in
//            bin order, multiplied by the filter RAM word of the same bin and
//            cut to W bits on the way into the core.
//   inverse results: the real part (segment k-4) is sent out at once, the
//            imaginary part (segment k-3) waits in FIFO2 and follows it.
// Output: one result segment of N samples every N cycles, out_start on its
// first sample, out_valid when it stems from real input. The first valid
// result segment starts 6N + 2*LOG2N + 4 cycles after the first seg_start.
// Word cuts: FFT output >> FFT_SHIFT, product >> MULT_SHIFT, IFFT output >>
// IFFT_SHIFT, each rounded to nearest and saturated to W bits. Shifts and
// the schedule follow the source; rounding and saturation are this design's.
// seg_start off the N-cycle grid sets the sticky sync_error.
// Assertions at the end hold the schedule to its promises: no FIFO is ever
// written full or read empty, FIFO1 holds exactly one segment when its replay
// starts, each new spectrum finds the Cmult FIFO and FIFO2 empty, and the
// core's frame counter stays in step with the segment grid.
module circular_convolver #(
  parameter int unsigned LOG2N      = 13,
  parameter int unsigned W          = 16,
  parameter int unsigned FFT_SHIFT  = 7,
  parameter int unsigned MULT_SHIFT = 15,
  parameter int unsigned IFFT_SHIFT = 9
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] data_in,
  input  logic                seg_start,
  output logic signed [W-1:0] data_out,
  output logic                out_start,
  output logic                out_valid,
  output logic                sync_error,
  input  logic                slow_clk,
  input  logic [LOG2N-1:0]    filt_ram_addr,
  input  logic [2*W-1:0]      filt_ram_data,
  input  logic                filt_ram_we
);
  import recovery_pkg::*;

  localparam int unsigned N  = 2 ** LOG2N;
  localparam int unsigned OW = W + LOG2N + 1;

  // ---------------------------------------------------------------- schedule
  logic             run_q, run_now;
  logic [LOG2N-1:0] pos_q, cur_pos, lead_pos;
  logic [2:0]       step_q, cur_step;   // saturates at 7, only "k >= 4" matters
  logic             par_q, cur_par, lead_par, lead_ge4;

  assign run_now  = run_q || seg_start;
  assign cur_pos  = run_q ? pos_q  : '0;
  assign cur_step = run_q ? step_q : '0;
  assign cur_par  = run_q ? par_q  : 1'b0;
  // the multiplier path reads two cycles ahead of the core input
  assign lead_pos = cur_pos + LOG2N'(2);
  assign lead_par = cur_par ^ (cur_pos >= LOG2N'(N - 2));
  assign lead_ge4 = (cur_step >= 3'd4) || (cur_step == 3'd3 && cur_pos >= LOG2N'(N - 2));

  always_ff @(posedge clk) begin
    if (rst) begin
      run_q      <= 1'b0;
      pos_q      <= '0;
      step_q     <= '0;
      par_q      <= 1'b0;
      sync_error <= 1'b0;
    end else begin
      if (seg_start && run_q && pos_q != '0) sync_error <= 1'b1;
      if (run_now) begin
        run_q <= 1'b1;
        pos_q <= cur_pos + 1'b1;
        if (cur_pos == LOG2N'(N - 1)) begin
          par_q <= ~cur_par;
          if (cur_step != 3'd7) step_q <= cur_step + 1'b1;
        end else begin
          par_q  <= cur_par;
          step_q <= cur_step;
        end
      end
    end
  end

  // ------------------------------------------------------------------ FIFO1
  logic [W-1:0] f1_dout;
  logic [LOG2N:0] f1_count;
  logic f1_empty, f1_full, f1_err;

  sync_fifo #(.W(W), .DEPTH(N)) u_fifo1 (
    .clk, .rst,
    .wr_en(run_now && !cur_par), .din(data_in),
    .rd_en(run_now && cur_par), .dout(f1_dout),
    .count(f1_count), .empty(f1_empty), .full(f1_full), .err(f1_err));

  // stage a: arriving sample, aligned with the FIFO1 output
  logic signed [W-1:0] din_a;
  logic                run_a, par_a, ge4_a;
  logic [LOG2N-1:0]    pos_a;

  always_ff @(posedge clk) begin
    if (rst) begin
      din_a <= '0;
      run_a <= 1'b0;
      par_a <= 1'b0;
      ge4_a <= 1'b0;
      pos_a <= '0;
    end else begin
      din_a <= data_in;
      run_a <= run_now;
      par_a <= cur_par;
      ge4_a <= cur_step >= 3'd4;
      pos_a <= cur_pos;
    end
  end

  // ------------------------------------------------- multiplier and filter
  logic [2*W-1:0]      cm_din, cm_dout, coef;
  logic [LOG2N:0]      cm_count;
  logic                cm_empty, cm_full, cm_err, cm_rd, cm_wr;
  logic signed [2*W:0] pr, pi;
  logic signed [W-1:0] prod_re, prod_im;

  assign cm_rd = run_now && !lead_par && lead_ge4;

  sync_fifo #(.W(2*W), .DEPTH(N)) u_cmult_fifo (
    .clk, .rst,
    .wr_en(cm_wr), .din(cm_din),
    .rd_en(cm_rd), .dout(cm_dout),
    .count(cm_count), .empty(cm_empty), .full(cm_full), .err(cm_err));

  filter_coeff_ram #(.AW(LOG2N), .CW(W)) u_coef_ram (
    .clka(clk), .addra(lead_pos), .douta(coef),
    .clkb(slow_clk), .web(filt_ram_we), .addrb(filt_ram_addr), .dinb(filt_ram_data));

  cmult #(.W(W)) u_cmult (
    .clk,
    .ar(cm_dout[2*W-1:W]), .ai(cm_dout[W-1:0]),
    .br(coef[2*W-1:W]),    .bi(coef[W-1:0]),
    .pr, .pi);

  assign prod_re = W'(shift_sat(64'(pr), MULT_SHIFT, W));
  assign prod_im = W'(shift_sat(64'(pi), MULT_SHIFT, W));

  // --------------------------------------------------------------- FFT core
  logic signed [W-1:0]  xn_re, xn_im;
  logic                 xn_inv, xn_valid;
  logic [LOG2N:0]       xn_index, xk_index;
  logic signed [OW-1:0] xk_re, xk_im;
  logic                 xk_inv, xk_valid;

  always_comb begin
    if (par_a) begin               // forward frame: two segments
      xn_re    = f1_dout;
      xn_im    = din_a;
      xn_inv   = 1'b0;
      xn_valid = 1'b1;
    end else begin                 // inverse frame: filtered spectrum
      xn_re    = ge4_a ? prod_re : '0;
      xn_im    = ge4_a ? prod_im : '0;
      xn_inv   = 1'b1;
      xn_valid = ge4_a;
    end
  end

  fft_core #(.LOG2N(LOG2N), .IW(W), .OW(OW)) u_fft (
    .clk, .rst, .run(run_a), .inv(xn_inv), .xn_valid(xn_valid),
    .xn_re, .xn_im, .xn_index,
    .xk_re, .xk_im, .xk_index, .xk_inv, .xk_valid);

  assign cm_wr  = xk_valid && !xk_inv;
  assign cm_din = {W'(shift_sat(64'(xk_re), FFT_SHIFT, W)), W'(shift_sat(64'(xk_im), FFT_SHIFT, W))};

  // ------------------------------------------------------- FIFO2 and output
  logic [W-1:0]        f2_dout;
  logic [LOG2N:0]      f2_count;
  logic                f2_empty, f2_full, f2_err, f2_wr, f2_rd, f2_v, live;
  logic signed [W-1:0] re_q1;
  logic                sel_q1, v_q1, first_q1;
  logic                cur_f2v;

  assign cur_f2v = (xk_inv && xk_index[LOG2N-1:0] == '0) ? xk_valid : f2_v;
  assign f2_wr   = xk_inv && xk_valid;
  assign f2_rd   = !xk_inv && f2_v;

  sync_fifo #(.W(W), .DEPTH(N)) u_fifo2 (
    .clk, .rst,
    .wr_en(f2_wr), .din(W'(shift_sat(64'(xk_im), IFFT_SHIFT, W))),
    .rd_en(f2_rd), .dout(f2_dout),
    .count(f2_count), .empty(f2_empty), .full(f2_full), .err(f2_err));

  always_ff @(posedge clk) begin
    if (rst) begin
      f2_v      <= 1'b0;
      live      <= 1'b0;
      re_q1     <= '0;
      sel_q1    <= 1'b0;
      v_q1      <= 1'b0;
      first_q1  <= 1'b0;
      data_out  <= '0;
      out_start <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      f2_v     <= cur_f2v;
      if (xk_valid) live <= 1'b1;
      re_q1    <= W'(shift_sat(64'(xk_re), IFFT_SHIFT, W));
      sel_q1   <= xk_inv;
      v_q1     <= xk_inv ? xk_valid : f2_v;
      first_q1 <= (live || xk_valid) && (xk_index[LOG2N-1:0] == '0);
      data_out  <= sel_q1 ? re_q1 : f2_dout;
      out_start <= first_q1;
      out_valid <= v_q1;
    end
  end

  // the schedule guarantees the FIFOs never over- or underflow
  a_cm_rd:  assert property (@(posedge clk) disable iff (rst) cm_rd |-> !cm_empty);
  a_fifo_ok: assert property (@(posedge clk) disable iff (rst) !(f1_err || cm_err || f2_err));
  a_f1_wr:  assert property (@(posedge clk) disable iff (rst) (run_now && !cur_par) |-> !f1_full);
  a_f1_rd:  assert property (@(posedge clk) disable iff (rst) (run_now && cur_par) |-> !f1_empty);
  // FIFO1 holds exactly one segment when its replay starts
  a_f1_seg: assert property (@(posedge clk) disable iff (rst)
                             (run_now && cur_par && cur_pos == '0) |-> f1_count == (LOG2N+1)'(N));
  // each spectrum finds its FIFO empty: the previous one was fully used
  a_cm_wr:  assert property (@(posedge clk) disable iff (rst) cm_wr |-> !cm_full);
  a_cm_new: assert property (@(posedge clk) disable iff (rst)
                             (cm_wr && xk_index[LOG2N-1:0] == '0) |-> cm_count == '0);
  a_f2_wr:  assert property (@(posedge clk) disable iff (rst) f2_wr |-> !f2_full);
  a_f2_rd:  assert property (@(posedge clk) disable iff (rst) f2_rd |-> !f2_empty);
  a_f2_new: assert property (@(posedge clk) disable iff (rst)
                             (f2_wr && xk_index[LOG2N-1:0] == '0) |-> f2_count == '0);
  // the core's frame counter stays aligned with the segment schedule, and
  // every frame leaves with the direction it went in with
  a_xn_idx: assert property (@(posedge clk) disable iff (rst) run_a |-> xn_index == {par_a, pos_a});
  a_xk_dir: assert property (@(posedge clk) disable iff (rst) xk_valid |-> xk_index[LOG2N] != xk_inv);
endmodule
