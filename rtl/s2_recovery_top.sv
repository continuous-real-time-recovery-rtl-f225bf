// s2_recovery_top: real-time recovery processor and readout chirp generator.
//
// Recovery processor: ADC samples of a fast-chirped spectral readout stream in
// at the slow clock and are filtered, without a break, by a long FIR filter
// (4609 taps in the main configuration) that undoes the readout's quadratic
// phase distortion. The filter runs as overlap-add block convolution:
//   zero_padder        -> segments of L samples padded with M-1 zeros,
//   circular_convolver -> FFT, multiply by the stored filter spectrum, IFFT,
//                         two real segments per pass of one FFT core,
//   overlap_adder      -> adds the overlapping tails, back to the slow clock.
// The fast clock must be N/L times the slow clock (16/7: 206 MHz and about
// 90 MHz in the source); both are inputs, as the clock manager deriving one
// from the other is not part of this RTL. The filter spectrum is written
// through filt_ram_* at the slow clock (one {re, im} word per bin); the
// RAM starts all-zero, i.e. the output is zero until a filter is loaded.
// status = {convolver sync error, input FIFO overflow, input FIFO underflow,
// output FIFO overflow, output FIFO underflow}, all sticky.
// Gain: with the default shifts the output is the convolution with taps
// h = IDFT(filter words) / 2^18, i.e. a spectral word of 2^18 is a tap of 1.0
// (filter words are 16-bit, so usable gains are below 1/8).
// Latency: about 6.6 N fast cycles from an input sample to its result.
//
// Follows the source: the three-stage chain, the N/L clock ratio, the filter
// RAM written at the slow clock through a second port, the 16-bit sample
// and coefficient words, the chirp generator's ports. This design's own: the
// status flags, the reset synchronisers, and placing the chirp generator
// (a separate FPGA design in the source) beside the processor in one top.
//
// Chirp generator: independent of the processor (it drives the readout
// laser's modulator in the source), with its own clock and ports; chirp_out
// is the parallel word for a LANES:1 serializer.
// rst is synchronised into each clock domain.
module s2_recovery_top #(
  parameter int unsigned LOG2N       = 13,
  parameter int unsigned L           = 3584,
  parameter int unsigned IN_FIFO_AW  = 11,
  parameter int unsigned OUT_FIFO_AW = 11,
  parameter int unsigned FFT_SHIFT   = 7,
  parameter int unsigned MULT_SHIFT  = 15,
  parameter int unsigned IFFT_SHIFT  = 9,
  parameter int unsigned LANES       = 40,
  parameter int unsigned CAW         = 24
) (
  input  logic               slow_clk,
  input  logic               fast_clk,
  input  logic               rst,
  input  logic [15:0]        data_in,
  output logic [15:0]        data_out,
  output logic               data_out_valid,
  input  logic [LOG2N-1:0]   filt_ram_addr,
  input  logic [31:0]        filt_ram_data,
  input  logic               filt_ram_we,
  output logic [4:0]         status,
  // chirp generator
  input  logic               chirp_clk,
  input  logic               chirp_start,
  output logic               chirp_done,
  output logic [LANES-1:0]   chirp_out,
  input  logic [CAW-1:0]     chirp_rate,
  input  logic [CAW-1:0]     chirp_dur,
  input  logic [CAW-1:0]     phase_init_shift_in,
  input  logic               phase_init_shift_en,
  input  logic [CAW-1:0]     freq_init_shift_in,
  input  logic               freq_init_shift_en
);
  localparam int unsigned W = 16;

  // reset synchronisers
  logic [1:0] srst_sh, frst_sh, crst_sh;
  logic       slow_rst, fast_rst, chirp_rst;
  always_ff @(posedge slow_clk)  srst_sh <= {srst_sh[0], rst};
  always_ff @(posedge fast_clk)  frst_sh <= {frst_sh[0], rst};
  always_ff @(posedge chirp_clk) crst_sh <= {crst_sh[0], rst};
  assign slow_rst  = srst_sh[1] || rst;
  assign fast_rst  = frst_sh[1] || rst;
  assign chirp_rst = crst_sh[1] || rst;

  logic signed [W-1:0] zp_data, cv_data;
  logic                zp_start, zp_running, zp_ovf, zp_unf;
  logic                cv_start, cv_valid, cv_sync_err;
  logic                oa_ovf, oa_unf;

  zero_padder #(.LOG2N(LOG2N), .L(L), .W(W), .FIFO_AW(IN_FIFO_AW)) u_zero_padder (
    .slow_clk, .slow_rst, .data_in,
    .fast_clk, .fast_rst,
    .data_out(zp_data), .seg_start(zp_start), .running(zp_running),
    .overflow(zp_ovf), .underflow(zp_unf));

  circular_convolver #(.LOG2N(LOG2N), .W(W), .FFT_SHIFT(FFT_SHIFT),
                       .MULT_SHIFT(MULT_SHIFT), .IFFT_SHIFT(IFFT_SHIFT)) u_convolver (
    .clk(fast_clk), .rst(fast_rst),
    .data_in(zp_data), .seg_start(zp_start),
    .data_out(cv_data), .out_start(cv_start), .out_valid(cv_valid),
    .sync_error(cv_sync_err),
    .slow_clk, .filt_ram_addr, .filt_ram_data, .filt_ram_we);

  overlap_adder #(.LOG2N(LOG2N), .L(L), .W(W), .OFIFO_AW(OUT_FIFO_AW)) u_overlap_adder (
    .fast_clk, .fast_rst,
    .data_in(cv_data), .in_start(cv_start), .in_valid(cv_valid),
    .slow_clk, .slow_rst,
    .data_out(data_out), .out_valid(data_out_valid),
    .overflow(oa_ovf), .underflow(oa_unf));

  assign status = {cv_sync_err, zp_ovf, zp_unf, oa_ovf, oa_unf};

  chirp_gen #(.LANES(LANES), .AW(CAW)) u_chirp_gen (
    .clk(chirp_clk), .rst(chirp_rst),
    .chirp_start, .chirp_done, .chirp_out, .chirp_rate, .chirp_dur,
    .phase_init_shift_in, .phase_init_shift_en,
    .freq_init_shift_in, .freq_init_shift_en);

  // zp_running is reported only through the segment stream
  logic unused_ok;
  assign unused_ok = zp_running;
endmodule
