// fft_r2sdf_stage: one radix-2 decimation-in-frequency stage of the
// streaming FFT (single-path delay feedback).
//
// Stage S of a 2^LOG2N-point transform works on blocks of 2D samples,
// D = 2^(LOG2N-1-S). During the first D samples of a block the input is
// stored in a D-word delay line while the delay line's previous contents
// (the differences of the last block) leave the stage, multiplied by the
// twiddle W_N^(j*2^S). During the second D samples the butterfly adds the
// stored sample to the arriving one and sends the sum out, and stores the
// difference. Each sample carries a tag (frame-valid, inverse, index with a
// frame-parity MSB); the index drives the phase and the twiddle address, and
// leaves the stage D lower, so the stage needs no counter of its own.
// Inverse frames use conjugated twiddles. Timing: a sample of output index k
// leaves D+2 cycles after the input sample of index k. Words are OW bits
// everywhere; OW = IW+LOG2N+1 leaves room for the growth of every stage.
// Twiddles are TW-bit signed with 2^(TW-2) standing for 1.0; products are
// rounded to nearest (truncation would add -1/2 LSB to every twiddled
// sample, which the later stages gather into one output sample of each
// frame, N/4 LSB large after the first stage). The twiddle table is filled
// at elaboration from $cos/$sin. The whole stage is this design's own: the
// source uses a vendor streaming FFT core and describes only its function.
module fft_r2sdf_stage #(
  parameter int unsigned LOG2N = 13,
  parameter int unsigned S     = 0,
  parameter int unsigned OW    = 30,
  parameter int unsigned TW    = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [OW-1:0] in_re,
  input  logic signed [OW-1:0] in_im,
  input  logic                 in_valid,
  input  logic                 in_inv,
  input  logic [LOG2N:0]       in_idx,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im,
  output logic                 out_valid,
  output logic                 out_inv,
  output logic [LOG2N:0]       out_idx
);
  localparam int unsigned D  = 2 ** (LOG2N - 1 - S);
  localparam int unsigned DW = (D > 1) ? $clog2(D) : 1;
  localparam real         PI = 3.14159265358979323846;

  typedef struct packed {
    logic signed [OW-1:0] re;
    logic signed [OW-1:0] im;
    logic                 valid;
    logic                 inv;
    logic [LOG2N:0]       idx;
  } word_t;

  // twiddle table: entry j holds cos and sin of 2*pi*j*2^S/N
  logic signed [TW-1:0] rom_c [D];
  logic signed [TW-1:0] rom_s [D];
  initial begin
    for (int j = 0; j < int'(D); j++) begin
      rom_c[j] = TW'($rtoi($floor($cos(2.0 * PI * real'(j) * real'(2 ** S) / real'(2 ** LOG2N))
                                   * real'(2 ** (TW - 2)) + 0.5)));
      rom_s[j] = TW'($rtoi($floor($sin(2.0 * PI * real'(j) * real'(2 ** S) / real'(2 ** LOG2N))
                                   * real'(2 ** (TW - 2)) + 0.5)));
    end
  end

  // delay line of D words
  // The line itself is not reset; its valid bits are masked until every
  // word has been rewritten after reset (primed), so stale contents never
  // come out marked valid.
  word_t         dl [D];
  logic [DW-1:0] dp;
  word_t         dl_out, dl_in, bf;
  logic          phase, bf_diff, primed;

  always_comb begin
    dl_out       = dl[dp];
    dl_out.valid = dl[dp].valid && primed;
  end
  assign phase  = in_idx[LOG2N-1-S];

  always_comb begin
    if (!phase) begin
      dl_in   = '{re: in_re, im: in_im, valid: in_valid, inv: in_inv, idx: in_idx};
      bf      = dl_out;
      bf_diff = 1'b1;
    end else begin
      bf      = dl_out;
      bf.re   = dl_out.re + in_re;
      bf.im   = dl_out.im + in_im;
      bf_diff = 1'b0;
      dl_in   = dl_out;
      dl_in.re  = dl_out.re - in_re;
      dl_in.im  = dl_out.im - in_im;
      dl_in.idx = dl_out.idx + (LOG2N+1)'(D);
    end
  end

  always_ff @(posedge clk) begin
    dl[dp] <= dl_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dp     <= '0;
      primed <= 1'b0;
    end else begin
      dp     <= (dp == DW'(D - 1)) ? '0 : dp + 1'b1;
      if (dp == DW'(D - 1)) primed <= 1'b1;
    end
  end

  // register 1: butterfly result and twiddle lookup
  word_t                r1;
  logic                 r1_diff;
  logic signed [TW-1:0] tc, ts;
  logic [DW-1:0]        tj;

  assign tj = (D > 1) ? DW'(bf.idx) : '0;

  always_ff @(posedge clk) begin
    r1      <= bf;
    r1_diff <= bf_diff;
    tc      <= rom_c[tj];
    ts      <= rom_s[tj];
  end

  // register 2: twiddle multiply of the differences
  logic signed [OW+TW:0] pre, pim;
  localparam logic signed [OW+TW:0] HALF = (OW+TW+1)'(1) <<< (TW - 3);
  always_comb begin
    if (!r1.inv) begin
      pre = r1.re * tc + r1.im * ts;
      pim = r1.im * tc - r1.re * ts;
    end else begin
      pre = r1.re * tc - r1.im * ts;
      pim = r1.im * tc + r1.re * ts;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_inv   <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= r1.valid;
      out_inv   <= r1.inv;
      out_idx   <= r1.idx;
      if (r1_diff) begin
        out_re <= OW'((pre + HALF) >>> (TW - 2));
        out_im <= OW'((pim + HALF) >>> (TW - 2));
      end else begin
        out_re <= r1.re;
        out_im <= r1.im;
      end
    end
  end
endmodule
