// fft_core: streaming 2^LOG2N-point complex FFT / IFFT.
//
// One complex sample enters and one leaves every clock, so the core finishes
// one transform every N = 2^LOG2N cycles, forward and inverse frames freely
// interleaved. Once run is high the core counts input samples; xn_index tells
// the caller which sample of which frame (MSB = frame parity) it is loading,
// as the vendor core of the original design does, and inv/xn_valid are
// sampled with every sample and travel with it. The transform is a chain of
// LOG2N radix-2 delay-feedback stages (fft_r2sdf_stage), which leaves the bins
// in bit-reversed order; a two-bank memory of 2N words reorders them, writing
// one frame while the other frame is read in natural order.
//
// Timing: input sample k of a frame loaded at cycle t+k leaves as bin k at
// cycle t + LATENCY + k, LATENCY = 2N + 2*LOG2N + 1: one frame to load, one
// to reorder, as in the load/process/unload steps of the original schedule,
// plus two pipeline registers per stage and one at each end.
// Arithmetic: unscaled; the output is OW = IW+LOG2N+1 bits, enough for the
// growth of one bit per stage. The inverse has no 1/N factor.
// The core itself is this design's own: the source names a vendor pipelined
// streaming core and gives only its function and word widths.
module fft_core #(
  parameter int unsigned LOG2N = 13,
  parameter int unsigned IW    = 16,
  parameter int unsigned OW    = IW + LOG2N + 1,
  parameter int unsigned TW    = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 run,
  input  logic                 inv,
  input  logic                 xn_valid,
  input  logic signed [IW-1:0] xn_re,
  input  logic signed [IW-1:0] xn_im,
  output logic [LOG2N:0]       xn_index,
  output logic signed [OW-1:0] xk_re,
  output logic signed [OW-1:0] xk_im,
  output logic [LOG2N:0]       xk_index,
  output logic                 xk_inv,
  output logic                 xk_valid
);
  localparam int unsigned N = 2 ** LOG2N;

  // input counter and register
  always_ff @(posedge clk) begin
    if (rst)      xn_index <= '0;
    else if (run) xn_index <= xn_index + 1'b1;
  end

  logic signed [OW-1:0] s_re  [LOG2N+1];
  logic signed [OW-1:0] s_im  [LOG2N+1];
  logic                 s_val [LOG2N+1];
  logic                 s_inv [LOG2N+1];
  logic [LOG2N:0]       s_idx [LOG2N+1];

  always_ff @(posedge clk) begin
    if (rst) begin
      s_re[0]  <= '0;
      s_im[0]  <= '0;
      s_val[0] <= 1'b0;
      s_inv[0] <= 1'b0;
      s_idx[0] <= '0;
    end else begin
      s_re[0]  <= OW'(xn_re);
      s_im[0]  <= OW'(xn_im);
      s_val[0] <= run && xn_valid;
      s_inv[0] <= inv;
      s_idx[0] <= xn_index;
    end
  end

  for (genvar g = 0; g < LOG2N; g++) begin : g_stage
    fft_r2sdf_stage #(.LOG2N(LOG2N), .S(g), .OW(OW), .TW(TW)) u_stage (
      .clk      (clk),
      .rst      (rst),
      .in_re    (s_re[g]),
      .in_im    (s_im[g]),
      .in_valid (s_val[g]),
      .in_inv   (s_inv[g]),
      .in_idx   (s_idx[g]),
      .out_re   (s_re[g+1]),
      .out_im   (s_im[g+1]),
      .out_valid(s_val[g+1]),
      .out_inv  (s_inv[g+1]),
      .out_idx  (s_idx[g+1])
    );
  end

  // bit-reversal memory: bank = frame parity
  logic [2*OW-1:0]  rmem [2*N];
  logic             bank_val [2];
  logic             bank_inv [2];
  logic [LOG2N-1:0] o_pos, o_rev;
  logic             o_par;

  assign o_pos = s_idx[LOG2N][LOG2N-1:0];
  assign o_par = s_idx[LOG2N][LOG2N];
  always_comb
    for (int b = 0; b < int'(LOG2N); b++) o_rev[b] = o_pos[LOG2N-1-b];

  always_ff @(posedge clk) begin
    rmem[{o_par, o_rev}] <= {s_re[LOG2N], s_im[LOG2N]};
    {xk_re, xk_im}       <= rmem[{~o_par, o_pos}];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bank_val <= '{1'b0, 1'b0};
      bank_inv <= '{1'b0, 1'b0};
      xk_index <= '0;
      xk_inv   <= 1'b0;
      xk_valid <= 1'b0;
    end else begin
      if (o_pos == '0) begin
        bank_val[o_par] <= s_val[LOG2N];
        bank_inv[o_par] <= s_inv[LOG2N];
      end
      xk_index <= {~o_par, o_pos};
      xk_inv   <= bank_inv[~o_par];
      xk_valid <= bank_val[~o_par];
    end
  end

  // The reorder memory must see one frame per N cycles: the output index
  // advances by exactly one while valid frames stream.
  property p_stream;
    @(posedge clk) disable iff (rst) (s_val[LOG2N] && $past(s_val[LOG2N]))
      |-> (s_idx[LOG2N] == $past(s_idx[LOG2N]) + 1'b1);
  endproperty
  a_stream: assert property (p_stream);
endmodule
