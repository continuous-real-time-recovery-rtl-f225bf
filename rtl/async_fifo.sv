// async_fifo: dual-clock FIFO of 2^AW words of W bits.
//
// Classic Gray-pointer design: each side keeps a binary pointer of AW+1 bits
// and publishes its Gray code, which the other side samples through two
// flip-flops. Each side computes its own occupancy from its pointer and the
// synchronised pointer of the other side, so the write side may see the FIFO
// fuller, and the read side emptier, than it is by a few cycles, never the
// reverse. dout is registered: a word popped by rd_en appears one read clock
// later. Ports: full on the write side; empty, rd_count (occupancy) and
// dout on the read side. Writes when full and reads when empty are dropped.
// The zero padder uses one between the ADC and the FFT clock, the overlap
// adder one between the FFT and the ADC clock. The source asks only for an
// asynchronous FIFO (it uses a vendor one); this construction is this
// design's own.
module async_fifo #(
  parameter int unsigned W  = 16,
  parameter int unsigned AW = 11
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          wr_en,
  input  logic [W-1:0]  din,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          rd_en,
  output logic [W-1:0]  dout,
  output logic          empty,
  output logic [AW:0]   rd_count
);
  logic [W-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1, wq2, rq1, rq2;   // synchronised Gray pointers

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  logic [AW:0] wr_count;
  assign wr_count = wbin - gray2bin(rq2);
  assign full     = (wr_count == (AW+1)'(2**AW));

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= din;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin  <= '0;
      wgray <= '0;
      rq1   <= '0;
      rq2   <= '0;
    end else begin
      rq1 <= rgray;
      rq2 <= rq1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // read side
  assign rd_count = gray2bin(wq2) - rbin;
  assign empty    = (rd_count == '0);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin  <= '0;
      rgray <= '0;
      wq1   <= '0;
      wq2   <= '0;
    end else begin
      wq1 <= wgray;
      wq2 <= wq1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  always_ff @(posedge rclk) begin
    if (rd_en && !empty) dout <= mem[rbin[AW-1:0]];
  end
endmodule
