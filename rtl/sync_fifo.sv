// sync_fifo: single-clock FIFO of DEPTH words of W bits.
//
// A circular buffer in a memory array with binary read and write pointers and
// an occupancy counter. DEPTH need not be a power of two. dout is registered:
// the word popped by rd_en appears on dout in the next cycle. Writing when
// full or reading when empty is ignored and raises the sticky err flag.
// Used for FIFO1, FIFO2 and the Cmult FIFO of the circular convolver; their
// depth (one transform length) follows from the convolver's step schedule.
// The source uses vendor FIFOs; this one is this design's own.
module sync_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 8192
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [W-1:0]               din,
  input  logic                       rd_en,
  output logic [W-1:0]               dout,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       empty,
  output logic                       full,
  output logic                       err
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
    if (do_rd) dout <= mem[rp];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      err   <= 1'b0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (do_rd && !do_wr) count <= count - 1'b1;
      if ((wr_en && full) || (rd_en && empty)) err <= 1'b1;
    end
  end
endmodule
