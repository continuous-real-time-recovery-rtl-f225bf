// filter_coeff_ram: frequency-domain filter coefficient memory.
//
// Holds the DFT of the zero-padded recovery filter, one complex coefficient
// per frequency bin, packed {real, imaginary} in a 2*CW-bit word (real in the
// upper half, as in the original design's 32-bit words). Port A is read at
// the fast FFT clock by the circular convolver: data appears one clka cycle
// after the address. Port B is written at the slow clock, so a new filter for
// a new chirp rate can be loaded while the processor runs (the original loads
// it from a PC through an embedded microcontroller; here port B is simply
// brought out). The RAM starts all-zero. The dual-clock arrangement and the
// word packing follow the source; the one-cycle read latency and the
// all-zero start are this design's choices.
module filter_coeff_ram #(
  parameter int unsigned AW = 13,
  parameter int unsigned CW = 16
) (
  input  logic            clka,
  input  logic [AW-1:0]   addra,
  output logic [2*CW-1:0] douta,
  input  logic            clkb,
  input  logic            web,
  input  logic [AW-1:0]   addrb,
  input  logic [2*CW-1:0] dinb
);
  logic [2*CW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clkb) begin
    if (web) mem[addrb] <= dinb;
  end

  always_ff @(posedge clka) begin
    douta <= mem[addra];
  end
endmodule
