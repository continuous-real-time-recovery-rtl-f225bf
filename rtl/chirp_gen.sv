// chirp_gen: binary linear-frequency-chirp generator for a serializer.
//
// A direct digital synthesizer reduced to one bit: a frequency accumulator
// adds the chirp rate every clock, a phase accumulator adds the frequency,
// and the output bit is 1 while the phase is in the upper half of its range
// (the phase MSB). LANES such synthesizers run side by side, one per bit of
// the serializer's parallel word; with their phases initialised quadratically
// and their frequencies linearly apart, the serial bit stream is one chirp at
// LANES times the clock rate (40 lanes at 250 MHz make 10 Gb/s).
//
// Two states. INIT: output zero; initial phases and frequencies are shifted
// in one lane at a time (lane 0 receives the new value, lane i moves to
// i+1). chirp_start copies them into the accumulators and enters SEND.
// SEND: each clock phase += freq and freq += chirp_rate in every lane, and
// chirp_out takes the phase MSBs (registered, so it shows the phases of the
// previous clock). After chirp_dur+1 clocks chirp_done pulses for one clock
// and the machine returns to INIT. Structure, widths and states follow the
// source; keeping the shifted-in initial values apart from the accumulators
// (so a chirp repeats without reloading) and the reset are this design's.
module chirp_gen #(
  parameter int unsigned LANES = 40,
  parameter int unsigned AW    = 24
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             chirp_start,
  output logic             chirp_done,
  output logic [LANES-1:0] chirp_out,
  input  logic [AW-1:0]    chirp_rate,
  input  logic [AW-1:0]    chirp_dur,
  input  logic [AW-1:0]    phase_init_shift_in,
  input  logic             phase_init_shift_en,
  input  logic [AW-1:0]    freq_init_shift_in,
  input  logic             freq_init_shift_en
);
  typedef enum logic {INIT, SEND} state_t;
  state_t state;

  logic [AW-1:0] phase_init [LANES];
  logic [AW-1:0] freq_init  [LANES];
  logic [AW-1:0] phase_acc  [LANES];
  logic [AW-1:0] freq_acc   [LANES];
  logic [AW-1:0] cycle;

  // initial-value shift registers (loaded only while idle)
  always_ff @(posedge clk) begin
    if (state == INIT) begin
      if (phase_init_shift_en) begin
        for (int i = int'(LANES) - 1; i > 0; i--) phase_init[i] <= phase_init[i-1];
        phase_init[0] <= phase_init_shift_in;
      end
      if (freq_init_shift_en) begin
        for (int i = int'(LANES) - 1; i > 0; i--) freq_init[i] <= freq_init[i-1];
        freq_init[0] <= freq_init_shift_in;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= INIT;
      chirp_out  <= '0;
      chirp_done <= 1'b0;
      cycle      <= '0;
    end else begin
      case (state)
        INIT: begin
          chirp_out  <= '0;
          chirp_done <= 1'b0;
          cycle      <= '0;
          if (chirp_start) begin
            for (int i = 0; i < int'(LANES); i++) begin
              phase_acc[i] <= phase_init[i];
              freq_acc[i]  <= freq_init[i];
            end
            state <= SEND;
          end
        end
        SEND: begin
          for (int i = 0; i < int'(LANES); i++) begin
            phase_acc[i] <= phase_acc[i] + freq_acc[i];
            freq_acc[i]  <= freq_acc[i] + chirp_rate;
            chirp_out[i] <= phase_acc[i][AW-1];
          end
          if (cycle < chirp_dur) begin
            cycle      <= cycle + 1'b1;
            chirp_done <= 1'b0;
          end else begin
            cycle      <= '0;
            chirp_done <= 1'b1;
            state      <= INIT;
          end
        end
        default: state <= INIT;
      endcase
    end
  end
endmodule
