// nco_sine_rom: phase-to-amplitude stage of the numerically controlled
// oscillator.
//
// The top PHASE_W bits of the phase accumulator address a full-period sine
// table of 2**PHASE_W entries. Each entry is the unsigned sample
//   round((2**AMP_W - 1)/2 * (1 + sin(2*pi*k / 2**PHASE_W)))
// so the sine swings over the whole code range of the unipolar current DAC,
// centred on mid-scale. The table is computed at elaboration time by a constant
// function, so no data file is needed.
//
// Timing: the looked-up sample is registered on the falling edge of clk (one
// cycle of latency), like the other stages of the modulator. rst_n is
// asynchronous, active low, and loads mid-scale (the DC level of the sine).
//
// From the design description: the sample width of 8 bits follows from the
// 19-bit DAC word (4 thermometer-coded MSBs plus 4 binary LSBs) and the
// falling-edge output register. Own choices: full-period table, table depth,
// offset-binary coding, reset value.
module nco_sine_rom #(
  parameter int unsigned PHASE_W = 8,
  parameter int unsigned AMP_W   = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] phase_in,
  output logic [AMP_W-1:0]   amp
);

  localparam int unsigned DEPTH = 1 << PHASE_W;
  localparam real         HALF  = (real'((1 << AMP_W) - 1)) / 2.0;
  localparam real         PI    = 3.14159265358979323846;

  typedef logic [AMP_W-1:0] rom_t [DEPTH];

  function automatic rom_t gen_table();
    rom_t t;
    for (int k = 0; k < DEPTH; k++) begin
      t[k] = AMP_W'($rtoi(HALF + HALF * $sin(2.0 * PI * real'(k) / real'(DEPTH)) + 0.5));
    end
    return t;
  endfunction

  localparam rom_t SINE = gen_table();

  logic [AMP_W-1:0] sample;
  always_comb sample = SINE[phase_in];

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) amp <= AMP_W'(1 << (AMP_W - 1));
    else        amp <= sample;
  end

endmodule
