// svpwm_top -- space-vector PWM modulator for a three-phase voltage source
// inverter, wired as in the functional block diagram:
//
//   divider  ->  carrier, period_start ----------------+
//   freq_ratio (angle accumulator)  -> sector, frac ---+-> decoder -> PWMA..C
//   storage (sine table)  <-> address / data ----------+        |
//                                                  dead time module -> gates
//
// Each switching period (Ts = 1/FS_HZ) the decoder samples the reference
// angle, reads sin(theta) and sin(60 deg - theta) from the table, works out
// the dwell times of the two adjacent active vectors and the zero vectors,
// and orders them for the selected pattern (symmetric, odd or even 60-degree
// bus-clamped). The resulting compare levels drive the poles during the
// following period. The dead-time module then builds the six gate signals.
//
// Interface (all synchronous to clk, reset active low, asynchronous):
//   freq_step      angle step per period: step = round(6*2^FRAC_W*f1/fs)
//   phase_sequence 0 = A-B-C rotation, 1 = A-C-B
//   mod_index      modulation index, 2^15 = 1.0 (largest inscribed circle)
//   pattern        svpwm_pkg::pattern_e
//   dead_band      dead time in clocks
//   start_stop     1 = gates driven, 0 = all gates off
//   gate_hi/lo     upper/lower switch of legs {A, B, C}
//   pwm, sector, period_start, calc_done are brought out for observation.
// The 20 kHz switching frequency is the inverter's; the 50 MHz clock and
// all word widths are this design's choices.
module svpwm_top
  import svpwm_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned FS_HZ  = 20_000,
  parameter int unsigned FRAC_W = 20,
  parameter int unsigned AW     = 8,
  parameter int unsigned DW     = 16,
  parameter int unsigned MW     = 16,
  parameter int unsigned DBW    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [FRAC_W-1:0] freq_step,
  input  logic              phase_sequence,
  input  logic [MW-1:0]     mod_index,
  input  logic [1:0]        pattern,
  input  logic [DBW-1:0]    dead_band,
  input  logic              start_stop,
  output logic [2:0]        gate_hi,
  output logic [2:0]        gate_lo,
  output logic [2:0]        pwm,
  output logic [2:0]        sector,
  output logic              period_start,
  output logic              calc_done
);

  localparam int unsigned HALF = CLK_HZ / (2 * FS_HZ);
  localparam int unsigned CW   = $clog2(HALF + 1);

  logic [CW-1:0]     carrier;
  sector_t           ref_sector;
  logic [FRAC_W-1:0] ref_frac;
  logic [AW:0]       rom_addr;
  logic [DW-1:0]     rom_data;
  pattern_e          pat;

  assign pat = pattern_e'(pattern);

  svpwm_divider #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ), .HALF(HALF), .CW(CW)) u_divider (
    .clk, .rst_n, .carrier, .period_start
  );

  svpwm_freq_ratio #(.FRAC_W(FRAC_W)) u_freq_ratio (
    .clk, .rst_n,
    .advance (period_start),
    .step    (freq_step),
    .reverse (phase_sequence),
    .sector  (ref_sector),
    .frac    (ref_frac)
  );

  svpwm_sin_rom #(.AW(AW), .DW(DW)) u_storage (
    .clk, .addr(rom_addr), .data(rom_data)
  );

  svpwm_decoder #(.HALF(HALF), .CW(CW), .AW(AW), .DW(DW), .MW(MW)) u_decoder (
    .clk, .rst_n, .period_start, .carrier,
    .sector     (ref_sector),
    .frac       (ref_frac[FRAC_W-1 -: AW]),
    .mod_index,
    .pattern    (pat),
    .rom_addr, .rom_data, .pwm,
    .out_sector (sector),
    .calc_done
  );

  svpwm_dead_time #(.DBW(DBW)) u_dead_time (
    .clk, .rst_n, .start_stop, .dead_band, .pwm, .gate_hi, .gate_lo
  );

endmodule
