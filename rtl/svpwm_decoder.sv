// svpwm_decoder -- turns the reference-vector angle into the three pole
// signals PWMA, PWMB, PWMC.
//
// Dwell times. With the angle theta inside sector k (0..60 deg) and the
// modulation index m (1.0 = the largest circle inside the hexagon), the two
// adjacent active vectors V_k and V_(k+1) are held for
//   T1 = m * Ts * sin(60 deg - theta),   T2 = m * Ts * sin(theta),
// and the rest of the period, T0 = Ts - T1 - T2, goes to the zero vectors.
// All times are kept in half-period units (HALF clocks = Ts/2), matching the
// triangular carrier, which is why t1 = HALF*m*sin(60-theta).
//
// Sequence. Going from [000] to [111] one pole at a time, the inverter first
// passes the active vector with one pole high (V1, V3, V5) and then the one
// with two poles high (V2, V4, V6). The pole high in the first is the first to
// turn on, the extra pole of the second is next, the remaining pole is last.
// Each pole gets a compare level C and a polarity; the pole is on while the
// carrier is >= C (polarity 0) or < C (polarity 1):
//   symmetric    : zero time split, [000] at both ends and [111] in the middle;
//                  levels t0/2, t0/2+t_single, t0/2+t_single+t_double
//   zero = [000] : levels t0, t0+t_single, HALF (last pole clamped low)
//   zero = [111] : [111] at both ends, polarity 1, levels t0,
//                  t0+t_double, HALF (first pole clamped high)
// Odd 60-degree bus clamping uses [111] in odd sectors and [000] in even
// ones; even bus clamping the reverse. In sector I this gives
// [111],[110],[100],[110],[111] and in sector II [000],[010],[110],[010],[000].
// The three patterns, the dwell-time equations and the sequences follow the
// modulator description; the level/polarity formulation, the fixed-point
// widths and the one-period pipeline are this design's choices.
//
// Timing. At period_start the levels computed during the previous period are
// made active and the angle, modulation index and pattern are sampled. The
// new levels are ready CALC_CYCLES = 5 clocks later (calc_done pulses) and go
// into use at the next period_start, so the output lags the sampled angle by
// one switching period. pwm is registered: it follows the carrier by one
// clock. Until the first set of levels is ready, all poles are low ([000]).
//
// Storage interface: rom_addr/rom_data reach the sine table (one clock read
// latency); two reads per period.
module svpwm_decoder
  import svpwm_pkg::*;
#(
  parameter int unsigned HALF   = 1250,
  parameter int unsigned CW     = $clog2(HALF + 1),
  parameter int unsigned AW     = 8,
  parameter int unsigned DW     = 16,
  parameter int unsigned MW     = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              period_start,
  input  logic [CW-1:0]     carrier,
  input  sector_t           sector,
  input  logic [AW-1:0]     frac,        // top AW bits of the sector fraction
  input  logic [MW-1:0]     mod_index,   // unsigned, 2^(MW-1) = 1.0, saturates at 1.0
  input  pattern_e          pattern,
  output logic [AW:0]       rom_addr,
  input  logic [DW-1:0]     rom_data,
  output logic [2:0]        pwm,         // {A, B, C}, 1 = upper switch on
  output sector_t           out_sector,  // sector of the levels in use
  output logic              calc_done
);

  localparam logic [CW-1:0] HALF_C = CW'(HALF);
  localparam logic [MW-1:0] M_ONE  = MW'(1) << (MW - 1);
  localparam int unsigned   PW     = CW + MW + DW;

  typedef enum logic [2:0] {S_IDLE, S_RD_A, S_RD_B, S_RD_C, S_CALC} state_e;

  typedef struct packed {
    logic [2:0][CW-1:0] level;
    logic [2:0]         pol;
    sector_t            sector;
  } levels_t;

  // All poles off: level HALF with polarity 0 is never reached.
  localparam levels_t LEVELS_OFF = '{level: {3{HALF_C}}, pol: 3'b000, sector: 3'd0};

  state_e        state;
  sector_t       k;
  logic [AW-1:0] a;
  logic [MW-1:0] m;
  pattern_e      pat;
  logic [DW-1:0] s_a;              // sin(60 deg - theta)
  levels_t       shadow, active;

  // ---------------------------------------------------------------------
  // Sequencer: sample, two table reads, compute.
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k         <= '0;
      a         <= '0;
      m         <= '0;
      pat       <= PAT_SYMMETRIC;
      s_a       <= '0;
      rom_addr  <= '0;
      shadow    <= LEVELS_OFF;
      active    <= LEVELS_OFF;
      calc_done <= 1'b0;
    end else begin
      calc_done <= 1'b0;
      if (period_start) active <= shadow;
      unique case (state)
        S_IDLE: if (period_start) begin
          k        <= sector;
          a        <= frac;
          m        <= (mod_index > M_ONE) ? M_ONE : mod_index;
          pat      <= pattern;
          rom_addr <= (AW+1)'(1 << AW) - {1'b0, frac};
          state    <= S_RD_A;
        end
        S_RD_A: begin
          rom_addr <= {1'b0, a};
          state    <= S_RD_B;
        end
        S_RD_B: begin
          s_a   <= rom_data;
          state <= S_RD_C;
        end
        S_RD_C: begin
          shadow <= compute(k, m, pat, s_a, rom_data);
          state  <= S_CALC;
        end
        S_CALC: begin
          calc_done <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Dwell time in half-period clocks: HALF * m * s, rounded.
  function automatic logic [CW-1:0] dwell(input logic [MW-1:0] mi, input logic [DW-1:0] s);
    logic [PW-1:0] p;
    p = PW'(HALF_C) * PW'(mi) * PW'(s);
    p = p + (PW'(1) << (MW - 1 + DW - 1));
    return CW'(p >> (MW - 1 + DW));
  endfunction

  function automatic levels_t compute(input sector_t ks, input logic [MW-1:0] mi,
                                      input pattern_e pt, input logic [DW-1:0] sin_a,
                                      input logic [DW-1:0] sin_b);
    levels_t       r;
    logic [CW-1:0] t1, t2, t0, t0h, t_single, t_double;
    logic [2:0]    v_single, v_double;
    logic [1:0]    p_first, p_second, p_last;
    sector_t       kn;
    t1 = dwell(mi, sin_a);
    t2 = dwell(mi, sin_b);
    // Rounding can push t1 + t2 one count past HALF at m = 1.
    if ({1'b0, t1} + {1'b0, t2} > {1'b0, HALF_C}) t2 = HALF_C - t1;
    t0  = HALF_C - t1 - t2;
    t0h = t0 >> 1;
    kn  = (ks == 3'd5) ? 3'd0 : ks + 3'd1;
    if (!ks[0]) begin   // sectors I, III, V: V_k has one pole high
      v_single = active_vector(ks);
      v_double = active_vector(kn);
      t_single = t1;
      t_double = t2;
    end else begin      // sectors II, IV, VI: V_(k+1) has one pole high
      v_single = active_vector(kn);
      v_double = active_vector(ks);
      t_single = t2;
      t_double = t1;
    end
    p_first  = pole_of(v_single);
    p_second = pole_of(v_double & ~v_single);
    p_last   = pole_of(~v_double);
    r.sector = ks;
    if (pt != PAT_CLAMP_ODD && pt != PAT_CLAMP_EVN) begin   // symmetric (code 3 too)
      r.pol             = 3'b000;
      r.level[p_first]  = t0h;
      r.level[p_second] = t0h + t_single;
      r.level[p_last]   = t0h + t_single + t_double;
    end else if (zero_is_111(pt, ks[0])) begin
      r.pol             = 3'b111;
      r.level[p_first]  = HALF_C;
      r.level[p_second] = t0 + t_double;
      r.level[p_last]   = t0;
    end else begin
      r.pol             = 3'b000;
      r.level[p_first]  = t0;
      r.level[p_second] = t0 + t_single;
      r.level[p_last]   = HALF_C;
    end
    return r;
  endfunction

  // ---------------------------------------------------------------------
  // Carrier comparison.
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm <= 3'b000;
    end else begin
      for (int i = 0; i < 3; i++)
        pwm[i] <= active.pol[i] ? (carrier < active.level[i]) : (carrier >= active.level[i]);
    end
  end

  assign out_sector = active.sector;

endmodule
