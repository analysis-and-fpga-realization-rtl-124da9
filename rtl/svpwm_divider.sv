// svpwm_divider -- divides the system clock down to the switching period and
// produces the symmetric triangular carrier that the pole signals are
// compared against.
//
// A counter n runs 0 .. 2*HALF-1 and wraps; the carrier is n on the rising
// leg and 2*HALF-1-n on the falling leg, so it reads
// 0, 1, .., HALF-1, HALF-1, .., 1, 0. Every carrier value occurs exactly twice
// per period, which makes a compare level C give an on-time of exactly
// 2*(HALF-C) clocks, centred on the middle of the period (the axis of
// symmetry of the switching pattern).
//
// The switching frequency of 20 kHz is the one used for the inverter; the
// 50 MHz system clock is this design's assumption (a common clock on
// low-cost FPGA boards). One switching period is 2*HALF = CLK_HZ/FS_HZ
// clocks.
//
// Ports: period_start is high for the one clock in which the carrier is 0 at
// the start of the rising leg; carrier is a registered output.
module svpwm_divider #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned FS_HZ  = 20_000,
  parameter int unsigned HALF   = CLK_HZ / (2 * FS_HZ),
  parameter int unsigned CW     = $clog2(HALF + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [CW-1:0] carrier,
  output logic          period_start
);

  localparam int unsigned NW = $clog2(2 * HALF);
  localparam logic [NW-1:0] N_LAST = NW'(2 * HALF - 1);
  localparam logic [NW-1:0] N_HALF = NW'(HALF);

  logic [NW-1:0] n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n <= '0;
    else        n <= (n == N_LAST) ? '0 : n + 1'b1;
  end

  always_comb begin
    if (n < N_HALF) carrier = CW'(n);
    else            carrier = CW'(N_LAST - n);
    period_start = (n == '0);
  end

endmodule
