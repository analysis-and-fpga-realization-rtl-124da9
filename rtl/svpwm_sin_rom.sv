// svpwm_sin_rom -- storage module: sine table over one 60-degree sector.
//
// Entry i holds round(2^DW * sin(i/2^AW * 60 deg)) for i = 0 .. 2^AW, so the
// table covers both ends of the sector and the decoder can read sin(theta)
// at address a and sin(60 deg - theta) at address 2^AW - a. The largest entry
// is 2^DW * sin(60 deg) < 2^DW, so DW bits hold every entry.
//
// The table is computed at elaboration by a constant function: a Taylor
// series of sin in Q2.30 fixed point (terms to x^11; the truncation error is
// below 2^-24 for x <= pi/3), rounded to DW bits. That a look-up memory
// addressed by the decoder holds the table follows the functional block
// diagram; what it holds, its size and its format are this design's choice.
//
// Timing: synchronous read, data one clock after the address.
module svpwm_sin_rom #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 16
) (
  input  logic        clk,
  input  logic [AW:0] addr,
  output logic [DW-1:0] data
);

  localparam int unsigned DEPTH = (1 << AW) + 1;
  // pi/3 in Q2.30
  localparam longint PI3_Q30 = 64'sd1124419069;

  typedef logic [DW-1:0] table_t [DEPTH];

  function automatic table_t gen_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++) begin
      longint x;
      longint x2;
      longint term;
      longint s;
      x    = (longint'(i) * PI3_Q30) >>> AW;
      x2   = (x * x) >>> 30;
      term = x;
      s    = x;
      for (int n = 1; n <= 5; n++) begin
        term = -(((term * x2) >>> 30) / longint'((2 * n) * (2 * n + 1)));
        s    = s + term;
      end
      s    = (s + (64'sd1 <<< (29 - DW))) >>> (30 - DW);
      t[i] = DW'(s);
    end
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  logic [DW-1:0] mem [DEPTH];

  initial mem = TABLE;

  always_ff @(posedge clk) data <= mem[addr];

endmodule
