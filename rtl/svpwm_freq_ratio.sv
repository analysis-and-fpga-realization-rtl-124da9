// svpwm_freq_ratio -- frequency ratio select: sets where the reference
// vector is, from the commanded fundamental frequency and elapsed time.
//
// The angle is a sector number (0..5 for sectors I..VI) and a FRAC_W-bit
// fraction of the 60-degree sector. Once per switching period (advance high)
// the fraction moves by `step`; a carry out of the fraction moves to the next
// sector, and with reverse high the vector turns the other way (phase
// sequence A-C-B), borrowing from the sector number. The ratio of switching to
// fundamental frequency is therefore fs/f1 = 6 * 2^FRAC_W / step, and
//   step = round(6 * 2^FRAC_W * f1 / fs).
// The phase accumulator, its width and the reverse input standing for the
// "phase sequence" control are this design's choices; the block's name and its
// place between the divider and the decoder follow the functional block
// diagram.
//
// Timing: sector/frac change one clock after an advance pulse; step must stay
// below 2^FRAC_W (f1 < fs/6).
module svpwm_freq_ratio
  import svpwm_pkg::*;
#(
  parameter int unsigned FRAC_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              advance,
  input  logic [FRAC_W-1:0] step,
  input  logic              reverse,
  output sector_t           sector,
  output logic [FRAC_W-1:0] frac
);

  logic [FRAC_W:0] sum;
  logic [FRAC_W:0] diff;

  always_comb begin
    sum  = {1'b0, frac} + {1'b0, step};
    diff = {1'b0, frac} - {1'b0, step};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sector <= '0;
      frac   <= '0;
    end else if (advance) begin
      if (!reverse) begin
        frac <= sum[FRAC_W-1:0];
        if (sum[FRAC_W]) sector <= (sector == 3'd5) ? 3'd0 : sector + 3'd1;
      end else begin
        frac <= diff[FRAC_W-1:0];
        if (diff[FRAC_W]) sector <= (sector == 3'd0) ? 3'd5 : sector - 3'd1;
      end
    end
  end

endmodule
