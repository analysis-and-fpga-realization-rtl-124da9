// svpwm_dead_time -- dead-time module: makes the upper and lower gate
// signals of the three inverter legs from the pole signals PWMA..PWMC.
//
// For each leg, the upper switch follows the pole signal and the lower switch
// its complement, but whenever the pole signal changes both switches are held
// off for dead_band clocks before the new one turns on, so that the two
// switches of a leg never conduct together. A pulse shorter than the dead band
// restarts the count. With start_stop low all six gates are off; after it
// rises, the legs wait one dead band before driving. The block's place after
// the decoder and its start/stop input follow the functional block diagram;
// the counter scheme and the run-time dead-band input are this design's
// choice (dead time is left out of the modulator's own simulations, so no
// value is given; 1 us = 50 clocks at 50 MHz is a typical setting).
//
// Timing: a pole edge seen at clock n turns the old gate off at clock n+1 and
// the new gate on dead_band clocks later (at once if dead_band = 0).
module svpwm_dead_time #(
  parameter int unsigned DBW = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start_stop,   // 1 = run, 0 = all gates off
  input  logic [DBW-1:0] dead_band,    // clocks with both switches off
  input  logic [2:0]     pwm,          // {A, B, C}
  output logic [2:0]     gate_hi,      // upper switches SA1, SB1, SC1
  output logic [2:0]     gate_lo       // lower switches SA2, SB2, SC2
);

  logic [2:0]          last;
  logic [2:0][DBW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last    <= '0;
      cnt     <= '0;
      gate_hi <= '0;
      gate_lo <= '0;
    end else begin
      for (int i = 0; i < 3; i++) begin
        if (!start_stop) begin
          last[i]    <= pwm[i];
          cnt[i]     <= dead_band;
          gate_hi[i] <= 1'b0;
          gate_lo[i] <= 1'b0;
        end else if (pwm[i] != last[i]) begin
          last[i] <= pwm[i];
          if (dead_band == '0) begin
            gate_hi[i] <= pwm[i];
            gate_lo[i] <= ~pwm[i];
          end else begin
            gate_hi[i] <= 1'b0;
            gate_lo[i] <= 1'b0;
            cnt[i]     <= dead_band - 1'b1;
          end
        end else if (!gate_hi[i] && !gate_lo[i]) begin
          if (cnt[i] == '0) begin
            gate_hi[i] <= last[i];
            gate_lo[i] <= ~last[i];
          end else begin
            cnt[i] <= cnt[i] - 1'b1;
          end
        end
      end
    end
  end

  // The two switches of a leg are never on together.
  for (genvar g = 0; g < 3; g++) begin : g_leg_check
    a_no_shoot_through : assert property (@(posedge clk) !rst_n || !(gate_hi[g] && gate_lo[g]));
  end

endmodule
