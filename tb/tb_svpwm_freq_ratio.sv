// tb_svpwm_freq_ratio -- self-checking test of the angle accumulator.
//
// A reference model keeps the angle as one integer in [0, 6*2^20) and adds or
// subtracts the step modulo that range; sector and fraction of the DUT must
// match the model's quotient and remainder after every advance. Steps are
// random, include the largest one allowed, and the direction flips at
// random. Also checks that with a fixed step the vector makes one full turn in
// 6*2^20/step advances (the switching-to-fundamental frequency ratio).
module tb_svpwm_freq_ratio;
  import svpwm_pkg::*;
  localparam int unsigned FRAC_W = 20;
  localparam longint FULL = 6 * (64'd1 << FRAC_W);

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              advance = 1'b0;
  logic [FRAC_W-1:0] step = '0;
  logic              reverse = 1'b0;
  sector_t           sector;
  logic [FRAC_W-1:0] frac;
  int checks = 0, failures = 0;
  longint model;

  svpwm_freq_ratio dut (.clk, .rst_n, .advance, .step, .reverse, .sector, .frac);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (longint'(sector) * (64'd1 << FRAC_W) + longint'(frac) != model) begin
      failures++;
      if (failures < 10) $display("mismatch: sector %0d frac %0d, model %0d", sector, frac, model);
    end
  endtask

  task automatic do_advance(input logic [FRAC_W-1:0] s, input logic rev, input logic adv);
    @(negedge clk);
    step    = s;
    reverse = rev;
    advance = adv;
    @(negedge clk);
    advance = 1'b0;
    if (adv) model = rev ? (model - longint'(s) + FULL) % FULL : (model + longint'(s)) % FULL;
    check();
  endtask

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check();
    for (int i = 0; i < 3000; i++) begin
      logic [FRAC_W-1:0] s;
      s = (i % 7 == 0) ? {FRAC_W{1'b1}} : FRAC_W'($urandom);
      do_advance(s, 1'($urandom_range(0, 3) == 0), 1'($urandom_range(0, 4) != 0));
    end
    // one full turn from reset: step = 2^20/8 gives 48 advances per revolution
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    model = 0;
    for (int i = 0; i < 48; i++) begin
      do_advance(FRAC_W'(1 << (FRAC_W - 3)), 1'b0, 1'b1);
      checks++;
      if ((i == 23) != (sector == 3'd3 && frac == '0)) failures++;
    end
    checks++;
    if (!(sector == 3'd0 && frac == '0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
