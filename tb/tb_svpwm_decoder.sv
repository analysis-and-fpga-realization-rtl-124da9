// tb_svpwm_decoder -- self-checking test of the decoder together with the
// divider (carrier) and the sine table, at the default 2500-clock period.
//
// For random sector, angle, modulation index and pattern the testbench lets
// the decoder sample the inputs at one period start and then records the three
// pole signals over the whole following period. It checks, against values
// worked out here with real arithmetic:
//   * the on-time of each pole: T1*V_k + T2*V_(k+1) + T7 (clocks), with
//     T1 = Ts*m*sin(60-theta), T2 = Ts*m*sin(theta), and T7 = T0/2
//     (symmetric), T0 ([111] bus clamping) or 0 ([000] bus clamping);
//   * that every state change toggles one pole only (when no dwell time is 0);
//   * that the period starts in [000] (symmetric, [000]-clamped) or [111];
//   * that in the bus-clamped patterns the clamped pole never switches;
//   * the sector-I and sector-II sequences of odd 60-degree bus clamping;
//   * that new levels are ready 5 clocks after the period start.
module tb_svpwm_decoder;
  import svpwm_pkg::*;
  localparam int unsigned HALF = 1250;
  localparam int unsigned TS   = 2 * HALF;
  localparam real PI = 3.14159265358979323846;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [10:0] carrier;
  logic        period_start;
  sector_t     sector = '0;
  logic [7:0]  frac = '0;
  logic [15:0] mod_index = '0;
  pattern_e    pattern = PAT_SYMMETRIC;
  logic [8:0]  rom_addr;
  logic [15:0] rom_data;
  logic [2:0]  pwm;
  sector_t     out_sector;
  logic        calc_done;
  int checks = 0, failures = 0;

  // V1..V6 as {A,B,C}, written out here independently of the design
  logic [2:0] vec [6] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};

  svpwm_divider u_div (.clk, .rst_n, .carrier, .period_start);
  svpwm_sin_rom u_rom (.clk, .addr(rom_addr), .data(rom_data));
  svpwm_decoder dut (.clk, .rst_n, .period_start, .carrier, .sector, .frac, .mod_index,
                     .pattern, .rom_addr, .rom_data, .pwm, .out_sector, .calc_done);

  always #10 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s (sector %0d frac %0d m %0d pattern %0d)",
                                msg, sector, frac, mod_index, pattern);
  endtask

  task automatic run_case(input int k, input int a, input int m, input pattern_e pat);
    real    mr, th, t1, t2, t0, t7;
    int     on_cnt [3];
    int     lat;
    logic [2:0] st, prev, first;
    logic [2:0] seq [$];
    logic   z111;
    int     cl_pole;
    logic   cl_val;
    @(negedge clk);
    sector    = sector_t'(k);
    frac      = 8'(a);
    mod_index = 16'(m);
    pattern   = pat;
    @(posedge clk iff period_start);
    // latency of the calculation
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
    end while (!calc_done && lat < 200);
    checks++;
    if (lat != 5) fail($sformatf("calculation took %0d clocks", lat));
    @(posedge clk iff period_start);
    mr = (m > 32768 ? 32768.0 : real'(m)) / 32768.0;
    th = real'(a) / 256.0 * PI / 3.0;
    t1 = real'(TS) * mr * $sin(PI / 3.0 - th);
    t2 = real'(TS) * mr * $sin(th);
    t0 = real'(TS) - t1 - t2;
    z111 = (pat == PAT_CLAMP_ODD) ? (k % 2 == 0) : (pat == PAT_CLAMP_EVN) ? (k % 2 == 1) : 1'b0;
    t7 = (pat == PAT_SYMMETRIC) ? t0 / 2.0 : (z111 ? t0 : 0.0);
    on_cnt = '{0, 0, 0};
    seq.delete();
    // pwm is registered: the new levels show from the second clock on
    @(negedge clk);
    for (int c = 0; c < int'(TS); c++) begin
      @(negedge clk);
      st = pwm;
      if (c == 0) first = st;
      if (c == 0 || st != prev) seq.push_back(st);
      // with a zero-length segment two poles switch together
      if (c > 0 && st != prev && t1 > 4.0 && t2 > 4.0 && t0 > 4.0) begin
        checks++;
        if ($countones(st ^ prev) != 1) fail($sformatf("state %b -> %b", prev, st));
      end
      for (int p = 0; p < 3; p++) on_cnt[p] += int'(st[p]);
      prev = st;
    end
    // on-time of each pole (bit 2 = A)
    for (int p = 0; p < 3; p++) begin
      real expv;
      expv = t1 * real'(vec[k][p]) + t2 * real'(vec[(k + 1) % 6][p]) + t7;
      checks++;
      if (real'(on_cnt[p]) - expv > 4.0 || expv - real'(on_cnt[p]) > 4.0)
        fail($sformatf("pole %0d on %0d clocks, expected %f", p, on_cnt[p], expv));
    end
    checks++;
    if (out_sector != sector_t'(k)) fail("out_sector");
    if (t0 > 8.0) begin
      checks++;
      if (first != (z111 ? 3'b111 : 3'b000)) fail($sformatf("period starts in %b", first));
    end
    if (pat != PAT_SYMMETRIC) begin
      // clamped pole: high in both active vectors ([111]) or in neither ([000])
      for (int p = 0; p < 3; p++) begin
        logic in_both, in_none;
        in_both = vec[k][p] & vec[(k + 1) % 6][p];
        in_none = ~(vec[k][p] | vec[(k + 1) % 6][p]);
        if ((z111 && in_both) || (!z111 && in_none)) begin
          cl_pole = p;
          cl_val  = z111;
          checks++;
          if (on_cnt[cl_pole] != (cl_val ? int'(TS) : 0)) fail("clamped pole switched");
        end
      end
    end
    if (pat == PAT_CLAMP_ODD && t0 > 8.0 && t1 > 8.0 && t2 > 8.0 && k < 2) begin
      logic [2:0] want [5];
      want = (k == 0) ? '{3'b111, 3'b110, 3'b100, 3'b110, 3'b111}
                      : '{3'b000, 3'b010, 3'b110, 3'b010, 3'b000};
      checks++;
      if (seq.size() != 5) fail($sformatf("sequence has %0d states", seq.size()));
      else for (int i = 0; i < 5; i++) if (seq[i] != want[i]) fail("sequence order");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // the sequences given for odd bus clamping in sectors I and II
    run_case(0, 100, 26000, PAT_CLAMP_ODD);
    run_case(1, 60, 26000, PAT_CLAMP_ODD);
    // every sector, every pattern
    for (int k = 0; k < 6; k++)
      for (int p = 0; p < 3; p++)
        run_case(k, 128, 24000, pattern_e'(p));
    // corners: theta = 0, full index, index above 1.0, zero index
    run_case(2, 0, 32768, PAT_SYMMETRIC);
    run_case(5, 255, 40000, PAT_CLAMP_EVN);
    run_case(3, 77, 0, PAT_SYMMETRIC);
    for (int i = 0; i < 60; i++)
      run_case($urandom_range(0, 5), $urandom_range(0, 255), $urandom_range(0, 36000),
               pattern_e'($urandom_range(0, 2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
