// tb_svpwm_top -- end-to-end test of the whole modulator at its default
// parameters (50 MHz clock, 20 kHz switching, 2500 clocks per period).
//
// The testbench runs the reference vector through full revolutions with each
// switching pattern, in both phase sequences, with and without dead time, and
// with a stop/start, and checks against values it works out itself:
//   * volt-seconds: over every switching period, the average of the ideal
//     inverter output vector, Valpha = (2A-B-C)/3 and Vbeta = (B-C)/sqrt(3) in
//     units of Vdc, must equal the reference m/sqrt(3)*exp(j*theta) for the
//     angle sampled one period earlier, within 0.003 Vdc;
//   * the reference angle follows an independent accumulator model, and one
//     revolution takes exactly 6*2^20/step periods;
//   * the sector steps by +1 (A-B-C) or -1 (A-C-B) between periods;
//   * in the bus-clamped patterns one pole does not switch in a period, and
//     that pole is held high in sectors using [111] and low in those using
//     [000];
//   * with no dead band the gates follow the pole signals one clock later;
//     with a dead band, both gates of a leg are off after every pole edge;
//     with start_stop low all gates are off; no leg is ever shoot-through;
//   * bus-clamped sector changes that toggle all three legs do occur.
// Each mechanism is counted and one that never happened counts as a failure.
module tb_svpwm_top;
  import svpwm_pkg::*;
  localparam int unsigned TS = 2500;
  localparam longint FULL = 6 * (64'd1 << 20);
  localparam real PI = 3.14159265358979323846;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [19:0] freq_step = 20'd65536;
  logic        phase_sequence = 1'b0;
  logic [15:0] mod_index = 16'd26214;
  logic [1:0]  pattern = 2'd0;
  logic [7:0]  dead_band = 8'd0;
  logic        start_stop = 1'b1;
  logic [2:0]  gate_hi, gate_lo, pwm, sector;
  logic        period_start, calc_done;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_periods = 0, n_sym = 0, n_clamp111 = 0, n_clamp000 = 0;
  int n_fwd_sector = 0, n_rev_sector = 0, n_dead = 0, n_stopped = 0, n_saturated = 0;
  int n_revolutions = 0, n_all_legs = 0;
  logic boundary = 1'b0;

  svpwm_top dut (.clk, .rst_n, .freq_step, .phase_sequence, .mod_index, .pattern,
                 .dead_band, .start_stop, .gate_hi, .gate_lo, .pwm, .sector,
                 .period_start, .calc_done);

  always #10 clk = ~clk;

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL at %0t: %s", $time, msg);
  endtask

  // What the decoder samples at each period start, three periods deep.
  typedef struct {
    longint angle;
    int     m;
    int     pat;
    logic   valid;
  } sample_t;
  sample_t hist [3];
  longint  model = 0;
  logic    ps_edge = 1'b0;
  int      settle = 0;

  always @(posedge clk) begin
    ps_edge <= 1'b0;
    if (rst_n && period_start) begin
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0].angle = model;
      hist[0].m     = int'(mod_index);
      hist[0].pat   = int'(pattern);
      hist[0].valid = 1'b1;
      model = phase_sequence ? (model - longint'(freq_step) + FULL) % FULL
                             : (model + longint'(freq_step)) % FULL;
      ps_edge <= 1'b1;
    end
  end

  // Per-period measurement on the falling edge.
  real  sum_a = 0.0, sum_b = 0.0;
  int   n_smp = 0;
  int   toggles [3];
  int   ones [3];
  logic [2:0] last_pwm = '0;
  logic [2:0] prev_sector = '0;
  int   last_rev_period = -1;
  logic [2:0] pwm_d = '0;
  logic [2:0] last_d2 = '0;
  logic run_d1 = 1'b0, run_d2 = 1'b0;

  task automatic end_of_period();
    real    th, mr, ea, eb, ga, gb;
    int     untoggled;
    sample_t s;
    s = hist[2];
    n_periods++;
    if (settle > 0) begin
      settle--;
      return;
    end
    if (!s.valid || n_smp != int'(TS)) return;
    mr = (s.m > 32768 ? 32768.0 : real'(s.m)) / 32768.0;
    if (s.m > 32768) n_saturated++;
    // angle quantised to the 256-entry table, as the hardware does
    th = (real'(s.angle >> 20) + real'((s.angle >> 12) % 256) / 256.0) * PI / 3.0;
    ea = mr / $sqrt(3.0) * $cos(th);
    eb = mr / $sqrt(3.0) * $sin(th);
    ga = sum_a / real'(TS);
    gb = sum_b / real'(TS);
    checks++;
    if (ga - ea > 0.003 || ea - ga > 0.003 || gb - eb > 0.003 || eb - gb > 0.003)
      fail($sformatf("volt-seconds (%f,%f), expected (%f,%f)", ga, gb, ea, eb));
    untoggled = 0;
    for (int p = 0; p < 3; p++) if (toggles[p] == 0) untoggled++;
    if (s.pat == 1 || s.pat == 2) begin
      logic z111;
      int   k;
      k = int'(s.angle >> 20);
      z111 = (s.pat == 1) ? (k % 2 == 0) : (k % 2 == 1);
      checks++;
      if (untoggled < 1) fail("no clamped pole in a bus-clamped period");
      for (int p = 0; p < 3; p++)
        if (toggles[p] == 0 && mr > 0.1) begin
          checks++;
          if (ones[p] != (z111 ? int'(TS) : 0)) fail("clamped pole at the wrong rail");
        end
      if (z111) n_clamp111++;
      else      n_clamp000++;
    end else begin
      checks++;
      if (mr > 0.1 && mr < 0.95 && untoggled != 0) fail("a pole did not switch in a symmetric period");
      n_sym++;
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      // the sample taken after a period-start edge is the last one of the old period
      sum_a += (2.0 * real'(pwm[2]) - real'(pwm[1]) - real'(pwm[0])) / 3.0;
      sum_b += (real'(pwm[1]) - real'(pwm[0])) / $sqrt(3.0);
      n_smp++;
      // first sample of a new period: a bus-clamped change between a [111]
      // sector and a [000] sector toggles all three legs here
      if (boundary && pwm == ~last_pwm && pattern != 2'd0) n_all_legs++;
      boundary = ps_edge;
      for (int p = 0; p < 3; p++) begin
        if (pwm[p] != last_pwm[p] && n_smp > 1) toggles[p]++;
        ones[p] += int'(pwm[p]);
      end
      last_pwm = pwm;
      if (ps_edge) begin
        end_of_period();
        sum_a = 0.0;
        sum_b = 0.0;
        n_smp = 0;
        toggles = '{0, 0, 0};
        ones = '{0, 0, 0};
        // sector sequence of the levels in use
        if (sector != prev_sector) begin
          checks++;
          if (sector == ((prev_sector == 3'd5) ? 3'd0 : prev_sector + 3'd1)) n_fwd_sector++;
          else if (sector == ((prev_sector == 3'd0) ? 3'd5 : prev_sector - 3'd1)) n_rev_sector++;
          else fail($sformatf("sector jumped %0d -> %0d", prev_sector, sector));
          if (sector == 3'd0 && prev_sector == 3'd5 && !phase_sequence && settle == 0) begin
            if (last_rev_period >= 0) begin
              checks++;
              if (n_periods - last_rev_period != int'(FULL / longint'(freq_step)))
                fail($sformatf("revolution took %0d periods", n_periods - last_rev_period));
              n_revolutions++;
            end
            last_rev_period = n_periods;
          end
        end
        prev_sector = sector;
      end
      // gate signals
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (gate_hi[p] && gate_lo[p]) fail("shoot-through");
        if (!run_d1 && !run_d2 && (gate_hi[p] || gate_lo[p])) fail("gate on while stopped");
        if (run_d1 && run_d2 && dead_band == 0 &&
            (gate_hi[p] != pwm_d[p] || gate_lo[p] != ~pwm_d[p])) fail("gate does not follow pole");
        if (run_d1 && dead_band != 0 && pwm[p] != pwm_d[p]) begin
          // the edge is seen at the next clock; both gates go off then
          n_dead++;
        end
        if (run_d1 && run_d2 && dead_band != 0 && pwm_d[p] != last_d2[p] && (gate_hi[p] || gate_lo[p]))
          fail("no dead band after a pole edge");
      end
      if (!start_stop) n_stopped++;
      last_d2 = pwm_d;
      pwm_d   = pwm;
      run_d2  = run_d1;
      run_d1  = start_stop;
    end
  end

  task automatic revolutions(input int n);
    repeat (n * int'(FULL / longint'(freq_step))) @(posedge clk iff period_start);
  endtask

  task automatic set_mode(input int pat, input int m, input logic rev, input int db);
    @(negedge clk);
    pattern        = 2'(pat);
    mod_index      = 16'(m);
    phase_sequence = rev;
    dead_band      = 8'(db);
    settle         = 3;
    last_rev_period = -1;
  endtask

  initial begin
    for (int i = 0; i < 3; i++) hist[i].valid = 1'b0;
    toggles = '{0, 0, 0};
    ones = '{0, 0, 0};
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // symmetric pattern, A-B-C, no dead time: two revolutions
    set_mode(0, 26214, 1'b0, 0);
    revolutions(2);
    // odd and even 60-degree bus clamping
    set_mode(1, 30000, 1'b0, 0);
    revolutions(2);
    set_mode(2, 20000, 1'b0, 0);
    revolutions(2);
    // reversed phase sequence, index above 1.0 (saturates)
    set_mode(0, 36000, 1'b1, 0);
    revolutions(1);
    // dead band of 1 us, then a stop and a restart
    set_mode(1, 26214, 1'b0, 50);
    revolutions(1);
    @(negedge clk) start_stop = 1'b0;
    repeat (5000) @(negedge clk);
    start_stop = 1'b1;
    revolutions(1);
    // mechanisms
    checks++;
    if (n_sym == 0 || n_clamp111 == 0 || n_clamp000 == 0 || n_fwd_sector == 0 ||
        n_rev_sector == 0 || n_dead == 0 || n_stopped == 0 || n_saturated == 0 ||
        n_revolutions == 0 || n_all_legs == 0) fail("a mechanism never happened");
    $display("periods %0d: symmetric %0d, [111]-clamped %0d, [000]-clamped %0d",
             n_periods, n_sym, n_clamp111, n_clamp000);
    $display("sector steps forward %0d, reverse %0d; revolutions timed %0d",
             n_fwd_sector, n_rev_sector, n_revolutions);
    $display("dead bands %0d, stopped clocks %0d, saturated periods %0d, all-leg toggles %0d",
             n_dead, n_stopped, n_saturated, n_all_legs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
