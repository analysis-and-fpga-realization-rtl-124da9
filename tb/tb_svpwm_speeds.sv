// tb_svpwm_speeds -- the modulator at the two motor speeds of the bench
// measurements, 200 rpm and 1000 rpm, at the default 20 kHz switching
// frequency, each for one full revolution of the reference vector.
//
// A four-pole motor is assumed, so the fundamental is f1 = rpm*4/120:
// 6.67 Hz (3000 switching periods per revolution, step 2097) and 33.3 Hz
// (600 periods, step 10486). 1000 rpm runs with each of the three switching
// patterns, 200 rpm with the symmetric one; the modulation index is 0.8.
// Every period the average inverter output vector (ideal inverter, units of
// Vdc) must match m/sqrt(3)*exp(j*theta) within 0.003, and one revolution
// must take 6*2^20/step periods (to within one, since the step is rounded).
module tb_svpwm_speeds;
  localparam int unsigned TS = 2500;
  localparam longint FULL = 6 * (64'd1 << 20);
  localparam real PI = 3.14159265358979323846;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [19:0] freq_step = 20'd10486;
  logic [15:0] mod_index = 16'd26214;
  logic [1:0]  pattern = 2'd0;
  logic [2:0]  gate_hi, gate_lo, pwm, sector;
  logic        period_start, calc_done;
  int checks = 0, failures = 0, revs = 0;

  svpwm_top dut (.clk, .rst_n, .freq_step, .phase_sequence(1'b0), .mod_index, .pattern,
                 .dead_band(8'd0), .start_stop(1'b1), .gate_hi, .gate_lo, .pwm, .sector,
                 .period_start, .calc_done);

  always #10 clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint model = 0;
  longint ang [3] = '{0, 0, 0};
  logic   ok [3] = '{1'b0, 1'b0, 1'b0};
  logic   ps_edge = 1'b0;

  always @(posedge clk) begin
    ps_edge <= 1'b0;
    if (rst_n && period_start) begin
      ang[2] = ang[1];
      ang[1] = ang[0];
      ok[2]  = ok[1];
      ok[1]  = ok[0];
      ang[0] = model;
      ok[0]  = 1'b1;
      model  = (model + longint'(freq_step)) % FULL;
      ps_edge <= 1'b1;
    end
  end

  real sum_a = 0.0, sum_b = 0.0;
  int  n_smp = 0, n_per = 0, rev_start = -1;
  logic [2:0] prev_sector = '0;

  always @(negedge clk) begin
    if (rst_n) begin
      sum_a += (2.0 * real'(pwm[2]) - real'(pwm[1]) - real'(pwm[0])) / 3.0;
      sum_b += (real'(pwm[1]) - real'(pwm[0])) / $sqrt(3.0);
      n_smp++;
      if (ps_edge) begin
        n_per++;
        if (ok[2] && n_smp == int'(TS)) begin
          real th, ea, eb, ga, gb;
          th = (real'(ang[2] >> 20) + real'((ang[2] >> 12) % 256) / 256.0) * PI / 3.0;
          ea = 0.8 / $sqrt(3.0) * $cos(th);
          eb = 0.8 / $sqrt(3.0) * $sin(th);
          ga = sum_a / real'(TS);
          gb = sum_b / real'(TS);
          checks++;
          if (ga - ea > 0.003 || ea - ga > 0.003 || gb - eb > 0.003 || eb - gb > 0.003) begin
            failures++;
            if (failures < 10) $display("volt-seconds (%f,%f), expected (%f,%f)", ga, gb, ea, eb);
          end
        end
        if (sector == 3'd0 && prev_sector == 3'd5) begin
          if (rev_start >= 0) begin
            int want;
            want = int'(FULL / longint'(freq_step));
            checks++;
            if (n_per - rev_start < want || n_per - rev_start > want + 1) begin
              failures++;
              $display("revolution took %0d periods, expected %0d", n_per - rev_start, want);
            end
            revs++;
          end
          rev_start = n_per;
        end
        prev_sector = sector;
        sum_a = 0.0;
        sum_b = 0.0;
        n_smp = 0;
      end
    end
  end

  // Run until two passes from sector VI to sector I have been seen, which
  // times one complete revolution.
  task automatic one_revolution(input int step, input int pat);
    @(negedge clk);
    freq_step = 20'(step);
    pattern   = 2'(pat);
    rev_start = -1;
    revs      = 0;
    wait (revs == 1);
    $display("step %0d pattern %0d: one revolution timed", step, pat);
  endtask

  initial begin
    int done;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    done = 0;
    // 1000 rpm, every pattern
    for (int p = 0; p < 3; p++) begin
      one_revolution(10486, p);
      done++;
    end
    // 200 rpm, symmetric pattern
    one_revolution(2097, 0);
    done++;
    checks++;
    if (done != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
