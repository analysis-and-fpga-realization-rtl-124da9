// tb_svpwm_dead_time -- self-checking test of the dead-time module.
//
// Random pole signals (with pulses both longer and shorter than the dead
// band), several dead-band settings including 0, and stop/start phases. The
// reference: after a clock edge the upper gate of a leg is on exactly when the
// module was running and the pole signal was 1 at that edge and the dead_band
// edges before it; the lower gate likewise for 0. This also means both gates
// are off for dead_band clocks around every pole edge. Checked every clock
// for all three legs, and the number of dead bands inserted is counted.
module tb_svpwm_dead_time;
  localparam int unsigned DBW = 8;
  localparam int HIST = 300;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           start_stop = 1'b0;
  logic [DBW-1:0] dead_band = 8'd5;
  logic [2:0]     pwm = 3'b000;
  logic [2:0]     gate_hi, gate_lo;
  int checks = 0, failures = 0, dead_bands = 0;
  int db_list [5] = '{5, 0, 1, 50, 17};

  // sample history taken at each rising edge, newest at index 0
  logic [2:0] h_pwm [HIST];
  logic       h_run [HIST];

  svpwm_dead_time dut (.clk, .rst_n, .start_stop, .dead_band, .pwm, .gate_hi, .gate_lo);

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int i = HIST - 1; i > 0; i--) begin
      h_pwm[i] <= h_pwm[i - 1];
      h_run[i] <= h_run[i - 1];
    end
    h_pwm[0] <= pwm;
    h_run[0] <= start_stop & rst_n;
  end

  initial begin
    for (int i = 0; i < HIST; i++) begin
      h_pwm[i] = '0;
      h_run[i] = 1'b0;
    end
  end

  // compare after each edge
  always @(negedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < 3; p++) begin
        logic all_hi, all_lo;
        all_hi = 1'b1;
        all_lo = 1'b1;
        for (int j = 0; j <= int'(dead_band); j++) begin
          all_hi &= h_run[j] & h_pwm[j][p];
          all_lo &= h_run[j] & ~h_pwm[j][p];
        end
        checks++;
        if (gate_hi[p] != all_hi || gate_lo[p] != all_lo) begin
          failures++;
          if (failures < 10)
            $display("leg %0d at %0t: hi %b lo %b, expected %b %b (dead_band %0d)",
                     p, $time, gate_hi[p], gate_lo[p], all_hi, all_lo, dead_band);
        end
        if (h_run[0] && h_run[1] && h_pwm[0][p] != h_pwm[1][p] && dead_band != 0) dead_bands++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    foreach (db_list[d]) begin
      // change the dead band only while stopped
      @(negedge clk) start_stop = 1'b0;
      repeat (3) @(negedge clk);
      dead_band = DBW'(db_list[d]);
      repeat (2) @(negedge clk);
      start_stop = 1'b1;
      for (int n = 0; n < 4000; n++) begin
        @(negedge clk);
        for (int p = 0; p < 3; p++)
          if ($urandom_range(0, 99) < ((n < 2000) ? 2 : 25)) pwm[p] = ~pwm[p];
        if ($urandom_range(0, 1999) == 0) start_stop = 1'b0;
        else if (!start_stop && $urandom_range(0, 9) == 0) start_stop = 1'b1;
      end
    end
    checks++;
    if (dead_bands < 100) begin
      failures++;
      $display("only %0d dead bands inserted", dead_bands);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
