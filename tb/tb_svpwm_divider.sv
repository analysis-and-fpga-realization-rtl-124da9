// tb_svpwm_divider -- self-checking test of the carrier divider at its
// default 50 MHz / 20 kHz setting.
//
// Checks every clock of four periods against a counter model: the carrier
// must read 0,1,..,1249,1249,..,1,0 and period_start must pulse exactly once
// per 2500 clocks (one 20 kHz switching period).
module tb_svpwm_divider;
  localparam int unsigned HALF = 1250;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [10:0] carrier;
  logic        period_start;
  int checks = 0, failures = 0;

  svpwm_divider dut (.clk, .rst_n, .carrier, .period_start);

  always #10 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    int last_start;
    int exp_c;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    n = 0;
    last_start = -1;
    for (int cyc = 0; cyc < 4 * 2 * HALF; cyc++) begin
      // n counts clocks since reset release
      exp_c = (n % (2 * HALF) < HALF) ? n % (2 * HALF) : 2 * HALF - 1 - n % (2 * HALF);
      checks++;
      if (carrier != exp_c[10:0]) begin
        failures++;
        if (failures < 10) $display("carrier mismatch at %0d: %0d vs %0d", n, carrier, exp_c);
      end
      checks++;
      if (period_start != (n % (2 * HALF) == 0)) failures++;
      if (period_start) begin
        if (last_start >= 0) begin
          checks++;
          if (n - last_start != 2 * HALF) begin
            failures++;
            $display("period %0d clocks, expected %0d", n - last_start, 2 * HALF);
          end
        end
        last_start = n;
      end
      @(negedge clk);
      n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
