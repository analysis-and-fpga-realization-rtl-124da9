// tb_svpwm_sin_rom -- self-checking test of the sine table.
//
// Reads all 2^8+1 entries and compares each with round(65536*sin(i/256*60 deg))
// worked out with the simulator's real-valued $sin; entries may differ by at
// most one count. Also checks the one-clock read latency.
module tb_svpwm_sin_rom;
  localparam int unsigned AW = 8;
  localparam int unsigned DW = 16;
  localparam real PI = 3.14159265358979323846;

  logic          clk = 1'b0;
  logic [AW:0]   addr = '0;
  logic [DW-1:0] data;
  int checks = 0, failures = 0;

  svpwm_sin_rom dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= (1 << AW); i++) begin
      int expv;
      @(negedge clk) addr = (AW+1)'(i);
      @(posedge clk);
      #1;
      expv = int'($floor(65536.0 * $sin(real'(i) / 256.0 * PI / 3.0) + 0.5));
      checks++;
      if (int'(data) - expv > 1 || expv - int'(data) > 1) begin
        failures++;
        if (failures < 10) $display("entry %0d: %0d, expected %0d", i, data, expv);
      end
    end
    // latency: a new address must not show before the clock edge
    @(negedge clk) addr = (AW+1)'(1 << AW);
    @(posedge clk);
    @(negedge clk) addr = '0;
    #1;
    checks++;
    if (data == 16'd0) failures++;
    @(posedge clk);
    #1;
    checks++;
    if (data != 16'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
