// tb_phase_counter: self-checking test of the angle generator.
// A short prescaler (5 clocks per angle count) is used so that several full
// 256-count cycles run quickly. Each clock the angle and the step strobe are
// compared with a reference that counts clocks since reset; the test also
// checks the reset value, the step period and the wrap from 255 to 0.
module tb_phase_counter;
  localparam int unsigned PRESCALE = 5;
  localparam int unsigned CYCLES   = 3 * 256 * PRESCALE + 7;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [7:0] phase;
  logic       step;
  int         checks = 0, failures = 0;
  int         wraps = 0, steps = 0;

  always #5 clk = ~clk;

  phase_counter #(.PHASE_W(8), .PRESCALE(PRESCALE)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .step(step));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint n;        // clocks since reset released
    logic [7:0] prev;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(phase == 0, "phase after reset");
    rst_n = 1'b1;
    n = 0;
    prev = phase;
    for (int c = 0; c < CYCLES; c++) begin
      #1;
      check(phase == 8'((n / PRESCALE) % 256), $sformatf("phase at clock %0d: %0d", n, phase));
      check(step == ((n % PRESCALE) == PRESCALE - 1), $sformatf("step at clock %0d", n));
      if (step) steps++;
      if (prev == 8'd255 && phase == 8'd0) wraps++;
      prev = phase;
      @(posedge clk);
      n++;
    end
    check(wraps == 3, $sformatf("wraps %0d", wraps));
    check(steps == CYCLES / PRESCALE, $sformatf("steps %0d", steps));
    // reset in mid-count clears the angle again
    rst_n = 1'b0;
    @(posedge clk);
    #1 check(phase == 0, "phase after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
