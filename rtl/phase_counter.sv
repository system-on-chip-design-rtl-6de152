// phase_counter: angle generator of the switching-pattern controller.
//
// One AC output cycle (0 to 360 degrees) is divided into 2^PHASE_W angle
// counts (256 in the source design). A prescaler counts PRESCALE clock
// cycles per angle count; when it wraps, the angle counter advances by one
// and wraps from 2^PHASE_W-1 back to 0, so the output period is
// PRESCALE * 2^PHASE_W clock cycles (131072 at the defaults, i.e. 50 Hz at
// a 6.5536 MHz clock).
//
// Interface: phase is the registered angle count; step is high for the one
// clock cycle in which phase is about to advance (prescaler at its last
// count). rst_n is an active-low synchronous reset that clears both counters.
//
// From the source design: the 2^8 angle resolution and the two counters
// (an 8-bit angle register and a 9-bit register beside it in the published
// layout). This implementation's choices: the 9-bit register is read as the
// clock prescaler, its default full 9-bit range (PRESCALE = 512), and the
// synchronous reset.
module phase_counter #(
  parameter int unsigned PHASE_W  = luo_pkg::PHASE_W,
  parameter int unsigned PRESCALE = 512
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic [PHASE_W-1:0] phase,
  output logic               step
);

  localparam int unsigned DIV_W = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [DIV_W-1:0] div_q;

  assign step = (div_q == DIV_W'(PRESCALE - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_q <= '0;
      phase <= '0;
    end else begin
      if (step) begin
        div_q <= '0;
        phase <= phase + 1'b1;
      end else begin
        div_q <= div_q + 1'b1;
      end
    end
  end

endmodule
