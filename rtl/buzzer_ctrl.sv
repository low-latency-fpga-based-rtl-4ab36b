// Buzzer control: turns the comparator's match into the alarm output.
//
// The document has the buzzer module take the comparator's trigger and drive
// a digital output pin (and an LED) as soon as the times match. How long it
// sounds is not given; this design latches the alarm: on the first cycle of a
// match (rising edge of `match`) while the alarm is enabled, `ringing` is
// set, and it stays set until the user presses stop or switches the alarm
// off. Acting on the rising edge keeps a stop pressed during the matching
// second from being overridden by the still-high match. The output is a
// steady level meant for an active buzzer module; `buzzer` and `led` carry
// the same signal.
//
// Timing: `buzzer` rises on the clock edge after `match` rises (one cycle,
// 10 ns at 100 MHz). A stop pulse clears it on the next edge. Reset is
// synchronous and silences the alarm.
module buzzer_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic match,     // comparator output
  input  logic alarm_en,  // alarm armed (level)
  input  logic stop,      // one-cycle pulse: silence the alarm
  output logic buzzer,    // buzzer pin, active high
  output logic led        // alarm indicator LED, active high
);

  logic match_q;
  logic ringing_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      match_q   <= 1'b0;
      ringing_q <= 1'b0;
    end else begin
      match_q <= match;
      if (stop || !alarm_en)          ringing_q <= 1'b0;
      else if (match && !match_q)     ringing_q <= 1'b1;
    end
  end

  assign buzzer = ringing_q;
  assign led    = ringing_q;

endmodule
