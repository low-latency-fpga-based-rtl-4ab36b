// Clock divider: turns the 100 MHz board clock into a 1 Hz time base.
//
// A free-running counter counts system clock cycles from 0 to DIV-1 and then
// wraps; on the wrap cycle it raises `tick` for exactly one clock cycle, so
// f_tick = f_clk / DIV. With the default DIV = 100_000_000 and a 100 MHz clock
// that is one tick per second. The divide ratio is the document's
// (N = 100 x 10^6 for a 100 MHz clock). Emitting a one-cycle enable pulse,
// instead of a derived 1 Hz clock net, is this design's choice: all other
// blocks stay on the one system clock. Reset is synchronous and active high;
// the first tick comes DIV cycles after reset is released.
//
// Ports: clk, rst (sync, active high), tick (one cycle every DIV cycles).
module clock_divider #(
  parameter int unsigned DIV = 100_000_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] count_q;
  logic         wrap;

  assign wrap = (count_q == W'(DIV - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      count_q <= '0;
      tick    <= 1'b0;
    end else begin
      count_q <= wrap ? '0 : count_q + 1'b1;
      tick    <= wrap;
    end
  end

endmodule
