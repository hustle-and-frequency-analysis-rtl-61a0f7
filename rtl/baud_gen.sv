// baud_gen -- baud-rate generator: a frequency divider.
//
// A free-running counter counts DIVISOR clock cycles and raises `tick` for
// one clock at the end of each count, so tick runs at f_clk / DIVISOR. The
// transmitter and receiver use tick as their 16x-oversampling time base, so
// the baud rate is f_clk / (DIVISOR * 16). With the default DIVISOR of 54
// and a 100 MHz clock that is about 115.7 kbaud. That the generator is a
// frequency divider follows the source design; the divisor value, the 16x
// oversampling and the `en` input are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low), en (counter runs while
// high, and restarts from zero when low), tick (one-cycle pulse).
// Timing: the first tick comes DIVISOR cycles after en rises.
module baud_gen #(
  parameter int unsigned DIVISOR = 54
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic tick
);

  localparam int unsigned CW = (DIVISOR > 1) ? $clog2(DIVISOR) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (!en) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == CW'(DIVISOR - 1)) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end

endmodule
