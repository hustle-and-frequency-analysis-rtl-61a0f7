// uart_top -- one UART station: baud-rate generator, transmitter, receiver.
//
// This is the unit of the design: a transmitter and a receiver sharing one
// baud-rate generator, so that two stations cross-connected (tx_out of one
// to rx_in of the other) exchange bytes in both directions at once. Each
// frame carries a start bit, eight data bits LSB first, an even parity bit,
// a CRC_W-bit CRC remainder for the divisor given on crc_poly, and a stop
// bit. The receiver flags parity and CRC mismatches. The three-part
// structure (baud-rate generator, transmitter, receiver) and the two-way
// link between two stations follow the source design; the frame layout,
// oversampling and handshakes are this design's own (see the sub-blocks).
//
// Interface: tx_data/tx_load/tx_ready form a one-deep holding-register
// handshake: a byte is taken on a clock where tx_load and tx_ready are both
// high. rx_valid pulses for one clock with rx_data and the error flags.
// crc_poly must be the same at both ends of a link.
// Timing: one bit lasts 16 * DIVISOR clocks; a frame is 15 bits.
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned DIVISOR = 54
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CRC_W-1:0]  crc_poly,
  // transmit side
  input  logic [DATA_W-1:0] tx_data,
  input  logic              tx_load,
  output logic              tx_ready,
  output logic              tx_busy,
  output logic              tx_done,
  output logic              tx_out,
  // receive side
  input  logic              rx_in,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_valid,
  output logic              rx_parity_err,
  output logic              rx_crc_err,
  output logic [CRC_W-1:0]  rx_crc_out
);

  logic tick;

  baud_gen #(.DIVISOR(DIVISOR)) u_baud (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (1'b1),
    .tick  (tick)
  );

  uart_tx u_tx (
    .clk      (clk),
    .rst_n    (rst_n),
    .tick     (tick),
    .data_in  (tx_data),
    .load     (tx_load),
    .crc_poly (crc_poly),
    .ready    (tx_ready),
    .busy     (tx_busy),
    .done     (tx_done),
    .tx_out   (tx_out)
  );

  uart_rx u_rx (
    .clk        (clk),
    .rst_n      (rst_n),
    .tick       (tick),
    .rx_in      (rx_in),
    .crc_poly   (crc_poly),
    .data_out   (rx_data),
    .valid      (rx_valid),
    .parity_err (rx_parity_err),
    .crc_err    (rx_crc_err),
    .crc_out    (rx_crc_out)
  );

endmodule
