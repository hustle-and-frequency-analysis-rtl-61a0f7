// uart_pkg -- types, sizes and check functions shared by the UART blocks.
//
// The frame on the serial line is: start bit (0), eight data bits least
// significant first, one even-parity bit, CRC_W remainder bits most
// significant first, one stop bit (1). The transmitter loads its data
// into a 9-bit intermediate register {data, start}; the eight data bits and
// the 9-bit intermediate register follow the source design. The parity sense,
// the CRC width, the order of the CRC bits and the stop bit are this
// design's own choices.
//
// The CRC is the remainder of data(x) * x^CRC_W divided by the generator
// g(x) = x^CRC_W + poly(x), where poly is a user input (the "divisor"),
// with the leading one implicit. data bit 7 is the highest coefficient.
package uart_pkg;

  localparam int unsigned DATA_W     = 8;           // data bits per frame
  localparam int unsigned SHIFT_W    = DATA_W + 1;  // intermediate register: data + start bit
  localparam int unsigned CRC_W      = 4;           // CRC remainder width
  localparam int unsigned OVERSAMPLE = 16;          // baud ticks per bit

  // Phase of a frame, used by transmitter and receiver.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_START  = 3'd1,
    PH_DATA   = 3'd2,
    PH_PARITY = 3'd3,
    PH_CRC    = 3'd4,
    PH_STOP   = 3'd5
  } phase_e;

  // Even parity: the parity bit makes the number of ones in data+parity even.
  function automatic logic even_parity(input logic [DATA_W-1:0] d);
    return ^d;
  endfunction

  // Bitwise polynomial long division, most significant data bit first.
  function automatic logic [CRC_W-1:0] crc_remainder(input logic [DATA_W-1:0] d,
                                                     input logic [CRC_W-1:0]  poly);
    logic [CRC_W-1:0] r;
    logic             fb;
    r = '0;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      fb = r[CRC_W-1] ^ d[i];
      r  = {r[CRC_W-2:0], 1'b0};
      if (fb) r = r ^ poly;
    end
    return r;
  endfunction

endpackage
