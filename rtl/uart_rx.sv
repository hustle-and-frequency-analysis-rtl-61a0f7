// uart_rx -- UART receiver with parity and CRC checking.
//
// The serial input passes two synchronising flip-flops. In idle a low level
// is taken as a possible start bit; eight ticks later (the middle of the
// bit) it is checked again, and a line that has gone high again is ignored.
// From then on the line is sampled every 16 ticks, in the middle of each
// bit. The start bit and the eight data bits are shifted into a 9-bit
// intermediate register from the top, so that after the ninth sample the
// register holds {data, start} in the same layout as the transmitter's. The
// parity bit and the CRC_W remainder bits (MSB first) follow. At the middle
// of the stop bit the byte is presented on data_out with a one-clock
// `valid` pulse, together with parity_err (received parity differs from the
// even parity of the received byte), crc_err (received remainder differs
// from the remainder of the received byte for the divisor crc_poly) and
// crc_out, the remainder as received. These outputs hold until the next
// frame completes.
//
// Shifting the line into an intermediate register, returning the eight data
// bits, and checking parity and then CRC follow the source design. The
// start-bit qualification, mid-bit sampling at 16x oversampling, the
// synchroniser and the frame layout (see uart_pkg) are this design's own.
// The stop bit's value is not checked, and the start-bit sample kept in
// bit 0 of the register is not used after the frame is confirmed.
//
// Timing: valid rises about 2 clocks after the tick at the middle of the
// stop bit, i.e. about 1.5 bit times before the end of a back-to-back frame.
module uart_rx
  import uart_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic              rx_in,
  input  logic [CRC_W-1:0]  crc_poly,
  output logic [DATA_W-1:0] data_out,
  output logic              valid,
  output logic              parity_err,
  output logic              crc_err,
  output logic [CRC_W-1:0]  crc_out
);

  phase_e             phase;
  logic [1:0]         sync;
  logic               rx_s;
  logic [SHIFT_W-1:0] shreg;       // intermediate register {data, start}
  logic               par_rx;
  logic [CRC_W-1:0]   crc_rx;
  logic [3:0]         tick_cnt;
  logic [3:0]         bit_cnt;
  logic               sample;      // middle of the current bit
  logic [DATA_W-1:0]  rx_byte;

  assign rx_s    = sync[1];
  assign sample  = tick && (tick_cnt == 4'(OVERSAMPLE - 1));
  assign rx_byte = shreg[SHIFT_W-1:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rx_in};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= PH_IDLE;
      shreg      <= '0;
      par_rx     <= 1'b0;
      crc_rx     <= '0;
      tick_cnt   <= '0;
      bit_cnt    <= '0;
      data_out   <= '0;
      valid      <= 1'b0;
      parity_err <= 1'b0;
      crc_err    <= 1'b0;
      crc_out    <= '0;
    end else begin
      valid <= 1'b0;

      if (tick && phase != PH_IDLE)
        tick_cnt <= sample ? '0 : tick_cnt + 1'b1;

      unique case (phase)
        PH_IDLE: begin
          tick_cnt <= '0;
          if (!rx_s) phase <= PH_START;
        end
        PH_START: if (tick) begin
          if (tick_cnt == 4'(OVERSAMPLE / 2 - 1)) begin
            tick_cnt <= '0;
            if (!rx_s) begin
              shreg   <= {rx_s, shreg[SHIFT_W-1:1]};
              bit_cnt <= '0;
              phase   <= PH_DATA;
            end else begin
              phase <= PH_IDLE;              // glitch, not a start bit
            end
          end
        end
        PH_DATA: if (sample) begin
          shreg <= {rx_s, shreg[SHIFT_W-1:1]};
          if (bit_cnt == 4'(DATA_W - 1)) phase <= PH_PARITY;
          else                           bit_cnt <= bit_cnt + 1'b1;
        end
        PH_PARITY: if (sample) begin
          par_rx  <= rx_s;
          bit_cnt <= '0;
          phase   <= PH_CRC;
        end
        PH_CRC: if (sample) begin
          crc_rx <= {crc_rx[CRC_W-2:0], rx_s};
          if (bit_cnt == 4'(CRC_W - 1)) phase <= PH_STOP;
          else                          bit_cnt <= bit_cnt + 1'b1;
        end
        PH_STOP: if (sample) begin
          data_out   <= rx_byte;
          valid      <= 1'b1;
          parity_err <= (par_rx != even_parity(rx_byte));
          crc_err    <= (crc_rx != crc_remainder(rx_byte, crc_poly));
          crc_out    <= crc_rx;
          phase      <= PH_IDLE;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
