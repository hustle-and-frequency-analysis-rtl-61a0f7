// uart_tx -- UART transmitter with holding register, parity and CRC.
//
// A byte offered on data_in with `load` high is captured in the holding
// register when that register is empty (`ready` high). Whenever the
// shifter is idle and the holding register is full, the byte moves to the
// 9-bit intermediate register as {data, 1'b0}; the 0 in the least
// significant position is the start bit. At the same moment the even parity
// of the byte and its CRC remainder for the divisor `crc_poly` are worked
// out. The intermediate register then shifts right once per bit time, its
// least significant bit driving tx_out, so the start bit leaves first and
// the data follow least significant bit first. After the ninth bit the
// parity bit is sent, then the CRC remainder most significant bit first,
// then one stop bit (1). The holding register can take the next byte while
// the current one is on the line, so frames can run back to back.
//
// The holding register, the 9-bit intermediate register with a zero start
// bit in its LSB, LSB-first shifting, and the order data - parity - CRC
// remainder follow the source design. Even parity, a CRC_W-bit remainder
// sent MSB first, the stop bit and the 16-tick bit time are this design's
// own choices.
//
// Interface: `tick` comes from baud_gen at 16x the baud rate; one bit lasts
// 16 ticks (the start bit 15 to 16, as the frame begins between ticks).
// crc_poly is sampled when a byte enters the intermediate register.
// done pulses for one clock at the end of the stop bit. busy is high while
// a byte is held or on the line.
module uart_tx
  import uart_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic [DATA_W-1:0] data_in,
  input  logic              load,
  input  logic [CRC_W-1:0]  crc_poly,
  output logic              ready,
  output logic              busy,
  output logic              done,
  output logic              tx_out
);

  phase_e               phase;
  logic [DATA_W-1:0]    hold_data;   // holding register
  logic                 hold_full;
  logic [SHIFT_W-1:0]   shreg;       // intermediate register {data, start}
  logic                 par_bit;
  logic [CRC_W-1:0]     crc_sr;
  logic [3:0]           tick_cnt;
  logic [3:0]           bit_cnt;
  logic                 shift;       // end of the current bit time

  assign shift = tick && (tick_cnt == 4'(OVERSAMPLE - 1));
  assign ready = !hold_full;
  assign busy  = hold_full || (phase != PH_IDLE);

  // The line is a select among registers: the intermediate register's LSB
  // while shifting, then the parity bit, then the CRC register's MSB.
  always_comb begin
    unique case (phase)
      PH_DATA:   tx_out = shreg[0];
      PH_PARITY: tx_out = par_bit;
      PH_CRC:    tx_out = crc_sr[CRC_W-1];
      default:   tx_out = 1'b1;           // idle and stop bit
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_IDLE;
      hold_data <= '0;
      hold_full <= 1'b0;
      shreg     <= '1;
      par_bit   <= 1'b0;
      crc_sr    <= '0;
      tick_cnt  <= '0;
      bit_cnt   <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;

      if (load && !hold_full) begin
        hold_data <= data_in;
        hold_full <= 1'b1;
      end

      if (tick && phase != PH_IDLE)
        tick_cnt <= shift ? '0 : tick_cnt + 1'b1;

      unique case (phase)
        PH_IDLE: begin
          if (hold_full) begin
            shreg     <= {hold_data, 1'b0};
            par_bit   <= even_parity(hold_data);
            crc_sr    <= crc_remainder(hold_data, crc_poly);
            hold_full <= 1'b0;
            tick_cnt  <= '0;
            bit_cnt   <= '0;
            phase     <= PH_DATA;
          end
        end
        PH_DATA: if (shift) begin
          if (bit_cnt == 4'(SHIFT_W - 1)) begin
            phase <= PH_PARITY;
          end else begin
            shreg   <= {1'b1, shreg[SHIFT_W-1:1]};
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
        PH_PARITY: if (shift) begin
          phase   <= PH_CRC;
          bit_cnt <= '0;
        end
        PH_CRC: if (shift) begin
          if (bit_cnt == 4'(CRC_W - 1)) begin
            phase <= PH_STOP;
          end else begin
            crc_sr  <= {crc_sr[CRC_W-2:0], 1'b0};
            bit_cnt <= bit_cnt + 1'b1;
          end
        end
        PH_STOP: if (shift) begin
          phase <= PH_IDLE;
          done  <= 1'b1;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
