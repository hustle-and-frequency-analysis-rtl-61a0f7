// uart_rx_tb -- self-checking test of the UART receiver.
//
// The bench drives the serial line itself, bit by bit, with frames built
// from random bytes and divisors: start, data LSB first, even parity, CRC
// remainder MSB first (long division of {data, 0000} by {1, poly}, worked
// out here), stop. Some frames are corrupted on purpose: the parity bit
// inverted, a CRC bit inverted, or a data bit inverted after parity and CRC
// were computed. Every frame must give exactly one `valid` pulse, in its
// stop bit, with the right byte, received remainder and error flags. Short
// low glitches on the idle line must not start a frame.
module uart_rx_tb;
  import uart_pkg::*;

  localparam int TICK_CLKS  = 3;
  localparam int BIT_CLKS   = 16 * TICK_CLKS;
  localparam int FRAME_BITS = 1 + DATA_W + 1 + CRC_W + 1;
  localparam int NFRAMES    = 60;

  logic clk = 1'b0;
  logic rst_n;
  logic tick;
  logic rx_in;
  logic [CRC_W-1:0] crc_poly;
  logic [DATA_W-1:0] data_out;
  logic valid, parity_err, crc_err;
  logic [CRC_W-1:0] crc_out;
  int   checks = 0, failures = 0;
  int   tcount = 0;
  int   valids = 0;
  int   n_par = 0, n_crc = 0, n_glitch = 0;

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    tcount <= (tcount == TICK_CLKS - 1) ? 0 : tcount + 1;
    tick   <= (tcount == TICK_CLKS - 1);
  end

  always @(posedge clk) if (valid) valids++;

  uart_rx dut (.clk, .rst_n, .tick, .rx_in, .crc_poly, .data_out, .valid,
               .parity_err, .crc_err, .crc_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [CRC_W-1:0] ref_crc(input logic [7:0] d, input logic [CRC_W-1:0] p);
    logic [7+CRC_W:0] m;
    logic [CRC_W:0]   g;
    m = {d, {CRC_W{1'b0}}};
    g = {1'b1, p};
    for (int i = 7 + CRC_W; i >= CRC_W; i--)
      if (m[i]) m[i -: CRC_W + 1] = m[i -: CRC_W + 1] ^ g;
    return m[CRC_W-1:0];
  endfunction

  function automatic logic ref_par(input logic [7:0] d);
    int ones = 0;
    for (int i = 0; i < 8; i++) ones += int'(d[i]);
    return logic'(ones % 2);
  endfunction

  initial begin : watchdog
    repeat ((NFRAMES + 10) * (FRAME_BITS + 2) * BIT_CLKS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mode 0 clean, 1 parity bit inverted, 2 a CRC bit inverted,
  // 3 a data bit inverted after parity and CRC were computed
  task automatic send_frame(input logic [7:0] d, input int mode);
    logic [FRAME_BITS-1:0] bits;
    logic [7:0] sent;
    logic [CRC_W-1:0] rem;
    logic exp_perr, exp_cerr;
    int v0;
    rem  = ref_crc(d, crc_poly);
    sent = d;
    bits[0] = 1'b0;
    bits[9] = ref_par(d);
    for (int k = 0; k < CRC_W; k++) bits[10+k] = rem[CRC_W-1-k];
    bits[FRAME_BITS-1] = 1'b1;
    case (mode)
      1: bits[9] = ~bits[9];
      2: bits[10 + $urandom_range(0, CRC_W-1)] ^= 1'b1;
      3: sent[$urandom_range(0, 7)] ^= 1'b1;
      default: ;
    endcase
    bits[8:1] = sent;
    for (int k = 0; k < CRC_W; k++) rem[CRC_W-1-k] = bits[10+k];
    exp_perr = (bits[9] != ref_par(sent));
    exp_cerr = (rem != ref_crc(sent, crc_poly));
    v0 = valids;
    for (int b = 0; b < FRAME_BITS; b++) begin
      rx_in = bits[b];
      repeat (BIT_CLKS) @(posedge clk);
      if (b < FRAME_BITS - 1)
        check(valids == v0, "no result before the stop bit");
    end
    check(valids == v0 + 1, $sformatf("%0d results for one frame", valids - v0));
    check(data_out == sent, $sformatf("data %h, expected %h", data_out, sent));
    check(crc_out == rem, $sformatf("crc_out %h, expected %h", crc_out, rem));
    check(parity_err == exp_perr, $sformatf("parity_err %b, expected %b (mode %0d)", parity_err, exp_perr, mode));
    check(crc_err == exp_cerr, $sformatf("crc_err %b, expected %b (mode %0d)", crc_err, exp_cerr, mode));
    if (exp_perr) n_par++;
    if (exp_cerr) n_crc++;
  endtask

  initial begin
    int v0;
    rst_n = 1'b0; rx_in = 1'b1; crc_poly = 4'h3;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (BIT_CLKS) @(posedge clk);
    for (int i = 0; i < NFRAMES; i++) begin
      crc_poly = 4'($urandom);
      send_frame(8'($urandom), i % 4);
      // back to back most of the time, sometimes an idle gap or a glitch
      if (i % 5 == 4) begin
        v0 = valids;
        rx_in = 1'b0;
        repeat ($urandom_range(2, 5 * TICK_CLKS)) @(posedge clk);
        rx_in = 1'b1;
        repeat (2 * BIT_CLKS) @(posedge clk);
        check(valids == v0, "glitch shorter than half a bit starts no frame");
        n_glitch++;
      end else if (i % 3 == 0) begin
        repeat ($urandom_range(1, 3 * BIT_CLKS)) @(posedge clk);
      end
    end
    check(n_par > 0 && n_crc > 0 && n_glitch > 0, "all error kinds exercised");
    $display("frames %0d, parity errors %0d, crc errors %0d, glitches %0d", NFRAMES, n_par, n_crc, n_glitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
