// uart_top_tb -- end-to-end test: two UART stations talking to each other.
//
// Station A's tx_out feeds station B's rx_in and B's tx_out feeds A's rx_in,
// both at the default DIVISOR, so each frame takes 15 * 16 * 54 clocks.
// Both directions run at the same time. The bench can invert the line from
// A to B for part of one bit, to corrupt a data bit (parity and CRC must
// both flag it), the parity bit (parity only) or a CRC bit (CRC only), and
// can put short low glitches on the idle line (no frame may start). It
// counts how often each mechanism happened: frames in each direction,
// bytes accepted by the holding register while a frame was on the line,
// parity errors, CRC errors and rejected glitches. A mechanism that never
// happened counts as a failure. Every received byte and flag is compared
// with a scoreboard, and the frame rate is checked against 15 bit times.
module uart_top_tb;
  import uart_pkg::*;

  localparam int DIV        = 54;              // uart_top's default
  localparam int BIT_CLKS   = 16 * DIV;
  localparam int FRAME_BITS = 1 + DATA_W + 1 + CRC_W + 1;
  localparam int NFRAMES    = 24;

  logic clk = 1'b0;
  logic rst_n;
  logic [CRC_W-1:0] crc_poly;

  logic [DATA_W-1:0] a_tx_data, b_tx_data, a_rx_data, b_rx_data;
  logic a_tx_load, b_tx_load, a_tx_ready, b_tx_ready, a_tx_busy, b_tx_busy;
  logic a_tx_done, b_tx_done, a_tx_out, b_tx_out;
  logic a_rx_valid, b_rx_valid, a_perr, b_perr, a_cerr, b_cerr;
  logic [CRC_W-1:0] a_crc_out, b_crc_out;
  logic flip_ab = 1'b0;   // inverts the A-to-B line
  logic glitch_ab = 1'b0; // pulls the A-to-B line low
  logic line_ab, line_ba;

  int checks = 0, failures = 0;
  int n_ab = 0, n_ba = 0, n_held = 0, n_perr = 0, n_cerr = 0, n_glitch = 0;
  int cyc = 0;
  bit out_of_reset = 1'b0;   // set once reset has been applied and released

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  assign line_ab = (a_tx_out ^ flip_ab) & ~glitch_ab;
  assign line_ba = b_tx_out;

  uart_top u_a (
    .clk, .rst_n, .crc_poly,
    .tx_data(a_tx_data), .tx_load(a_tx_load), .tx_ready(a_tx_ready),
    .tx_busy(a_tx_busy), .tx_done(a_tx_done), .tx_out(a_tx_out),
    .rx_in(line_ba), .rx_data(a_rx_data), .rx_valid(a_rx_valid),
    .rx_parity_err(a_perr), .rx_crc_err(a_cerr), .rx_crc_out(a_crc_out)
  );

  uart_top u_b (
    .clk, .rst_n, .crc_poly,
    .tx_data(b_tx_data), .tx_load(b_tx_load), .tx_ready(b_tx_ready),
    .tx_busy(b_tx_busy), .tx_done(b_tx_done), .tx_out(b_tx_out),
    .rx_in(line_ab), .rx_data(b_rx_data), .rx_valid(b_rx_valid),
    .rx_parity_err(b_perr), .rx_crc_err(b_cerr), .rx_crc_out(b_crc_out)
  );

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

  // scoreboards: byte sent, and which bit of the frame was inverted (-1 none)
  logic [7:0] q_ab [$];
  int         q_ab_bit [$];
  logic [7:0] q_ba [$];
  int         t_first_ab = -1, t_last_ab = -1;

  // B receives from A
  always @(posedge clk) if (b_rx_valid) begin
    logic [7:0] d, got;
    int fb;
    logic exp_perr, exp_cerr;
    logic [CRC_W-1:0] rem;
    if (q_ab.size() == 0) begin
      check(0, "B received a frame nobody sent");
    end else begin
      d  = q_ab.pop_front();
      fb = q_ab_bit.pop_front();
      got = d;
      rem = ref_crc(d, crc_poly);
      if (fb >= 1 && fb <= 8) got[fb-1] = ~got[fb-1];
      if (fb >= 10 && fb < 10 + CRC_W) rem[CRC_W-1-(fb-10)] = ~rem[CRC_W-1-(fb-10)];
      exp_perr = (fb >= 1 && fb <= 9);
      exp_cerr = (fb >= 1 && fb <= 8) || (fb >= 10 && fb < 10 + CRC_W);
      check(b_rx_data == got, $sformatf("B got %h, expected %h", b_rx_data, got));
      check(b_perr == exp_perr, $sformatf("B parity_err %b, expected %b (bit %0d)", b_perr, exp_perr, fb));
      check(b_cerr == exp_cerr, $sformatf("B crc_err %b, expected %b (bit %0d)", b_cerr, exp_cerr, fb));
      check(b_crc_out == rem, $sformatf("B crc_out %h, expected %h", b_crc_out, rem));
      if (b_perr) n_perr++;
      if (b_cerr) n_cerr++;
    end
    if (t_first_ab < 0) t_first_ab = cyc;
    t_last_ab = cyc;
    n_ab++;
  end

  // A receives from B
  always @(posedge clk) if (a_rx_valid) begin
    logic [7:0] d;
    if (q_ba.size() == 0) begin
      check(0, "A received a frame nobody sent");
    end else begin
      d = q_ba.pop_front();
      check(a_rx_data == d, $sformatf("A got %h, expected %h", a_rx_data, d));
      check(!a_perr && !a_cerr, "A sees no error on a clean line");
      check(a_crc_out == ref_crc(d, crc_poly), "A crc_out");
    end
    n_ba++;
  end

  initial begin : watchdog
    repeat ((2 * NFRAMES + 10) * FRAME_BITS * BIT_CLKS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // offer one byte on A; flip_bit >= 0 corrupts that bit of the frame
  task automatic send_a(input logic [7:0] d, input int flip_bit);
    @(negedge clk);
    while (!a_tx_ready) @(negedge clk);
    if (a_tx_busy) n_held++;
    a_tx_data = d;
    a_tx_load = 1'b1;
    q_ab.push_back(d);
    q_ab_bit.push_back(flip_bit);
    @(negedge clk);
    a_tx_load = 1'b0;
  endtask

  // A-to-B line corrupter: follows the frames on A's output
  initial begin : corrupter
    forever begin
      @(negedge a_tx_out);
      if (q_ab_bit.size() > 0) begin
        // the frame on the line is the oldest one not yet received
        int fb;
        fb = q_ab_bit[0];
        if (fb >= 0) begin
          repeat (fb * BIT_CLKS + BIT_CLKS / 4) @(posedge clk);
          flip_ab = 1'b1;
          repeat (BIT_CLKS / 2) @(posedge clk);
          flip_ab = 1'b0;
        end
      end
      @(posedge a_tx_done);
    end
  end

  // B sends a steady stream back to A, back to back
  initial begin : b_writer
    b_tx_load = 1'b0;
    b_tx_data = '0;
    wait (out_of_reset);
    for (int i = 0; i < NFRAMES; i++) begin
      @(negedge clk);
      while (!b_tx_ready) @(negedge clk);
      b_tx_data = 8'($urandom);
      b_tx_load = 1'b1;
      q_ba.push_back(b_tx_data);
      @(negedge clk);
      b_tx_load = 1'b0;
    end
  end

  initial begin
    int v0, fb;
    rst_n = 1'b0;
    a_tx_load = 1'b0;
    a_tx_data = '0;
    crc_poly = 4'b0011;            // g(x) = x^4 + x + 1
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    out_of_reset = 1'b1;
    repeat (10) @(posedge clk);

    // back-to-back clean frames, then frames with one corrupted bit
    for (int i = 0; i < NFRAMES; i++) begin
      case (i % 6)
        3:       fb = $urandom_range(1, 8);              // a data bit
        4:       fb = 9;                                  // the parity bit
        5:       fb = $urandom_range(10, 9 + CRC_W);     // a CRC bit
        default: fb = -1;
      endcase
      send_a(8'($urandom), fb);
    end
    while (a_tx_busy || q_ab.size() != 0) @(posedge clk);

    // frame rate: NFRAMES back-to-back frames, 15 bit times each
    check(t_last_ab - t_first_ab >= (NFRAMES - 1) * FRAME_BITS * BIT_CLKS - NFRAMES * DIV &&
          t_last_ab - t_first_ab <= (NFRAMES - 1) * FRAME_BITS * BIT_CLKS + NFRAMES * DIV,
          $sformatf("%0d frames in %0d clocks, expected %0d", NFRAMES - 1,
                    t_last_ab - t_first_ab, (NFRAMES - 1) * FRAME_BITS * BIT_CLKS));

    // glitches on the idle A-to-B line start no frame
    for (int g = 0; g < 3; g++) begin
      v0 = n_ab;
      @(negedge clk) glitch_ab = 1'b1;
      repeat ($urandom_range(2, 5 * DIV)) @(posedge clk);
      @(negedge clk) glitch_ab = 1'b0;
      repeat (2 * BIT_CLKS) @(posedge clk);
      check(n_ab == v0, "a glitch starts no frame");
      if (n_ab == v0) n_glitch++;
    end

    // one more clean frame after the glitches
    send_a(8'hA5, -1);
    while (a_tx_busy || q_ab.size() != 0) @(posedge clk);
    while (q_ba.size() != 0) @(posedge clk);

    check(n_ab == NFRAMES + 1, $sformatf("B received %0d frames, expected %0d", n_ab, NFRAMES + 1));
    check(n_ba == NFRAMES, $sformatf("A received %0d frames, expected %0d", n_ba, NFRAMES));
    check(n_held > 0, "holding register took a byte during a frame");
    check(n_perr > 0, "a parity error was detected");
    check(n_cerr > 0, "a CRC error was detected");
    check(n_glitch > 0, "a glitch was rejected");
    $display("frames A->B %0d, B->A %0d, held %0d, parity errors %0d, crc errors %0d, glitches %0d",
             n_ab, n_ba, n_held, n_perr, n_cerr, n_glitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
