// uart_tx_tb -- self-checking test of the UART transmitter.
//
// The bench makes its own tick (every TICK_CLKS clocks) and decodes the
// serial line independently: on each falling edge from idle it samples the
// middle of the 15 bits of a frame. The start bit, the data bits (LSB
// first), the even parity bit, the CRC remainder (computed here by long
// division of {data, 0000} by {1, poly}) and the stop bit are compared with
// the byte that was offered. It also checks the holding register: a second
// byte is accepted while the first is on the line, ready drops while the
// register is full, and the second frame follows the first within one
// tick. Bit time and frame length are measured in clocks.
module uart_tx_tb;
  import uart_pkg::*;

  localparam int TICK_CLKS = 3;
  localparam int BIT_CLKS  = 16 * TICK_CLKS;
  localparam int FRAME_BITS = 1 + DATA_W + 1 + CRC_W + 1;
  localparam int NFRAMES   = 40;

  logic clk = 1'b0;
  logic rst_n;
  logic tick;
  logic [DATA_W-1:0] data_in;
  logic load;
  logic [CRC_W-1:0] crc_poly;
  logic ready, busy, done, tx_out;
  int   checks = 0, failures = 0;
  int   tcount = 0;

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    tcount <= (tcount == TICK_CLKS - 1) ? 0 : tcount + 1;
    tick   <= (tcount == TICK_CLKS - 1);
  end

  uart_tx dut (.clk, .rst_n, .tick, .data_in, .load, .crc_poly,
               .ready, .busy, .done, .tx_out);

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

  // expected frames, in order
  logic [7:0]       exp_d [$];
  logic [CRC_W-1:0] exp_p [$];
  int frames_seen = 0;
  int last_stop_end = -1;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // line monitor
  initial begin : monitor
    logic [FRAME_BITS-1:0] bits;
    logic [7:0] d;
    logic [CRC_W-1:0] p, c;
    int t_start;
    forever begin
      @(negedge tx_out);
      t_start = cyc;
      if (last_stop_end >= 0)
        check(t_start - last_stop_end <= TICK_CLKS + 2,
              $sformatf("gap between back-to-back frames %0d clocks", t_start - last_stop_end));
      repeat (BIT_CLKS / 2) @(posedge clk);
      for (int b = 0; b < FRAME_BITS; b++) begin
        bits[b] = tx_out;
        if (b != FRAME_BITS - 1) repeat (BIT_CLKS) @(posedge clk);
      end
      if (exp_d.size() == 0) begin
        check(0, "frame without an offered byte");
        continue;
      end
      d = exp_d.pop_front();
      p = exp_p.pop_front();
      check(bits[0] == 1'b0, "start bit is 0");
      check(bits[8:1] == d, $sformatf("data %h, expected %h", bits[8:1], d));
      check(bits[9] == ref_par(d), "even parity bit");
      for (int k = 0; k < CRC_W; k++) c[CRC_W-1-k] = bits[10+k];
      check(c == ref_crc(d, p), $sformatf("crc %h, expected %h (data %h poly %h)", c, ref_crc(d, p), d, p));
      check(bits[FRAME_BITS-1] == 1'b1, "stop bit is 1");
      // done marks the end of the stop bit, half a bit after this sample
      @(posedge done);
      last_stop_end = cyc;
      check(cyc - t_start >= FRAME_BITS * BIT_CLKS - TICK_CLKS - 2 &&
            cyc - t_start <= FRAME_BITS * BIT_CLKS + 2,
            $sformatf("frame took %0d clocks, expected %0d", cyc - t_start, FRAME_BITS * BIT_CLKS));
      frames_seen++;
    end
  end

  initial begin : watchdog
    repeat ((NFRAMES + 5) * FRAME_BITS * BIT_CLKS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic offer(input logic [7:0] d, input logic [CRC_W-1:0] p);
    @(negedge clk);
    while (!ready) @(negedge clk);
    data_in  = d;
    crc_poly = p;
    load     = 1'b1;
    exp_d.push_back(d);
    exp_p.push_back(p);
    @(negedge clk);
    load = 1'b0;
    check(!ready, "holding register reports full after a load");
  endtask

  initial begin
    int stalls;
    rst_n = 1'b0; load = 1'b0; data_in = '0; crc_poly = 4'h3;
    repeat (4) @(posedge clk);
    check(tx_out == 1'b1 && !busy && ready, "idle after reset");
    rst_n = 1'b1;

    // single frames with gaps; poly must stay stable while the byte is
    // moved to the intermediate register, so hold it until the line starts
    for (int i = 0; i < NFRAMES / 2; i++) begin
      offer(8'($urandom), 4'($urandom));
      @(posedge done);
      repeat ($urandom_range(0, 100)) @(posedge clk);
      last_stop_end = -1;
    end

    // back to back: the holding register takes the next byte during a frame
    stalls = 0;
    crc_poly = 4'h9;
    for (int i = 0; i < NFRAMES / 2; i++) begin
      @(negedge clk);
      if (!ready) stalls++;
      while (!ready) @(negedge clk);
      data_in = 8'($urandom);
      load    = 1'b1;
      exp_d.push_back(data_in);
      exp_p.push_back(crc_poly);
      @(negedge clk);
      load = 1'b0;
      check(busy, "busy while a byte is held or sent");
    end
    check(stalls >= NFRAMES / 2 - 2, $sformatf("writer stalled only %0d times", stalls));
    while (busy) @(posedge clk);
    repeat (BIT_CLKS) @(posedge clk);
    check(frames_seen == NFRAMES, $sformatf("%0d frames seen, expected %0d", frames_seen, NFRAMES));
    check(exp_d.size() == 0, "all offered bytes sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
