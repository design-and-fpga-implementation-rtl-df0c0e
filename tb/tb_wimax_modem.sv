// tb_wimax_modem: end-to-end test of the modem at its default parameters.
//
// Random information bits (followed by a zero tail that flushes the
// Viterbi decoder) go into the transmitter. The transmitted I/Q symbols
// pass through a channel model in this testbench that adds uniform noise
// of up to +-0.5 to each coordinate and, every 20 to 40 symbols, pushes one
// coordinate by 1.25 across the +-2 threshold, so that its inner bit (b1 or
// b3) is demapped wrongly. The differential decoder turns that one error
// into two adjacent errors, which fall into two different code pairs; the
// Viterbi decoder must correct them. (An error on an outer bit, b0 or b2,
// would put both errors into one code pair. This code's free distance is
// 4, so such a double error can tie with a wrong path and is not always
// corrected; the test therefore does not inject it.) Received symbols queue here and enter the receiver
// whenever it is ready. The decoded bits must equal the information bits.
//
// Counted mechanisms, each of which must occur at least once:
//   tx stalls      - a bit offered while the transmitter was not ready
//   rx stalls      - a symbol waiting while the receiver was not ready
//   symbol errors  - symbols the channel moved into a wrong decision
//                    region, all of which the coding must correct
//   inner/outer    - both soft-bit segments of the demapper used
// It also checks the transmitter's rate: with bits always offered, one
// symbol every four clocks.
module tb_wimax_modem;
  localparam int NBITS    = 6000;
  localparam int TB_DEPTH = 15;
  localparam int NTOTAL   = NBITS + TB_DEPTH + 1;  // even: whole symbols

  logic clk = 0, rst = 1;
  logic tx_bit, tx_bit_valid, tx_bit_ready, tx_iq_valid;
  logic signed [7:0] tx_i, tx_q, rx_i, rx_q;
  logic rx_iq_valid, rx_iq_ready, rx_bit, rx_bit_valid, rs232_dte_txd;
  logic [39:0] rx_soft;

  int checks = 0, failures = 0;
  int tx_stalls = 0, rx_stalls = 0, sym_errors = 0, n_sym = 0;
  int outer_seg = 0;
  logic info[$];
  int n_dec = 0, n_sent = 0;
  int chan_i[$], chan_q[$];
  int next_hit = 25, hits = 0;
  bit hold_rx = 0;
  int rate_cycles = 0, rate_syms = 0;
  bit rate_window = 0;

  wimax_modem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d bits decoded", n_dec, NBITS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // nearest level index along one axis: -3,-1,+1,+3 -> 0..3
  function automatic int region(int v);
    if (v < -32) return 0;
    if (v < 0)   return 1;
    if (v < 32)  return 2;
    return 3;
  endfunction

  // move a level across the inner/outer threshold of its half axis
  function automatic int push(int v);
    if (v > 32)  return v - 20;
    if (v < -32) return v + 20;
    if (v > 0)   return v + 20;
    return v - 20;
  endfunction

  // channel
  always @(posedge clk) if (!rst && tx_iq_valid) begin
    int ni, nq;
    ni = int'(tx_i) + $urandom_range(0, 16) - 8;
    nq = int'(tx_q) + $urandom_range(0, 16) - 8;
    n_sym++;
    if (n_sym == next_hit) begin
      // move one coordinate 1.25 across its inner/outer threshold (+-2):
      // outer levels inwards, inner levels outwards
      if ($urandom_range(0, 1)) ni = push(int'(tx_i));
      else                      nq = push(int'(tx_q));
      next_hit = n_sym + $urandom_range(20, 40);
      hits++;
    end
    if (region(ni) != region(int'(tx_i)) || region(nq) != region(int'(tx_q))) sym_errors++;
    if (ni < -32 || ni >= 32) outer_seg++;
    chan_i.push_back(ni);
    chan_q.push_back(nq);
    if (rate_window) rate_syms++;
  end
  always @(posedge clk) if (rate_window) rate_cycles++;

  // receiver feed: a symbol leaves the queue when the receiver took it
  bit took = 0;
  always @(posedge clk) took <= !rst && rx_iq_valid && rx_iq_ready;
  always @(negedge clk) begin
    if (took) begin
      void'(chan_i.pop_front());
      void'(chan_q.pop_front());
    end
    if ($urandom_range(0, 49) == 0) hold_rx = ~hold_rx;
    rx_iq_valid = !rst && !hold_rx && chan_i.size() > 0;
    rx_i = chan_i.size() ? 8'(chan_i[0]) : '0;
    rx_q = chan_q.size() ? 8'(chan_q[0]) : '0;
  end
  always @(posedge clk) if (!rst && rx_iq_valid && !rx_iq_ready) rx_stalls++;

  // transmitter feed bookkeeping
  always @(posedge clk) if (!rst && tx_bit_valid) begin
    if (!tx_bit_ready) tx_stalls++;
    else n_sent++;
  end

  // output check
  always @(posedge clk) if (!rst && rx_bit_valid) begin
    if (n_dec < NBITS) begin
      checks++;
      if (rx_bit !== info[n_dec]) begin
        failures++;
        if (failures < 10) $display("decoded bit %0d wrong", n_dec);
      end
      if (rs232_dte_txd !== rx_bit) begin failures++; $display("RS-232 pin differs"); end
    end
    n_dec++;
  end

  initial begin
    tx_bit = 0; tx_bit_valid = 0;
    for (int n = 0; n < NTOTAL; n++) info.push_back(n < NBITS ? 1'($urandom) : 1'b0);
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < NTOTAL; n++) begin
      tx_bit = info[n];
      tx_bit_valid = 1;
      if (n == 2000) rate_window = 1;
      if (n == 2400) rate_window = 0;
      // wait for the handshake
      @(posedge clk);
      while (!tx_bit_ready) @(posedge clk);
      @(negedge clk);
      tx_bit_valid = 0;
      if (!rate_window && $urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    tx_bit_valid = 0;
    while (chan_i.size() != 0) @(posedge clk);
    repeat (100) @(posedge clk);

    checks++;
    if (n_dec != NTOTAL - TB_DEPTH + 1) begin
      failures++; $display("decoded %0d bits, expected %0d", n_dec, NTOTAL - TB_DEPTH + 1);
    end
    checks++;
    if (rate_syms < rate_cycles / 4 - 1 || rate_syms > rate_cycles / 4 + 1) begin
      failures++; $display("tx rate: %0d symbols in %0d cycles", rate_syms, rate_cycles);
    end
    checks++; if (tx_stalls == 0)  begin failures++; $display("no tx stall happened"); end
    checks++; if (rx_stalls == 0)  begin failures++; $display("no rx stall happened"); end
    checks++; if (sym_errors == 0) begin failures++; $display("no channel symbol error happened"); end
    checks++; if (sym_errors != hits) begin failures++; $display("%0d hits gave %0d symbol errors", hits, sym_errors); end
    checks++; if (outer_seg == 0)  begin failures++; $display("outer soft-bit segment never used"); end
    $display("symbols %0d, symbol errors corrected %0d, tx stalls %0d, rx stalls %0d, outer-segment samples %0d",
             n_sym, sym_errors, tx_stalls, rx_stalls, outer_seg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
