// tb_awgn_sweep: runs the modem over an additive white Gaussian noise
// channel at several noise levels and reports the bit error rate before
// decoding (hard decisions on the received symbols) and after the full
// receiver (differential decoding and Viterbi decoding).
//
// Noise on each coordinate is approximately Gaussian: the sum of twelve
// uniform values, less its mean, scaled by sigma (Irwin-Hall
// approximation). sigma is given in units of the constellation's level 1,
// so the decision thresholds sit 1.0 from every point. The received value
// is clipped to the 8-bit sample range.
//
// Checks: every run decodes every bit; a noiseless run decodes without
// error; the raw and the decoded error rates grow with the noise. The
// decoded rate is reported, not bounded: with hard decisions, differential
// coding (which doubles each channel error) and a code of free distance 4,
// it stays close to the raw rate at these noise levels.
module tb_awgn_sweep;
  localparam int NBITS    = 20000;
  localparam int TB_DEPTH = 15;
  localparam int NTOTAL   = NBITS + TB_DEPTH + 1;
  localparam int NLEVELS  = 4;
  // sigma x 1000 in units of the level 1 (one level = 16 LSB)
  localparam int SIGMA_M[NLEVELS] = '{0, 350, 450, 600};

  logic clk = 0, rst = 1;
  logic tx_bit, tx_bit_valid, tx_bit_ready, tx_iq_valid;
  logic signed [7:0] tx_i, tx_q, rx_i, rx_q;
  logic rx_iq_valid, rx_iq_ready, rx_bit, rx_bit_valid, rs232_dte_txd;
  logic [39:0] rx_soft;

  int checks = 0, failures = 0;
  logic info[$];
  int chan_i[$], chan_q[$];
  int sigma_m = 0;
  int raw_err = 0, raw_bits = 0, dec_err = 0, n_dec = 0;
  bit took = 0;
  int raw_ber_ppm[NLEVELS], dec_ber_ppm[NLEVELS];

  wimax_modem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gauss_lsb(int sm);
    int acc = 0;
    for (int k = 0; k < 12; k++) acc += $urandom_range(0, 4095);
    acc -= 6 * 4095;                       // zero mean, unit variance x 4095
    return (acc * sm * 16) / (4095 * 1000);
  endfunction

  function automatic int clip(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  // Gray bits of the decision region of one coordinate: {first, second}
  function automatic logic [1:0] gray_bits(int v);
    if (v < -32) return 2'b00;
    if (v < 0)   return 2'b01;
    if (v < 32)  return 2'b11;
    return 2'b10;
  endfunction

  always @(posedge clk) if (!rst && tx_iq_valid) begin
    int ni, nq;
    ni = clip(int'(tx_i) + gauss_lsb(sigma_m));
    nq = clip(int'(tx_q) + gauss_lsb(sigma_m));
    raw_err  += $countones({gray_bits(ni), gray_bits(nq)} ^ {gray_bits(tx_i), gray_bits(tx_q)});
    raw_bits += 4;
    chan_i.push_back(ni);
    chan_q.push_back(nq);
  end

  always @(posedge clk) took <= !rst && rx_iq_valid && rx_iq_ready;
  always @(negedge clk) begin
    if (took) begin
      void'(chan_i.pop_front());
      void'(chan_q.pop_front());
    end
    rx_iq_valid = !rst && chan_i.size() > 0;
    rx_i = chan_i.size() ? 8'(chan_i[0]) : '0;
    rx_q = chan_q.size() ? 8'(chan_q[0]) : '0;
  end

  always @(posedge clk) if (!rst && rx_bit_valid) begin
    if (n_dec < NBITS && rx_bit !== info[n_dec]) dec_err++;
    n_dec++;
  end

  task automatic run_level(int lvl);
    sigma_m = SIGMA_M[lvl];
    @(negedge clk); rst = 1;
    info.delete(); chan_i.delete(); chan_q.delete();
    raw_err = 0; raw_bits = 0; dec_err = 0; n_dec = 0;
    for (int n = 0; n < NTOTAL; n++) info.push_back(n < NBITS ? 1'($urandom) : 1'b0);
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < NTOTAL; n++) begin
      tx_bit = info[n];
      tx_bit_valid = 1;
      @(posedge clk);
      while (!tx_bit_ready) @(posedge clk);
      @(negedge clk);
    end
    tx_bit_valid = 0;
    while (chan_i.size() != 0) @(posedge clk);
    repeat (100) @(posedge clk);
    checks++;
    if (n_dec != NTOTAL - TB_DEPTH + 1) begin
      failures++; $display("sigma %0d/1000: decoded %0d bits", sigma_m, n_dec);
    end
    raw_ber_ppm[lvl] = int'((longint'(raw_err) * 1000000) / raw_bits);
    dec_ber_ppm[lvl] = int'((longint'(dec_err) * 1000000) / NBITS);
    $display("sigma %0d.%03d: raw BER %0d ppm (%0d of %0d), decoded BER %0d ppm (%0d of %0d)",
             sigma_m / 1000, sigma_m % 1000, raw_ber_ppm[lvl], raw_err, raw_bits,
             dec_ber_ppm[lvl], dec_err, NBITS);
  endtask

  initial begin
    tx_bit = 0; tx_bit_valid = 0;
    for (int l = 0; l < NLEVELS; l++) run_level(l);
    checks++;
    if (dec_ber_ppm[0] != 0 || raw_ber_ppm[0] != 0) begin failures++; $display("errors without noise"); end
    for (int l = 1; l < NLEVELS; l++) begin
      checks++;
      if (raw_ber_ppm[l] <= raw_ber_ppm[l-1]) begin failures++; $display("raw BER not increasing"); end
    end
    for (int l = 2; l < NLEVELS; l++) begin
      checks++;
      if (dec_ber_ppm[l] <= dec_ber_ppm[l-1]) begin failures++; $display("decoded BER not increasing"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
