// tb_rx_par2ser: offers random words whenever in_ready allows (and
// sometimes holds back), checks that each comes out as four serial bits,
// bit 3 first, and that words offered at the full rate give a gap-free
// stream. ready_next must predict in_ready one cycle ahead.
module tb_rx_par2ser;
  logic clk = 0, rst = 1;
  logic [3:0] in_word;
  logic in_valid, in_ready, ready_next, out_bit, out_valid;
  int checks = 0, failures = 0;
  logic expq[$];
  int busy = 0, outs = 0;
  bit full = 0;
  logic prev_ready_next = 0, prev_took = 0;

  rx_par2ser dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      checks++;
      if (expq.size() == 0 || out_bit !== expq[0]) begin failures++; $display("serial mismatch"); end
      if (expq.size()) void'(expq.pop_front());
    end
    if (full) begin busy++; if (out_valid) outs++; end
    if (prev_ready_next && !prev_took) begin
      checks++;
      if (!in_ready) begin failures++; $display("ready_next did not predict in_ready"); end
    end
    prev_ready_next <= ready_next;
    prev_took       <= in_valid && in_ready;
    if (in_valid && in_ready)
      for (int b = 3; b >= 0; b--) expq.push_back(in_word[b]);
  end

  initial begin
    in_valid = 0; in_word = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = in_ready && ($urandom_range(0, 2) != 0);
      in_word  = 4'($urandom);
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n == 8) full = 1;
      in_valid = in_ready;
      in_word  = 4'($urandom);
    end
    full = 0;
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (outs != busy || expq.size() != 0) begin
      failures++; $display("rate %0d/%0d, %0d left", outs, busy, expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
