// tb_tx_par2ser: random 2-bit words with random gaps; the serial stream
// must carry bit 0 then bit 1 of each word. With words offered every cycle
// the output must run at one bit per clock with no gaps.
module tb_tx_par2ser;
  logic clk = 0, rst = 1;
  logic [1:0] in_data;
  logic in_valid, in_ready, out_bit, out_valid;
  int checks = 0, failures = 0;
  logic expq[$];
  int busy_cycles = 0, out_cycles = 0;
  bit full_rate = 0;

  tx_par2ser dut (.*);

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
      if (expq.size() == 0 || out_bit !== expq[0]) begin
        failures++; $display("serial mismatch");
      end
      if (expq.size()) void'(expq.pop_front());
    end
    if (full_rate) begin
      busy_cycles++;
      if (out_valid) out_cycles++;
    end
    if (in_valid && in_ready) begin
      expq.push_back(in_data[0]);
      expq.push_back(in_data[1]);
    end
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      in_data  = 2'($urandom);
    end
    // full rate: offer a word every cycle
    @(negedge clk); in_valid = 1;
    repeat (4) @(negedge clk);
    full_rate = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk); in_data = 2'($urandom);
    end
    full_rate = 0;
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (out_cycles != busy_cycles || expq.size() != 0) begin
      failures++;
      $display("rate: %0d bits in %0d cycles, %0d left", out_cycles, busy_cycles, expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
