// tb_conv_encoder: checks the rate-1/2, K=3 encoder against the code's
// defining equations v1 = u ^ Q2, v2 = u ^ Q2 ^ Q3 (Q2, Q3 the two
// previous inputs), with random input bits, random input gaps and random
// downstream stalls. Also checks that a stalled output is held.
module tb_conv_encoder;
  logic clk = 0, rst = 1;
  logic in_bit, in_valid, in_ready, out_valid, out_ready;
  logic [1:0] code;
  int checks = 0, failures = 0, stalls = 0;
  logic q2 = 0, q3 = 0;
  logic [1:0] expq[$];

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || code !== expq[0]) begin
        failures++;
        $display("mismatch: got %b exp %b", code, expq.size() ? expq[0] : 2'bxx);
      end
      if (expq.size()) void'(expq.pop_front());
    end
    if (in_valid && in_ready) begin
      expq.push_back({in_bit ^ q2 ^ q3, in_bit ^ q2});
      q3 = q2; q2 = in_bit;
    end
  end

  initial begin
    in_bit = 0; in_valid = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 3) != 0);
      in_bit    = $urandom_range(0, 1);
      out_ready = ($urandom_range(0, 4) != 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0 || stalls == 0) begin
      failures++;
      $display("left %0d words, %0d stalls", expq.size(), stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
