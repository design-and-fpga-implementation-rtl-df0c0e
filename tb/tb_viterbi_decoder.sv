// tb_viterbi_decoder: encodes random information bits with the K=3,
// G1=110, G2=111 code (v1 = u^Q2, v2 = u^Q2^Q3, worked out here), flips
// isolated code bits (one every 8 to 16 pairs), and checks that the
// decoder returns every information bit unchanged. Also checks the
// latency: no output before TB_DEPTH pairs, then one output per pair, one
// cycle after it, carrying the bit of the pair TB_DEPTH-1 pairs earlier.
// A second run sends long error-free data at a pair every cycle.
module tb_viterbi_decoder;
  localparam int TB_DEPTH = 15;
  logic clk = 0, rst = 1;
  logic data_in0, data_in1, in_valid, data_out, out_valid;
  int checks = 0, failures = 0, flips = 0;
  logic info[$];
  int n_pairs = 0, n_out = 0;
  logic prev_valid = 0;

  viterbi_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    // output timing: one cycle after a pair, from pair TB_DEPTH on
    checks++;
    if (out_valid !== (prev_valid && n_pairs >= TB_DEPTH)) begin
      failures++; $display("out_valid timing wrong at pair %0d", n_pairs);
    end
    if (out_valid) begin
      checks++;
      if (data_out !== info[n_out]) begin
        failures++; $display("decoded bit %0d wrong", n_out);
      end
      n_out++;
    end
    prev_valid <= in_valid;
    if (in_valid) n_pairs++;
  end

  task automatic run(int nbits, bit with_errors, bit gaps);
    logic q2, q3, u, v1, v2;
    int next_err;
    rst <= 1; repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    info.delete(); n_pairs = 0; n_out = 0; prev_valid = 0;
    q2 = 0; q3 = 0;
    next_err = $urandom_range(8, 16);
    for (int n = 0; n < nbits + TB_DEPTH; n++) begin
      u = (n < nbits) ? 1'($urandom) : 1'b0;
      info.push_back(u);
      v1 = u ^ q2; v2 = u ^ q2 ^ q3;
      q3 = q2; q2 = u;
      if (with_errors && n == next_err) begin
        if ($urandom_range(0, 1)) v1 = ~v1; else v2 = ~v2;
        flips++;
        next_err = n + $urandom_range(8, 16);
      end
      data_in0 = v1; data_in1 = v2; in_valid = 1;
      @(negedge clk);
      if (gaps) begin
        in_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (n_out != nbits + 1) begin
      failures++; $display("expected %0d outputs, got %0d", nbits + 1, n_out);
    end
  endtask

  initial begin
    in_valid = 0; data_in0 = 0; data_in1 = 0;
    repeat (3) @(posedge clk);
    run(3000, 1, 1);
    run(3000, 0, 0);
    checks++;
    if (flips < 100) begin failures++; $display("too few errors injected"); end
    $display("corrected %0d injected channel errors", flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
