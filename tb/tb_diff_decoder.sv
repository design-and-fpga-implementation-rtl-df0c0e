// tb_diff_decoder: feeds a differentially encoded random stream (encoded
// here by y_i = y_(i-1) ^ x_i) and checks that the original bits come back;
// then feeds the same kind of stream inverted and checks that every bit
// after the first still comes back, which is the point of differential
// coding.
module tb_diff_decoder;
  logic clk = 0, rst = 1;
  logic in_bit, in_valid, out_bit, out_valid;
  int checks = 0, failures = 0;
  logic expq[$];
  int nout = 0;
  bit inverted = 0;

  diff_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    if (expq.size() == 0) begin
      failures++; $display("unexpected output");
    end else begin
      if (!(inverted && nout == 0)) begin
        checks++;
        if (out_bit !== expq[0]) begin
          failures++; $display("mismatch at %0d (inverted=%0d)", nout, inverted);
        end
      end
      void'(expq.pop_front());
      nout++;
    end
  end

  task automatic run(bit inv);
    logic y, x;
    rst <= 1; repeat (2) @(posedge clk); rst <= 0;
    inverted = inv; nout = 0; y = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        x = 1'($urandom);
        y = y ^ x;
        in_bit = y ^ inv;
        expq.push_back(x);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("outputs missing"); end
    expq.delete();
  endtask

  initial begin
    in_valid = 0; in_bit = 0;
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
