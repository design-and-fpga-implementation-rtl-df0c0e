// tb_qam16_mapper: every 4-bit word, in random order and with gaps, must
// give the I and Q levels of the Gray table (00 -3, 01 -1, 11 +1, 10 +3;
// I from the two upper bits, Q from the two lower), scaled by 16, one
// cycle after the word.
module tb_qam16_mapper;
  logic clk = 0, rst = 1;
  logic [3:0] in_word;
  logic in_valid, out_valid;
  logic signed [7:0] i_out, q_out;
  int checks = 0, failures = 0;
  int lvl[4] = '{-48, -16, 48, 16};   // index = 2-bit Gray pair
  logic [3:0] prev_word; logic prev_valid = 0;

  qam16_mapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (out_valid !== prev_valid) begin failures++; $display("valid timing"); end
    if (prev_valid) begin
      checks++;
      if (int'(i_out) != lvl[prev_word[3:2]] || int'(q_out) != lvl[prev_word[1:0]]) begin
        failures++;
        $display("word %b: got %0d,%0d", prev_word, i_out, q_out);
      end
    end
    prev_valid <= in_valid;
    prev_word  <= in_word;
  end

  initial begin
    in_valid = 0; in_word = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 16; w++) begin
      @(negedge clk); in_valid = 1; in_word = 4'(w);
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      in_word  = 4'($urandom);
    end
    @(negedge clk); in_valid = 0;
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
