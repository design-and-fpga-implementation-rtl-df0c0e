// tb_qam16_demapper: for random 4-bit words, builds the Gray-mapped
// constellation point (levels -3,-1,+1,+3 scaled by 16), adds uniform
// noise of up to +-0.94 on each axis, and checks that the demapper returns
// the original word one cycle later. The soft value of each bit is checked
// against the piecewise-linear formulas, worked out here from the noisy
// sample.
module tb_qam16_demapper;
  logic clk = 0, rst = 1;
  logic signed [7:0] yre, yim;
  logic in_valid, out_valid;
  logic [3:0] yout;
  logic [39:0] soft_out;
  int checks = 0, failures = 0;
  int lvl[4] = '{-48, -16, 48, 16};
  logic [3:0] pw; int pre, pim;
  int qw[$], qre[$], qim[$];

  qam16_demapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sb_outer(int y);
    if (y < -32) return 2 * (y + 16);
    if (y < 32)  return y;
    return 2 * (y - 16);
  endfunction
  function automatic int sb_inner(int y);
    return (y <= 0) ? y + 32 : 32 - y;
  endfunction

  always @(posedge clk) if (!rst) begin
    if (out_valid) begin
      if (qw.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        checks++;
        if (yout !== 4'(qw[0])) begin failures++; $display("word %b got %b (%0d,%0d)", qw[0], yout, qre[0], qim[0]); end
        checks++;
        if (int'($signed(soft_out[39:30])) != sb_outer(qre[0]) || int'($signed(soft_out[29:20])) != sb_inner(qre[0]) ||
            int'($signed(soft_out[19:10])) != sb_outer(qim[0]) || int'($signed(soft_out[9:0])) != sb_inner(qim[0])) begin
          failures++; $display("soft values wrong for (%0d,%0d)", qre[0], qim[0]);
        end
        void'(qw.pop_front()); void'(qre.pop_front()); void'(qim.pop_front());
      end
    end
    if (in_valid) begin qw.push_back(int'(pw)); qre.push_back(pre); qim.push_back(pim); end
    checks++;
    if (qw.size() > 1) begin failures++; $display("latency above one cycle"); end
  end

  initial begin
    yre = 0; yim = 0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        pw  = 4'($urandom);
        pre = lvl[pw[3:2]] + $urandom_range(0, 30) - 15;
        pim = lvl[pw[1:0]] + $urandom_range(0, 30) - 15;
        yre = 8'(pre); yim = 8'(pim);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
