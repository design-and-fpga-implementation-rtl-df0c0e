// diff_decoder: differential decoder, x_i = y_(i-1) XOR y_i.
//
// One delay register keeps the previous received bit; each valid input is
// XORed with it. The result depends only on whether consecutive bits
// differ, so inverting the whole received stream does not change it (apart
// from the first bit, which is compared with the reset value 0).
//
// Interface: registered output, valid one cycle after in_valid. Reset sets
// the delay register to 0, matching diff_encoder.
module diff_decoder (
  input  logic clk,
  input  logic rst,
  input  logic in_bit,
  input  logic in_valid,
  output logic out_bit,
  output logic out_valid
);

  logic prev;

  always_ff @(posedge clk) begin
    if (rst) begin
      prev      <= 1'b0;
      out_bit   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_bit <= prev ^ in_bit;
        prev    <= in_bit;
      end
    end
  end

endmodule
