// diff_encoder: differential encoder, y_i = y_(i-1) XOR x_i.
//
// One delay register holds the last transmitted bit y_(i-1); each valid
// input bit is XORed with it and the result is both the output and the new
// register value. Because the information sits in the change between
// consecutive bits, a receiver that gets the whole stream inverted still
// decodes it correctly with diff_decoder.
//
// Interface: the output is registered and valid one cycle after in_valid.
// Reset sets y_(-1) to 0 (a choice of this design; the decoder starts from
// the same value).
module diff_encoder (
  input  logic clk,
  input  logic rst,
  input  logic in_bit,
  input  logic in_valid,
  output logic out_bit,
  output logic out_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_bit   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_bit <= out_bit ^ in_bit;
    end
  end

endmodule
