// rx_ser2par: 1-to-2 serial-to-parallel converter of the receiver.
//
// Serial bits from the differential decoder are paired: the first bit of
// each pair becomes d[0] and the second d[1], and the pair is presented to
// the Viterbi decoder's two code inputs (d[0] to the first generator's
// input), as the original receiver assigns them. A one-bit phase flag tracks the position in the pair; pairs are
// aligned to the first bit after reset. d is registered and out_valid
// pulses the cycle after the second bit.
module rx_ser2par (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_bit,
  input  logic       in_valid,
  output logic [1:0] d,
  output logic       out_valid
);

  logic first;   // first bit of the pair being collected
  logic phase;   // 1 while waiting for the second bit

  always_ff @(posedge clk) begin
    if (rst) begin
      first     <= 1'b0;
      phase     <= 1'b0;
      d         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          first <= in_bit;
        end else begin
          d         <= {in_bit, first};
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
