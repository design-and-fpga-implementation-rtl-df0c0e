// tx_ser2par: 1-to-4 serial-to-parallel converter of the transmitter.
//
// Serial bits from the differential encoder shift through a four-stage
// shift register; a 2-bit bit counter marks every fourth bit, and on that
// bit the four stages are copied into the output word register and
// out_valid pulses for one cycle. The first bit of each group lands in
// out_word[3], so the word reads D0 D1 D2 D3 from MSB to LSB: D0 D1 select
// the in-phase level and D2 D3 the quadrature level in the mapper.
//
// The structure (shift register, output registers loaded by a data-valid
// strobe) follows the modem's description; generating the strobe with a
// counter is a choice of this design. Latency: the word is valid the cycle
// after its fourth bit. Groups are aligned to the first bit after reset.
module tx_ser2par (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_bit,
  input  logic       in_valid,
  output logic [3:0] out_word,
  output logic       out_valid
);

  logic [2:0] sr;    // the three bits before the current one, newest in bit 0
  logic [1:0] cnt;   // bits of the current group already received

  always_ff @(posedge clk) begin
    if (rst) begin
      sr        <= '0;
      cnt       <= '0;
      out_word  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        sr  <= {sr[1:0], in_bit};
        cnt <= cnt + 2'd1;
        if (cnt == 2'd3) begin
          out_word  <= {sr, in_bit};
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
