// tx_par2ser: 2-to-1 parallel-to-serial converter of the transmitter.
//
// Each 2-bit code word from the convolutional encoder is sent as two serial
// bits, in_data[0] first. The word is loaded into a shift register and a
// count of bits still to send is kept; the next word is accepted during the
// last bit, so a continuous input gives one serial bit every clock with no
// gaps. out_valid marks each serial bit. The bit order is a choice of this
// design and is matched by the receiver's serial-to-parallel converter.
module tx_par2ser (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] in_data,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       out_bit,
  output logic       out_valid
);

  logic [1:0] sreg;
  logic [1:0] left;   // bits still to send, 0..2

  assign in_ready  = (left <= 2'd1);
  assign out_bit   = sreg[0];
  assign out_valid = (left != 2'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      sreg <= '0;
      left <= '0;
    end else if (in_valid && in_ready) begin
      sreg <= in_data;
      left <= 2'd2;
    end else if (left != 2'd0) begin
      sreg <= {1'b0, sreg[1]};
      left <= left - 2'd1;
    end
  end

endmodule
