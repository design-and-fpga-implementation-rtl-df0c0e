// rx_par2ser: 4-to-1 parallel-to-serial converter of the receiver.
//
// A demapped word {b0, b1, b2, b3} is held in a register and a down-counter
// selects one of its bits per clock through a registered multiplexer,
// b0 (bit 3) first, so the serial order is the one the transmitter's
// serial-to-parallel converter grouped. The next word is accepted during
// the last bit, so words arriving every four cycles give a gap-free stream.
//
// Interface: in_ready is high when a word may be presented this cycle.
// ready_next is high when a word presented one cycle from now will be
// accepted, provided none is presented in between; a source with one
// cycle of latency in front of this block (the demapper) uses it as its
// own ready. The serial bit is registered: out_valid rises one cycle after
// the word is taken. A word presented while in_ready is low is an error,
// checked by an assertion.
module rx_par2ser (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] in_word,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       ready_next,
  output logic       out_bit,
  output logic       out_valid
);

  logic [3:0] word;
  logic [2:0] left;   // bits still to send, 0..4
  logic [1:0] sel;    // index of the next bit to send

  assign in_ready   = (left <= 3'd1);
  assign ready_next = (left <= 3'd2);

  always_ff @(posedge clk) begin
    if (rst) begin
      word      <= '0;
      left      <= '0;
      sel       <= '0;
      out_bit   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= (left != 3'd0);
      if (left != 3'd0) begin
        out_bit <= word[sel];
        sel     <= sel - 2'd1;
        left    <= left - 3'd1;
      end
      if (in_valid && in_ready) begin
        word <= in_word;
        sel  <= 2'd3;
        left <= 3'd4;
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    in_valid |-> in_ready)
    else $error("rx_par2ser: word presented while busy");

endmodule
