// conv_encoder: rate-1/2 convolutional encoder, constraint length K.
//
// Each accepted information bit u is combined with the K-1 bits stored
// before it: the window {u, sr} is ANDed with each generator and reduced by
// XOR. Generator bit K-1 taps the current input, bit 0 the oldest stored
// bit. With the default code (K=3, G1=110, G2=111) this gives
// v1 = u ^ Q2 and v2 = u ^ Q2 ^ Q3, where Q2 is the previous input and Q3
// the one before.
//
// Interface: valid/ready on both sides. code[0] carries v1 (G1) and code[1]
// carries v2 (G2); this order is a choice of this design, matched by the
// receiver. The code word is registered, so it appears one cycle after the
// input is accepted; a new bit can be taken every cycle while out_ready is
// high. Synchronous reset clears the encoder state to all zeros.
module conv_encoder
  import modem_pkg::*;
#(
  parameter int unsigned K  = CONV_K,
  parameter logic [K-1:0] G1 = CONV_G1,
  parameter logic [K-1:0] G2 = CONV_G2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_bit,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [1:0] code,
  output logic       out_valid,
  input  logic       out_ready
);

  logic [K-2:0] sr;      // sr[K-2] = most recent past input
  logic [K-1:0] window;

  assign window   = {in_bit, sr};
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      sr        <= '0;
      code      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        code      <= {^(window & G2), ^(window & G1)};
        out_valid <= 1'b1;
        sr        <= window[K-1:1];
      end
    end
  end

  // A code word the consumer has not taken stays put.
  a_hold: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_ready |=> out_valid && $stable(code))
    else $error("conv_encoder: stalled output changed");

endmodule
