// soft_bit_b1: soft-bit decision for the inner bit of one 16-QAM axis
// (b1 on the in-phase axis, b3 on the quadrature axis).
//
// The soft value is
//     sb = y + 2   for y <= 0
//     sb = 2 - y   for y > 0
// i.e. 2 - |y|, built from one compare with zero, an adder, a subtractor
// and a multiplexer. The hard bit is sb >= 0: 1 for the two inner levels
// (+-1), 0 for the outer levels (+-3), as in the Gray mapping.
//
// y is signed fixed point with FRAC_W fractional bits; sb is two bits
// wider. Outputs are registered and update when en is high.
module soft_bit_b1
  import modem_pkg::*;
#(
  parameter int unsigned SAMPLE_W = DEF_SAMPLE_W,
  parameter int unsigned FRAC_W   = DEF_FRAC_W
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         en,
  input  logic signed [SAMPLE_W-1:0]   y,
  output logic signed [SAMPLE_W+1:0]   sb,
  output logic                         bit_out
);

  typedef logic signed [SAMPLE_W+1:0] wide_t;

  localparam wide_t C2 = wide_t'(2 << FRAC_W);

  wide_t yw, sb_d;

  always_comb begin
    yw   = wide_t'(y);
    sb_d = (yw <= 0) ? (yw + C2) : (C2 - yw);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sb      <= '0;
      bit_out <= 1'b0;
    end else if (en) begin
      sb      <= sb_d;
      bit_out <= (sb_d >= 0);
    end
  end

endmodule
