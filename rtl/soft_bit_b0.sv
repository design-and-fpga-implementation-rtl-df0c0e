// soft_bit_b0: soft-bit decision for the outer bit of one 16-QAM axis
// (b0 on the in-phase axis, b2 on the quadrature axis).
//
// The soft value is the piecewise-linear simplification of the bit's
// log-likelihood ratio:
//     sb = 2(y+1)  for y < -2
//     sb = y       for -2 <= y < 2
//     sb = 2(y-1)  for y >= 2
// built from two compares (y < -2, y < 2), two add-and-double paths and two
// multiplexers. The hard bit is sb >= 0, which for this bit is the sign of
// y: 1 on the positive side of the axis, as in the Gray mapping.
//
// y is signed fixed point with FRAC_W fractional bits; sb has two more
// integer bits so 2(y+1) cannot overflow. Both outputs are registered and
// update when en is high (one cycle of latency).
module soft_bit_b0
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

  localparam wide_t C1 = wide_t'(1 << FRAC_W);
  localparam wide_t C2 = wide_t'(2 << FRAC_W);

  wide_t yw, lo_seg, hi_seg, mid_sel, sb_d;

  always_comb begin
    yw      = wide_t'(y);
    lo_seg  = (yw + C1) <<< 1;
    hi_seg  = (yw - C1) <<< 1;
    mid_sel = (yw < C2) ? yw : hi_seg;
    sb_d    = (yw < -C2) ? lo_seg : mid_sel;
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
