// qam16_demapper: 16-QAM soft-bit demapper.
//
// Four soft-bit decision units work in parallel: b0 and b1 from the
// received in-phase value yre, b2 and b3 from the quadrature value yim,
// using the same circuits (soft_bit_b0 for the outer bit, soft_bit_b1 for
// the inner bit of each axis). Their hard bits are concatenated into
// yout = {b0, b1, b2, b3}, which is the transmitted word D0 D1 D2 D3 when
// the sample falls nearest its own constellation point. The four soft
// values are also brought out (b0 in the top field).
//
// Latency one cycle: yout and soft_out are valid the cycle after in_valid.
module qam16_demapper
  import modem_pkg::*;
#(
  parameter int unsigned SAMPLE_W = DEF_SAMPLE_W,
  parameter int unsigned FRAC_W   = DEF_FRAC_W
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic signed [SAMPLE_W-1:0]   yre,
  input  logic signed [SAMPLE_W-1:0]   yim,
  input  logic                         in_valid,
  output logic [3:0]                   yout,
  output logic [4*(SAMPLE_W+2)-1:0]    soft_out,
  output logic                         out_valid
);

  localparam int unsigned SW = SAMPLE_W + 2;

  logic signed [SW-1:0] sb0, sb1, sb2, sb3;
  logic                 b0, b1, b2, b3;

  soft_bit_b0 #(.SAMPLE_W(SAMPLE_W), .FRAC_W(FRAC_W)) u_b0 (
    .clk, .rst, .en(in_valid), .y(yre), .sb(sb0), .bit_out(b0));
  soft_bit_b1 #(.SAMPLE_W(SAMPLE_W), .FRAC_W(FRAC_W)) u_b1 (
    .clk, .rst, .en(in_valid), .y(yre), .sb(sb1), .bit_out(b1));
  soft_bit_b0 #(.SAMPLE_W(SAMPLE_W), .FRAC_W(FRAC_W)) u_b2 (
    .clk, .rst, .en(in_valid), .y(yim), .sb(sb2), .bit_out(b2));
  soft_bit_b1 #(.SAMPLE_W(SAMPLE_W), .FRAC_W(FRAC_W)) u_b3 (
    .clk, .rst, .en(in_valid), .y(yim), .sb(sb3), .bit_out(b3));

  assign yout = {b0, b1, b2, b3};
  assign soft_out = {sb0, sb1, sb2, sb3};

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

endmodule
