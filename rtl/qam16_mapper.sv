// qam16_mapper: Gray-coded 16-QAM mapper.
//
// The 4-bit word D0 D1 D2 D3 (D0 in bit 3) addresses two 16-entry ROMs:
// Mapper_I returns the in-phase level chosen by D0 D1 and Mapper_Q the
// quadrature level chosen by D2 D3, each pair mapped 00 -> -3, 01 -> -1,
// 11 -> +1, 10 -> +3, so neighbouring constellation points differ in one
// bit. The ROM contents are computed at elaboration from that rule.
//
// Output levels are signed fixed point (SAMPLE_W bits, FRAC_W fractional
// bits; this format is a choice of this design). The ROMs are read
// synchronously, so I and Q appear one cycle after the word, as in the
// two registered ROMs of the original modem.
module qam16_mapper
  import modem_pkg::*;
#(
  parameter int unsigned SAMPLE_W = DEF_SAMPLE_W,
  parameter int unsigned FRAC_W   = DEF_FRAC_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [3:0]                 in_word,
  input  logic                       in_valid,
  output logic signed [SAMPLE_W-1:0] i_out,
  output logic signed [SAMPLE_W-1:0] q_out,
  output logic                       out_valid
);

  typedef logic signed [SAMPLE_W-1:0] level_t;

  function automatic level_t to_level(logic [1:0] b);
    return level_t'(gray_level(b) * (1 << FRAC_W));
  endfunction

  level_t mapper_i [16];
  level_t mapper_q [16];

  for (genvar a = 0; a < 16; a++) begin : g_rom
    localparam logic [3:0] ADDR = 4'(a);
    assign mapper_i[a] = to_level(ADDR[3:2]);
    assign mapper_q[a] = to_level(ADDR[1:0]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_out     <= '0;
      q_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_out <= mapper_i[in_word];
        q_out <= mapper_q[in_word];
      end
    end
  end

endmodule
