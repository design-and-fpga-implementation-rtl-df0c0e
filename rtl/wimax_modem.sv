// wimax_modem: baseband modem with convolutional and differential coding
// and Gray-coded 16-QAM, transmitter and receiver side by side.
//
// Transmitter: information bits -> rate-1/2 convolutional encoder (K=3,
// G1=110, G2=111) -> 2:1 parallel-to-serial -> differential encoder ->
// 1:4 serial-to-parallel -> 16-QAM mapper -> tx_i / tx_q.
// Receiver: rx_i / rx_q -> 16-QAM soft-bit demapper -> 4:1
// parallel-to-serial -> differential decoder -> 1:2 serial-to-parallel ->
// Viterbi decoder -> rx_bit, also driven to the RS-232 TXD pin. The
// demapper's four soft values are brought out on rx_soft for inspection.
// The channel between tx_i/tx_q and rx_i/rx_q is outside this module.
//
// One clock runs everything; each stage passes a valid strobe with its
// data. The transmitter takes at most one bit every two cycles
// (tx_bit_ready) and then emits one symbol every four cycles. The receiver
// takes a symbol when rx_iq_ready is high, at most one every four cycles,
// and emits one decoded bit for every two code bits. Decoded bits start
// after the Viterbi decoder's survivor depth has filled. The chain order
// and the coding follow the modem's description; the single-clock valid
// and ready signalling is a choice of this design.
module wimax_modem
  import modem_pkg::*;
#(
  parameter int unsigned SAMPLE_W = DEF_SAMPLE_W,
  parameter int unsigned FRAC_W   = DEF_FRAC_W,
  parameter int unsigned TB_DEPTH = 15
) (
  input  logic                       clk,
  input  logic                       rst,
  // transmitter
  input  logic                       tx_bit,
  input  logic                       tx_bit_valid,
  output logic                       tx_bit_ready,
  output logic signed [SAMPLE_W-1:0] tx_i,
  output logic signed [SAMPLE_W-1:0] tx_q,
  output logic                       tx_iq_valid,
  // receiver
  input  logic signed [SAMPLE_W-1:0] rx_i,
  input  logic signed [SAMPLE_W-1:0] rx_q,
  input  logic                       rx_iq_valid,
  output logic                       rx_iq_ready,
  output logic [4*(SAMPLE_W+2)-1:0]  rx_soft,
  output logic                       rx_bit,
  output logic                       rx_bit_valid,
  output logic                       rs232_dte_txd
);

  // ---------------- transmitter ----------------
  logic [1:0] enc_code;
  logic       enc_valid, p2s_ready;
  logic       tser_bit, tser_valid;
  logic       denc_bit, denc_valid;
  logic [3:0] tword;
  logic       tword_valid;

  conv_encoder u_conv_encoder (
    .clk, .rst,
    .in_bit(tx_bit), .in_valid(tx_bit_valid), .in_ready(tx_bit_ready),
    .code(enc_code), .out_valid(enc_valid), .out_ready(p2s_ready));

  tx_par2ser u_tx_par2ser (
    .clk, .rst,
    .in_data(enc_code), .in_valid(enc_valid), .in_ready(p2s_ready),
    .out_bit(tser_bit), .out_valid(tser_valid));

  diff_encoder u_diff_encoder (
    .clk, .rst,
    .in_bit(tser_bit), .in_valid(tser_valid),
    .out_bit(denc_bit), .out_valid(denc_valid));

  tx_ser2par u_tx_ser2par (
    .clk, .rst,
    .in_bit(denc_bit), .in_valid(denc_valid),
    .out_word(tword), .out_valid(tword_valid));

  qam16_mapper #(.SAMPLE_W(SAMPLE_W), .FRAC_W(FRAC_W)) u_mapper (
    .clk, .rst,
    .in_word(tword), .in_valid(tword_valid),
    .i_out(tx_i), .q_out(tx_q), .out_valid(tx_iq_valid));

  // ---------------- receiver ----------------
  logic [3:0]                rword;
  logic                      rword_valid, rp2s_ready, rp2s_ready_next;
  logic                      rser_bit, rser_valid;
  logic                      ddec_bit, ddec_valid;
  logic [1:0]                rpair;
  logic                      rpair_valid;

  // The demapper adds one cycle, so a symbol may enter only when the
  // serializer will be free in the next cycle and no word is in flight.
  assign rx_iq_ready = rp2s_ready_next && !rword_valid;

  qam16_demapper #(.SAMPLE_W(SAMPLE_W), .FRAC_W(FRAC_W)) u_demapper (
    .clk, .rst,
    .yre(rx_i), .yim(rx_q), .in_valid(rx_iq_valid && rx_iq_ready),
    .yout(rword), .soft_out(rx_soft), .out_valid(rword_valid));

  a_rx_word_taken: assert property (@(posedge clk) disable iff (rst)
    rword_valid |-> rp2s_ready)
    else $error("wimax_modem: demapped word arrived while the serializer was busy");

  rx_par2ser u_rx_par2ser (
    .clk, .rst,
    .in_word(rword), .in_valid(rword_valid),
    .in_ready(rp2s_ready), .ready_next(rp2s_ready_next),
    .out_bit(rser_bit), .out_valid(rser_valid));

  diff_decoder u_diff_decoder (
    .clk, .rst,
    .in_bit(rser_bit), .in_valid(rser_valid),
    .out_bit(ddec_bit), .out_valid(ddec_valid));

  rx_ser2par u_rx_ser2par (
    .clk, .rst,
    .in_bit(ddec_bit), .in_valid(ddec_valid),
    .d(rpair), .out_valid(rpair_valid));

  viterbi_decoder #(.TB_DEPTH(TB_DEPTH)) u_viterbi (
    .clk, .rst,
    .data_in0(rpair[0]), .data_in1(rpair[1]), .in_valid(rpair_valid),
    .data_out(rx_bit), .out_valid(rx_bit_valid));

  assign rs232_dte_txd = rx_bit;

endmodule
