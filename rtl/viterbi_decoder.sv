// viterbi_decoder: hard-decision Viterbi decoder for the rate-1/2
// convolutional code of conv_encoder (default K=3, G1=110, G2=111).
//
// The trellis has 2^(K-1) states; a state holds the last K-1 encoder
// inputs, the most recent in the top bit. For each received code pair the
// decoder computes the Hamming distance between the pair and the code word
// of every branch, and for every state adds it to the path metrics of the
// two predecessor states and keeps the smaller sum (add-compare-select;
// ties go to the predecessor whose oldest bit is 0). Survivor paths are kept
// by register exchange: each state owns a TB_DEPTH-bit register holding
// its path's decisions, and the winning predecessor's register, shifted by
// one with the new input bit appended, becomes the state's new register.
// The decoded bit is the oldest bit of the survivor of the best state.
// Path metrics are renormalised every step by subtracting the previous
// smallest metric, so PM_W bits suffice.
//
// Decoding starts in state 0 (the encoder's reset state). The first output
// appears after TB_DEPTH pairs; from then on, every pair gives one decoded
// bit, registered, one cycle after in_valid. The decoded bit belongs to the
// pair received TB_DEPTH-1 pairs earlier. The code and algorithm follow the
// modem's description; register exchange, TB_DEPTH and PM_W are choices of
// this design.
module viterbi_decoder
  import modem_pkg::*;
#(
  parameter int unsigned  K        = CONV_K,
  parameter logic [K-1:0] G1       = CONV_G1,
  parameter logic [K-1:0] G2       = CONV_G2,
  parameter int unsigned  TB_DEPTH = 15,
  parameter int unsigned  PM_W     = 6
) (
  input  logic clk,
  input  logic rst,
  input  logic data_in0,
  input  logic data_in1,
  input  logic in_valid,
  output logic data_out,
  output logic out_valid
);

  localparam int unsigned NS   = 1 << (K - 1);
  localparam int unsigned SB_W = K - 1;
  localparam int unsigned CW   = $clog2(TB_DEPTH + 1);

  typedef logic [PM_W-1:0]     pm_t;
  typedef logic [TB_DEPTH-1:0] surv_t;

  localparam pm_t PM_INIT = pm_t'(1 << (PM_W - 2));

  pm_t   pm     [NS];
  surv_t surv   [NS];
  pm_t   pm_nx  [NS];
  surv_t surv_nx[NS];
  pm_t   pm_min;
  logic [CW-1:0] filled;

  // Hamming distance between the received pair and the branch leaving
  // state s with input u.
  function automatic pm_t branch_metric(logic u, logic [SB_W-1:0] s,
                                        logic r0, logic r1);
    logic [K-1:0] w;
    w = {u, s};
    return pm_t'((^(w & G1)) != r0) + pm_t'((^(w & G2)) != r1);
  endfunction

  // Add-compare-select for every state, then the best new state.
  logic [SB_W-1:0] best;
  always_comb begin
    pm_min = pm[0];
    for (int s = 1; s < NS; s++)
      if (pm[s] < pm_min) pm_min = pm[s];

    for (int ns = 0; ns < NS; ns++) begin
      logic [SB_W-1:0] nsv, p0, p1;
      logic            u;
      pm_t             m0, m1;
      nsv = SB_W'(ns);
      u   = nsv[SB_W-1];
      p0  = {nsv[SB_W-2:0], 1'b0};
      p1  = {nsv[SB_W-2:0], 1'b1};
      m0  = pm[p0] - pm_min + branch_metric(u, p0, data_in0, data_in1);
      m1  = pm[p1] - pm_min + branch_metric(u, p1, data_in0, data_in1);
      if (m1 < m0) begin
        pm_nx[ns]   = m1;
        surv_nx[ns] = {surv[p1][TB_DEPTH-2:0], u};
      end else begin
        pm_nx[ns]   = m0;
        surv_nx[ns] = {surv[p0][TB_DEPTH-2:0], u};
      end
    end

    best = '0;
    for (int s = 1; s < NS; s++)
      if (pm_nx[s] < pm_nx[best]) best = SB_W'(s);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < NS; s++) begin
        pm[s]   <= (s == 0) ? '0 : PM_INIT;
        surv[s] <= '0;
      end
      filled    <= '0;
      data_out  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int s = 0; s < NS; s++) begin
          pm[s]   <= pm_nx[s];
          surv[s] <= surv_nx[s];
        end
        if (filled != CW'(TB_DEPTH)) filled <= filled + 1'b1;
        if (filled >= CW'(TB_DEPTH - 1)) begin
          data_out  <= surv_nx[best][TB_DEPTH-1];
          out_valid <= 1'b1;
        end
      end
    end
  end

endmodule
