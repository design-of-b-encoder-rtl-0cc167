// B-Decoder: hard-decision Viterbi decoder for the B-Encoder's code.
//
// Each clock with in_valid high brings one received 2-bit symbol. For every
// one of the 16 trellis states (the four data bits held by the encoder's shift
// register) the decoder keeps a path metric, the number of received bits that
// disagree with the best path ending in that state, and a survivor: the last
// TB_DEPTH data bits of that path. Per symbol, add-compare-select picks for
// each state the better of its two predecessor paths (the Hamming distance
// between the received symbol and the symbol that transition would have sent,
// added to the predecessor's metric) and appends the transition's data bit to
// the survivor (register exchange). The oldest bit of the survivor of the state
// with the smallest metric is the decoded bit; by then the survivors have
// almost always merged, so isolated channel errors are corrected.
//
// Timing: the bit sent k-th (k = 0, 1, ...) comes out with out_valid high one
// clock after the (k + TB_DEPTH)-th symbol was accepted, i.e. a latency of
// TB_DEPTH + 1 symbols. The last TB_DEPTH bits of a message are released by
// TB_DEPTH further symbols (for example the encoder's response to 0 bits).
// Reset starts decoding in state 0 (favoured by an initial metric offset on the
// other states) and clears the survivors.
//
// Two coded bits in per clock, started by the input enable, with a path through
// the code's states, follow the described decoder. The Viterbi algorithm
// itself, register exchange, the depth, the metric width and the
// renormalisation (clear the top bit of every metric once all have it set;
// hard-decision metrics of this code stay far closer together than that) are
// this design's choices.
module b_decoder
  import bcodec_pkg::*;
#(
  parameter logic [CONV_K-1:0] G0       = CONV_G0,
  parameter logic [CONV_K-1:0] G1       = CONV_G1,
  parameter int unsigned       TB_DEPTH = 32,
  parameter int unsigned       MW       = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [1:0] in_sym,
  output logic       out_valid,
  output logic       out_bit
);

  localparam int unsigned NS = CONV_STATES;
  localparam int unsigned SW = CONV_M;
  localparam logic [MW-1:0] INIT_OFFSET = MW'(1) << (MW - 3);

  typedef logic [MW-1:0]       metric_t;
  typedef logic [TB_DEPTH-1:0] surv_t;

  metric_t pm_q   [NS];
  metric_t pm_d   [NS];
  surv_t   surv_q [NS];
  surv_t   surv_d [NS];
  localparam int unsigned CW = $clog2(TB_DEPTH + 1);
  localparam logic [CW-1:0] CNT_FULL = CW'(TB_DEPTH);

  logic [CW-1:0] cnt_q;   // symbols seen, saturates at TB_DEPTH
  logic [SW-1:0] best;

  // Add-compare-select and survivor update for every state.
  always_comb begin
    logic [SW-1:0]     p;
    logic [CONV_K-1:0] win;
    logic [1:0]        diff;
    metric_t           cand [2];
    logic              all_high;
    for (int s = 0; s < NS; s++) begin
      for (int b = 0; b < 2; b++) begin
        // Predecessor: shifting data bit s[0] into p gives s.
        p = SW'((b << (SW - 1)) | (s >> 1));
        win[CONV_K-1] = s[0];
        for (int k = 1; k < CONV_K; k++) win[CONV_K-1-k] = p[k-1];
        diff    = conv_sym(win, G0, G1) ^ in_sym;
        cand[b] = pm_q[p] + metric_t'(diff[0]) + metric_t'(diff[1]);
      end
      if (cand[1] < cand[0]) begin
        pm_d[s]   = cand[1];
        surv_d[s] = {surv_q[(NS/2) | (s >> 1)][TB_DEPTH-2:0], s[0]};
      end else begin
        pm_d[s]   = cand[0];
        surv_d[s] = {surv_q[s >> 1][TB_DEPTH-2:0], s[0]};
      end
    end
    all_high = 1'b1;
    for (int s = 0; s < NS; s++) all_high &= pm_d[s][MW-1];
    if (all_high)
      for (int s = 0; s < NS; s++) pm_d[s][MW-1] = 1'b0;
  end

  // State with the smallest stored metric (lowest index on a tie).
  always_comb begin
    metric_t m;
    best = '0;
    m    = pm_q[0];
    for (int s = 1; s < NS; s++) begin
      if (pm_q[s] < m) begin
        m    = pm_q[s];
        best = SW'(s);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) begin
        pm_q[s]   <= (s == 0) ? '0 : INIT_OFFSET;
        surv_q[s] <= '0;
      end
      cnt_q     <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= in_valid && (cnt_q == CNT_FULL);
      if (in_valid) begin
        out_bit <= surv_q[best][TB_DEPTH-1];
        pm_q    <= pm_d;
        surv_q  <= surv_d;
        if (cnt_q != CNT_FULL) cnt_q <= cnt_q + 1'b1;
      end
    end
  end

  initial begin
    assert (TB_DEPTH >= 2 && MW >= 4) else $error("b_decoder: TB_DEPTH >= 2 and MW >= 4 required");
  end

endmodule
