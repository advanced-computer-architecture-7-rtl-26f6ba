// pattern_match_predictor: branch direction prediction by searching the
// global history for earlier copies of its most recent bits.
//
// What it does: the newest bits of the global branch history (the suffix)
// are looked for at every older position of the history. The longest
// suffix that occurs again gives the longest matching length Lmax. A
// shorter "long" pattern of Lsel bits is then used, so that it occurs
// several times; the bits that followed each earlier occurrence of it are
// counted, and the prediction is the majority of them.
//
// How it works: hist[0] is the newest bit. For every offset d = 1..H-1 the
// module counts how many bits in a row match from the newest bit on,
//     ml[d] = largest l with hist[d+j] == hist[j] for all j < l, d+l <= H.
// This is H-1 chains of comparators (O(H^2) compare bits). Lmax is the
// largest ml[d]. Lsel = max(1, floor(Lmax * SEL_NUM / SEL_DEN)), or 0 when
// no offset matches even one bit. Every offset with ml[d] >= Lsel is an
// occurrence of the selected pattern, and hist[d-1] is the bit that came
// after it. The ones and zeros among those bits are counted. The
// prediction is 1 when ones > zeros, 0 when zeros > ones, and on a tie the
// bit that followed the most recent occurrence (the smallest such d). With
// no occurrence at all the prediction is 0.
//
// Interface: pred_* are combinational from the history register. hist_valid
// shifts hist_taken in as the newest bit at the rising edge. The counts are
// LW = clog2(H+1) bits wide; a match is at most H-1 bits long, so with H a
// power of two the top bit of pred_longest is always 0. Reset
// (synchronous, active low) clears the history.
//
// From the reference: the longest matching pattern, a shorter "long"
// matching pattern and the majority vote over the bits that followed its
// occurrences (with the example: 0 twice and 1 once gives 0). This
// design's own choices: the history length (H = 64), the rule for the
// selected length (half of the longest by default), the tie and no-match
// cases, and computing everything in one cycle.
module pattern_match_predictor #(
  parameter int unsigned H       = 64,
  parameter int unsigned SEL_NUM = 1,
  parameter int unsigned SEL_DEN = 2,
  localparam int unsigned LW     = $clog2(H + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hist_valid,
  input  logic          hist_taken,
  output logic [H-1:0]  hist,
  output logic          pred_taken,
  output logic [LW-1:0] pred_longest,
  output logic [LW-1:0] pred_sel_len,
  output logic [LW-1:0] pred_ones,
  output logic [LW-1:0] pred_zeros
);
  logic [LW-1:0] ml [H];

  // match length at every offset
  always_comb begin
    ml[0] = '0;
    for (int unsigned d = 1; d < H; d++) begin
      logic run;
      run   = 1'b1;
      ml[d] = '0;
      for (int unsigned j = 0; j + d < H; j++) begin
        run = run && (hist[d + j] == hist[j]);
        if (run) ml[d] = ml[d] + 1'b1;
      end
    end
  end

  always_comb begin
    logic [LW-1:0] lmax, lsel;
    logic [LW-1:0] ones, zeros;
    logic          first_seen, first_bit;
    lmax = '0;
    for (int unsigned d = 1; d < H; d++)
      if (ml[d] > lmax) lmax = ml[d];
    lsel = LW'((int'(lmax) * int'(SEL_NUM)) / int'(SEL_DEN));
    if (lmax != '0 && lsel == '0) lsel = LW'(1);
    ones = '0; zeros = '0; first_seen = 1'b0; first_bit = 1'b0;
    if (lmax != '0) begin
      for (int unsigned d = 1; d < H; d++) begin
        if (ml[d] >= lsel) begin
          if (hist[d-1]) ones = ones + 1'b1;
          else           zeros = zeros + 1'b1;
          if (!first_seen) first_bit = hist[d-1];
          first_seen = 1'b1;
        end
      end
    end
    pred_longest = lmax;
    pred_sel_len = lsel;
    pred_ones    = ones;
    pred_zeros   = zeros;
    if (ones > zeros)      pred_taken = 1'b1;
    else if (zeros > ones) pred_taken = 1'b0;
    else                   pred_taken = first_bit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)          hist <= '0;
    else if (hist_valid) hist <= {hist[H-2:0], hist_taken};
  end
endmodule
