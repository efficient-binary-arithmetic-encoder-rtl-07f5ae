// Stage 2 of the BAE pipeline: Range renormalization and the bypass
// pre-multiplication.
//
// Holds the 9-bit Range register. For a regular or terminate bin it picks
// one of the four rLPS candidates from stage 1 with Range[7:6], forms
// rMPS = Range - rLPS and renormalizes only the interval that was chosen:
//   MPS: Range <= rMPS, shifted left once if it fell below 256;
//   LPS: Range <= rLPS << n, where n (1..7) is the count of leading zeros of
//        rLPS in 9 bits, read from the selected rLPS itself.
// For a bypass group Range keeps its value. Towards stage 3 it sends one
// increment for the Low adder, so stage 3 has a single datapath:
//   0 for an MPS, rMPS for an LPS, and Range*EPbits for a bypass group;
// together with the shift Low must take (0/1 or n, or EPlen for bypass).
// A terminate bin equal to 1 ends the slice: it is marked as a flush and
// Range returns to 510 for the next slice (this design's choice; the slice
// start values are HEVC's).
//
// Timing: one packet per cycle, registered output (one cycle). Reset sets
// Range to 510 and clears the valid bit.
module bae_stage2
  import bae_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  s1_t  s1,
  output s2_t  s2,
  output logic [RANGE_W-1:0] range_q   // current Range, for observation
);

  logic [RANGE_W-1:0] range_d;
  logic [7:0]         rlps;
  logic [RANGE_W-1:0] rmps;
  logic [2:0]         lps_shift;
  s2_t                nxt;

  // Left shift that brings an rLPS value (2..255) to 256 or above.
  function automatic logic [2:0] renorm_shift(input logic [7:0] v);
    logic [2:0] n;
    n = 3'd7;
    for (int b = 1; b < 8; b++)
      if (v[b]) n = 3'(8 - b);
    return n;
  endfunction

  always_comb begin
    rlps      = s1.rlps[range_q[7:6]];
    rmps      = range_q - RANGE_W'(rlps);
    lps_shift = renorm_shift(rlps);
    range_d   = range_q;
    nxt       = '0;
    nxt.valid = s1.valid;
    nxt.bypass = s1.bypass;
    if (s1.valid) begin
      if (s1.bypass) begin
        nxt.inc   = range_q * INC_W'(s1.epbits);
        nxt.shift = s1.eplen;
      end else if (s1.lps) begin
        nxt.inc   = INC_W'(rmps);
        nxt.shift = lps_shift;
        range_d   = RANGE_W'(rlps) << lps_shift;
        if (s1.terminate) begin
          nxt.flush = 1'b1;
          range_d   = RANGE_W'(RANGE_INIT);
        end
      end else begin
        nxt.inc   = '0;
        nxt.shift = rmps[RANGE_W-1] ? 3'd0 : 3'd1;
        range_d   = rmps[RANGE_W-1] ? rmps : (rmps << 1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      range_q <= RANGE_W'(RANGE_INIT);
      s2      <= '0;
    end else begin
      range_q <= range_d;
      s2      <= nxt;
    end
  end

endmodule
