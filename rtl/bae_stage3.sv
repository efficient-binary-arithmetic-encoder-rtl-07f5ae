// Stage 3 of the BAE pipeline: Low renormalization and outstanding-bit
// look-up.
//
// Holds the 10-bit Low register and updates it with one adder for every bin
// type, using the increment and shift prepared by stage 2:
//   regular/terminate: R = (Low + inc) << shift   (add, then shift)
//   bypass group:      R = (Low << EPlen) + inc    (shift, then add;
//                                                   inc = Range*EPbits)
// Low takes R[9:0]. The bits of R above bit 9 are the carry c followed by
// the shift bits s1..sN that left Low; only these go to stage 4, left
// aligned in a 10-bit chunk, instead of the whole renormalized Low.
//
// The outstanding-bit look-up is also done here, from R alone, so stage 4
// only has to merge it with its accumulated count. With y = R[9] (the bit
// that will leave Low next):
//   y = 0                          : all of s2..sN are determined (ndet=N-1);
//   y = 1, last 0 of s2..sN at sZ  : s2..s(Z-1) are determined and the
//                                    N-Z+1 bits sZ..sN become outstanding;
//   y = 1, no 0 in s2..sN          : "hold": nothing is determined unless
//                                    the first bit of the chunk is a 1.
// A terminate bin equal to 1 also flushes: two more bits of Low are shifted
// out (N = 7+2), all are treated as determined, and Low restarts at 0 for
// the next slice. The flush follows HEVC's EncodeFlush; folding it into the
// same chunk is this design's choice.
//
// Timing: one packet per cycle, registered output. Reset clears Low.
module bae_stage3
  import bae_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  s2_t  s2,
  output s3_t  s3,
  output logic [LOW_W-1:0] low_q    // current Low, for observation
);

  localparam int unsigned R_W = LOW_W + SHIFT_MAX + 1;  // 20 bits

  logic [R_W-1:0]      opnd, r;
  logic [3:0]          nsh;
  logic [CHUNK_W-1:0]  upper;
  logic [LOW_W-1:0]    low_d;
  logic                y;
  logic [3:0]          z;
  logic                zfound;
  s3_t                 nxt;

  always_comb begin
    // Single shared adder: the operand order (shift before or after the add)
    // is what distinguishes bypass from regular processing.
    opnd = s2.bypass ? (R_W'(low_q) << s2.shift) : R_W'(low_q);
    r    = opnd + R_W'(s2.inc);
    nsh  = 4'(s2.shift);
    if (!s2.bypass) r = r << s2.shift;
    if (s2.flush) begin
      r   = r << 2;
      nsh = nsh + 4'd2;
    end
    upper = r[R_W-1:LOW_W];
    low_d = s2.flush ? '0 : r[LOW_W-1:0];
    y     = r[LOW_W-1] && !s2.flush;

    nxt       = '0;
    nxt.valid = s2.valid;
    nxt.flush = s2.flush;
    nxt.nsh   = nsh;
    nxt.chunk = upper << (4'(SHIFT_MAX) - nsh);   // carry at bit 9, s1 at bit 8

    // Last zero among s2..sN; s_i sits at chunk bit 9-i.
    zfound = 1'b0;
    z      = '0;
    for (int i = 2; i <= int'(SHIFT_MAX); i++)
      if (i <= int'(nsh) && !nxt.chunk[CHUNK_W-1-i]) begin
        zfound = 1'b1;
        z      = 4'(i);
      end

    if (nsh == 4'd0) begin
      nxt.ndet = '0;
    end else if (!y) begin
      nxt.ndet = nsh - 4'd1;
    end else if (zfound) begin
      nxt.ndet  = z - 4'd2;
      nxt.oscnt = 3'(nsh - z + 4'd1);
    end else begin
      nxt.ndet  = nsh - 4'd1;
      nxt.hold  = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      low_q <= '0;
      s3    <= '0;
    end else begin
      if (s2.valid) low_q <= low_d;
      s3 <= nxt;
    end
  end

endmodule
