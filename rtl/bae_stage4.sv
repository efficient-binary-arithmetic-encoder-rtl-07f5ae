// Stage 4 of the BAE pipeline: coded bit construction (bitstream generator).
//
// Holds the count of accumulated outstanding bits (AccOSCnt) from earlier
// packets. Those bits are "0 1 1 ... 1" pending a possible carry; once known
// they are written as a first bit F followed by AccOSCnt copies of !F, which
// is HEVC's PutBit rule. F is the chunk's carry when outstanding bits are
// pending, otherwise the chunk's first shifted bit s1.
//
// Per packet, with the chunk, ndet, oscnt and hold from stage 3:
//   hold and F = 0 : nothing is determined; all shifted bits are added to
//                    AccOSCnt;
//   otherwise      : the output word is F, AccOSCnt copies of !F, then the
//                    ndet determined bits s2.., then (on a flush) the stop
//                    bit 1; AccOSCnt becomes oscnt.
// The word is made as in the published bit generator: F concatenated with
// its inversion, ANDed with a mask that keeps 1+AccOSCnt bits, ORed with
// the remaining chunk bits shifted into place by a barrel shifter.
// The very first bit of a slice is not written (HEVC's firstBitFlag). After
// a flush AccOSCnt and that flag return to their slice-start values.
//
// AccOSCnt is ACC_W = 5 bits, which with the determined bits and the flush
// bits gives the OUT_W = 41-bit word. A run of more than 31 outstanding bits
// cannot be held: the sticky acc_overflow output reports it (cleared only
// by reset), and an assertion warns of it in simulation.
//
// Outputs (registered, one cycle after the stage 3 register): out_valid,
// out_bits (MSB first, left aligned, first bit in out_bits[OUT_W-1]) and
// out_nbits (0..OUT_W).
module bae_stage4
  import bae_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  s3_t                  s3,
  output logic                 out_valid,
  output logic [OUT_W-1:0]     out_bits,
  output logic [OUT_CNT_W-1:0] out_nbits,
  output logic                 acc_overflow,
  output logic [ACC_W-1:0]     acc_q        // AccOSCnt, for observation
);

  logic                 first_q;
  logic                 f;
  logic [ACC_W-1:0]     acc_d;
  logic                 first_d;
  logic                 ovf_d;
  logic [OUT_W-1:0]     base, mask, tail, word;
  logic [8:0]           rest;
  logic [OUT_CNT_W-1:0] cnt;
  logic [ACC_W+4:0]     acc_sum;

  always_comb begin
    f       = (acc_q != '0) ? s3.chunk[CHUNK_W-1] : s3.chunk[CHUNK_W-2];
    acc_d   = acc_q;
    first_d = first_q;
    ovf_d   = acc_overflow;
    acc_sum = (ACC_W+5)'(acc_q) + (ACC_W+5)'(s3.nsh);
    base    = f ? {1'b1, {(OUT_W-1){1'b0}}} : {1'b0, {(OUT_W-1){1'b1}}};
    mask    = ~({OUT_W{1'b1}} >> (OUT_CNT_W'(acc_q) + 1'b1));
    // determined bits s2.. (ndet of them), then the stop bit of a flush
    rest    = {s3.chunk[CHUNK_W-3:0] & ~(8'hFF >> s3.ndet), 1'b0};
    if (s3.flush) rest = rest | (9'h100 >> s3.ndet);
    tail    = {rest, {(OUT_W-9){1'b0}}} >> (OUT_CNT_W'(acc_q) + 1'b1);
    word    = (base & mask) | tail;
    cnt     = OUT_CNT_W'(1) + OUT_CNT_W'(acc_q) + OUT_CNT_W'(s3.ndet) + OUT_CNT_W'(s3.flush);

    if (!s3.valid || s3.nsh == '0) begin
      cnt = '0;
    end else if (s3.hold && !f) begin
      cnt = '0;
      if (acc_sum > (ACC_W+5)'(ACC_MAX)) ovf_d = 1'b1;
      acc_d = ACC_W'(acc_sum);
    end else begin
      acc_d = ACC_W'(s3.oscnt);
      if (first_q) begin
        word    = word << 1;
        cnt     = cnt - 1'b1;
        first_d = 1'b0;
      end
    end
    if (s3.valid && s3.flush) begin
      acc_d   = '0;
      first_d = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q        <= '0;
      first_q      <= 1'b1;
      acc_overflow <= 1'b0;
      out_valid    <= 1'b0;
      out_bits     <= '0;
      out_nbits    <= '0;
    end else begin
      acc_q        <= acc_d;
      first_q      <= first_d;
      acc_overflow <= ovf_d;
      out_valid    <= (cnt != '0);
      out_bits     <= word & ~({OUT_W{1'b1}} >> cnt);
      out_nbits    <= cnt;
      // A run of outstanding bits longer than AccOSCnt can count.
      a_no_acc_overflow: assert (!(ovf_d && !acc_overflow))
        else $warning("outstanding-bit run exceeds %0d", ACC_MAX);
    end
  end

endmodule
