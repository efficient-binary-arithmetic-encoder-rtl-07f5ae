// Four-stage pipelined binary arithmetic encoder (BAE) for HEVC CABAC with
// multiple-bypass-bin processing.
//
// One packet enters per clock cycle: a regular bin, a terminate bin, or a
// group of up to four bypass bins (format in bae_pkg). Bypass groups are
// coded in one cycle because Range does not change in bypass mode, so the
// new Low is (Low << EPlen) + Range*EPbits: one multiplication and the same
// adder that regular bins use. The stages:
//   1 bae_stage1: packet decode, read four rLPS candidates
//   2 bae_stage2: choose rLPS with Range[7:6], renormalize Range, form the
//                 Low increment (0, Range-rLPS or Range*EPbits)
//   3 bae_stage3: renormalize Low, pass the bits leaving Low and the
//                 outstanding-bit look-up
//   4 bae_stage4: resolve outstanding bits and build the coded-bit word
// The context modeler that produces the packets and updates the probability
// states, and any bit packer after the output, are outside this module.
//
// Interface: in_valid/in_packet (no back-pressure: the pipeline never
// stalls); out_valid/out_bits/out_nbits carry 0..41 coded bits per cycle,
// MSB first, in out_bits[40 -: out_nbits]. A terminate bin equal to 1 ends
// the slice: its output word includes HEVC's flush bits and the stop bit,
// and the engine restarts at Range = 510, Low = 0 for the next packet.
// acc_overflow is sticky and reports a run of more than 31 outstanding bits.
//
// Timing: the coded bits of a packet appear four cycles after it is
// presented (registered at the end of every stage).
module bae_top
  import bae_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  packet_t              in_packet,
  output logic                 out_valid,
  output logic [OUT_W-1:0]     out_bits,
  output logic [OUT_CNT_W-1:0] out_nbits,
  output logic                 acc_overflow
);

  s1_t s1;
  s2_t s2;
  s3_t s3;

  bae_stage1 u_stage1 (.clk, .rst_n, .in_valid, .in_packet, .s1);
  bae_stage2 u_stage2 (.clk, .rst_n, .s1, .s2, .range_q());
  bae_stage3 u_stage3 (.clk, .rst_n, .s2, .s3, .low_q());
  bae_stage4 u_stage4 (.clk, .rst_n, .s3, .out_valid, .out_bits, .out_nbits,
                       .acc_overflow, .acc_q());

endmodule
