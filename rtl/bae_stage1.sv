// Stage 1 of the BAE pipeline: packet analyzer and rLPS look-up.
//
// Decodes the 10-bit input packet (format in bae_pkg) into the control bits
// the later stages need and reads the four rLPS candidates of the bin's
// probability state. Which of the four is used depends on the Range register
// that stage 2 updates in the same cycle, so the choice is left to stage 2
// and only the four 8-bit values are registered; rLPS renormalization is
// also left to stage 2. A terminate bin uses rLPS = 2 in all four entries,
// so it shares the regular-bin datapath. The bin is the LPS when binVal
// differs from valMPS; for a terminate bin, when binVal is 1.
//
// Timing: one packet per cycle, result registered (one cycle latency).
// Reset clears only the valid bit.
module bae_stage1
  import bae_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  packet_t in_packet,
  output s1_t     s1
);

  mode_e mode;
  s1_t   nxt;

  always_comb begin
    mode       = mode_e'(in_packet[9:8]);
    nxt        = '0;
    nxt.valid  = in_valid && (mode != MODE_NONE);
    nxt.bypass = (mode == MODE_BYPASS);
    nxt.terminate = (mode == MODE_TERMINATE);
    nxt.lps    = (mode == MODE_TERMINATE) ? in_packet[7] : (in_packet[7] != in_packet[0]);
    nxt.rlps   = (mode == MODE_TERMINATE) ? {4{8'd2}} : rlps_row(in_packet[6:1]);
    nxt.epbits = in_packet[7:4];
    nxt.eplen  = in_packet[3:1];
    if (mode == MODE_BYPASS && (in_packet[3:1] == 3'd0 || in_packet[3:1] > 3'(EP_MAX)))
      nxt.valid = 1'b0;  // empty or malformed bypass group: treated as a bubble
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1 <= '0;
    else        s1 <= nxt;
  end

endmodule
