// Reference model for the BAE testbenches: a bin-by-bin software model of the
// HEVC arithmetic encoder (EncodeDecision, EncodeBypass, EncodeTerminate,
// EncodeFlush with RenormE and PutBit), written directly from the standard's
// loop-based description. It keeps Low in the standard's reduced form and an
// outstanding-bit counter, so it shares no structure with the RTL, which
// shifts several bits per cycle and resolves carries per chunk.
// It also counts the events the testbenches want to see happen.
package bae_ref_pkg;
  import bae_pkg::*;

  // Expected stage-3 result for one packet, by plain integer arithmetic and a
  // bit-by-bit scan: the renormalized Low R, the bits of R above bit 9, and
  // which of them are determined or outstanding given the next bit y = R[9].
  function automatic void chunk_ref(input int unsigned low, input int unsigned inc,
                                    input int unsigned shift, input bit bypass,
                                    input bit flush, output s3_t o,
                                    output int unsigned new_low);
    longint unsigned r;
    int unsigned nsh, t;
    bit y;
    bit s[1:9];
    if (bypass) r = (longint'(low) << shift) + longint'(inc);
    else        r = (longint'(low) + longint'(inc)) << shift;
    nsh = shift;
    if (flush) begin r = r << 2; nsh += 2; end
    new_low = flush ? 0 : int'(r & 1023);
    y = flush ? 1'b0 : r[9];
    o = '0;
    o.valid = 1'b1;
    o.flush = flush;
    o.nsh   = 4'(nsh);
    o.chunk[9] = r[10 + nsh];
    for (int i = 1; i <= 9; i++) begin
      s[i] = (i <= int'(nsh)) ? r[10 + nsh - i] : 1'b0;
      o.chunk[9 - i] = s[i];
    end
    // trailing ones among s2..s_nsh
    t = 0;
    for (int i = int'(nsh); i >= 2; i--) begin
      if (!s[i]) break;
      t++;
    end
    if (nsh == 0) begin
      o.ndet = 0;
    end else if (!y) begin
      o.ndet = 4'(nsh - 1);
    end else if (t == nsh - 1) begin
      o.ndet = 4'(nsh - 1);
      o.hold = 1'b1;
    end else begin
      o.oscnt = 3'(t + 1);
      o.ndet  = 4'(nsh - 1 - (t + 1));
    end
  endfunction

  class bae_ref;
    int unsigned range_r, low_r, outst;
    bit          first;
    bit          bits[$];
    int unsigned max_outst;
    int unsigned n_carry;       // PutBit(1) that resolves outstanding bits
    int unsigned n_outst;       // renormalization steps that deferred a bit
    int unsigned n_mps, n_lps, n_term0, n_flush;
    int unsigned n_bypass_len[5];

    function new();
      start_slice();
      max_outst = 0; n_carry = 0; n_outst = 0;
      n_mps = 0; n_lps = 0; n_term0 = 0; n_flush = 0;
      foreach (n_bypass_len[i]) n_bypass_len[i] = 0;
    endfunction

    function void start_slice();
      range_r = 510; low_r = 0; outst = 0; first = 1;
    endfunction

    function void put_bit(bit b);
      if (b && outst > 0) n_carry++;
      if (first) first = 0;
      else bits.push_back(b);
      while (outst > 0) begin
        bits.push_back(!b);
        outst--;
      end
    endfunction

    function void note_outst();
      n_outst++;
      if (outst > max_outst) max_outst = outst;
    endfunction

    function void renorm();
      while (range_r < 256) begin
        if (low_r < 256) put_bit(0);
        else if (low_r >= 512) begin low_r -= 512; put_bit(1); end
        else begin low_r -= 256; outst++; note_outst(); end
        range_r <<= 1;
        low_r   <<= 1;
      end
    endfunction

    function void regular(bit bin, int unsigned pstate, bit mps);
      logic [3:0][7:0] row;
      int unsigned rlps;
      row  = rlps_row(6'(pstate));
      rlps = int'(row[(range_r >> 6) & 3]);
      range_r -= rlps;
      if (bin != mps) begin
        low_r  += range_r;
        range_r = rlps;
        n_lps++;
      end else n_mps++;
      renorm();
    endfunction

    function void bypass(bit bin);
      low_r <<= 1;
      if (bin) low_r += range_r;
      if (low_r >= 1024) begin put_bit(1); low_r -= 1024; end
      else if (low_r < 512) put_bit(0);
      else begin low_r -= 512; outst++; note_outst(); end
    endfunction

    function void bypass_group(int unsigned epbits, int unsigned eplen);
      for (int i = int'(eplen) - 1; i >= 0; i--) bypass(epbits[i]);
      n_bypass_len[eplen]++;
    endfunction

    function void terminate(bit bin);
      range_r -= 2;
      if (bin) begin
        low_r += range_r;
        // EncodeFlush
        range_r = 2;
        renorm();
        put_bit(1'((low_r >> 9) & 1));
        bits.push_back(1'((low_r >> 8) & 1));
        bits.push_back(1'b1);
        n_flush++;
        start_slice();
      end else begin
        n_term0++;
        renorm();
      end
    endfunction
  endclass

endpackage
