// End-to-end testbench of bae_top at its default parameters.
//
// Drives a stream of random slices, one packet per cycle with occasional
// empty cycles. Each slice is a mix of regular bins (random probability state
// and MPS, the bin equal to the MPS three times in four), bypass groups of 1
// to 4 bins, terminate bins equal to 0, and ends with a terminate bin equal to
// 1, which flushes the encoder. The same bins go to the bin-by-bin reference
// model in bae_ref_pkg; the concatenated coded bits of the design must equal
// the reference bitstream bit for bit, checked as a whole and word by word.
//
// Timing checks: a lone terminate packet after reset must produce its output
// exactly four cycles later, and the whole stream must be coded with one
// packet accepted per cycle and the last bits out four cycles after the last
// packet. Every mechanism (MPS, LPS, each bypass group length, terminate 0,
// flush, carry into outstanding bits, outstanding accumulation in stage 4) is
// counted and must occur at least once.
module tb_bae_top;
  import bae_pkg::*;
  import bae_ref_pkg::*;

  localparam int N_PACKETS = 40000;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 in_valid;
  packet_t              in_packet;
  logic                 out_valid;
  logic [OUT_W-1:0]     out_bits;
  logic [OUT_CNT_W-1:0] out_nbits;
  logic                 acc_overflow;

  bae_top dut (.*);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  longint cycle = 0;
  bit  dut_bits[$];
  int  word_ends[$];   // bit position after each output word
  bae_ref ref_m;
  int unsigned n_hold = 0, n_bubble = 0, n_bins = 0, n_packets_sent = 0;
  longint first_in_cycle, last_in_cycle, last_out_cycle;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int i = 0; i < int'(out_nbits); i++) dut_bits.push_back(out_bits[OUT_W-1-i]);
    word_ends.push_back(dut_bits.size());
    last_out_cycle = cycle;
  end

  always @(posedge clk)
    if (rst_n && dut.u_stage4.s3.valid && dut.u_stage4.s3.hold && !dut.u_stage4.f
        && dut.u_stage4.s3.nsh != 0)
      n_hold++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(packet_t p);
    in_valid  <= 1'b1;
    in_packet <= p;
    @(posedge clk);
  endtask

  task automatic idle();
    in_valid  <= 1'b0;
    in_packet <= {MODE_NONE, 8'h00};
    @(posedge clk);
  endtask

  function automatic packet_t pk_regular(bit bin, int unsigned ps, bit mps);
    return {MODE_REGULAR, bin, 6'(ps), mps};
  endfunction
  function automatic packet_t pk_term(bit bin);
    return {MODE_TERMINATE, bin, 6'd0, 1'b0};
  endfunction
  function automatic packet_t pk_bypass(int unsigned bits, int unsigned len);
    return {MODE_BYPASS, 4'(bits), 3'(len), 1'b0};
  endfunction

  // watchdog
  initial begin
    repeat (N_PACKETS * 2 + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    int     err_pos;
    ref_m     = new();
    rst_n     = 1'b0;
    in_valid  = 1'b0;
    in_packet = {MODE_NONE, 8'h00};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Latency: a slice holding only an end-of-slice terminate bin.
    t0 = cycle;
    send(pk_term(1'b1));
    ref_m.terminate(1'b1);
    repeat (8) idle();
    // presented in cycle t0, sampled at the end of cycle t0+4
    check(last_out_cycle - t0 == 5, $sformatf("latency %0d cycles, expected 4", last_out_cycle - t0 - 1));

    // Random slices, one packet per cycle.
    first_in_cycle = cycle;
    while (n_packets_sent < N_PACKETS) begin
      int unsigned slice_len;
      slice_len = 20 + $urandom_range(0, 400);
      for (int unsigned k = 0; k < slice_len; k++) begin
        int unsigned r;
        r = $urandom_range(0, 99);
        if (r < 3) begin
          n_bubble++;
          idle();
        end else if (r < 62) begin
          int unsigned ps;
          bit          mps, bin;
          ps  = $urandom_range(0, 62);
          mps = 1'($urandom);
          bin = ($urandom_range(0, 3) != 0) ? mps : !mps;
          send(pk_regular(bin, ps, mps));
          ref_m.regular(bin, ps, mps);
          n_bins++;
        end else if (r < 97) begin
          int unsigned len, bits;
          len  = $urandom_range(1, 4);
          bits = $urandom_range(0, (1 << len) - 1);
          // runs of ones make long outstanding runs likely
          if ($urandom_range(0, 3) == 0) bits = (1 << len) - 1;
          send(pk_bypass(bits, len));
          ref_m.bypass_group(bits, len);
          n_bins += len;
        end else begin
          send(pk_term(1'b0));
          ref_m.terminate(1'b0);
          n_bins++;
        end
        n_packets_sent++;
      end
      send(pk_term(1'b1));
      ref_m.terminate(1'b1);
      n_bins++;
      n_packets_sent++;
    end
    last_in_cycle = cycle - 1;
    repeat (10) idle();

    // Bitstream
    check(dut_bits.size() == ref_m.bits.size(),
          $sformatf("bit count %0d, reference %0d", dut_bits.size(), ref_m.bits.size()));
    err_pos = -1;
    for (int i = 0; i < dut_bits.size() && i < ref_m.bits.size(); i++)
      if (dut_bits[i] != ref_m.bits[i]) begin err_pos = i; break; end
    check(err_pos < 0, $sformatf("bitstream differs first at bit %0d", err_pos));
    // The same comparison word by word, so a fault shows in how many words it hits.
    begin
      int b0, ok;
      b0 = 0;
      foreach (word_ends[w]) begin
        ok = 1;
        for (int i = b0; i < word_ends[w]; i++)
          if (i >= ref_m.bits.size() || dut_bits[i] != ref_m.bits[i]) ok = 0;
        check(ok == 1, $sformatf("output word %0d (bits %0d..%0d) differs", w, b0, word_ends[w] - 1));
        b0 = word_ends[w];
      end
    end
    // Throughput and pipeline depth
    check(last_out_cycle - last_in_cycle == 5,
          $sformatf("last output %0d cycles after last packet, expected 4", last_out_cycle - last_in_cycle - 1));
    check(acc_overflow == (ref_m.max_outst > ACC_MAX), "acc_overflow flag");
    $display("packets %0d, bins %0d, cycles %0d, bins/cycle %0.3f, coded bits %0d, max outstanding %0d",
             n_packets_sent, n_bins, last_in_cycle - first_in_cycle + 1,
             real'(n_bins) / real'(last_in_cycle - first_in_cycle + 1), dut_bits.size(), ref_m.max_outst);

    // Mechanisms exercised
    $display("mps %0d lps %0d term0 %0d flush %0d bypass1..4 %0d %0d %0d %0d carry %0d outstanding %0d hold %0d bubbles %0d",
             ref_m.n_mps, ref_m.n_lps, ref_m.n_term0, ref_m.n_flush, ref_m.n_bypass_len[1],
             ref_m.n_bypass_len[2], ref_m.n_bypass_len[3], ref_m.n_bypass_len[4],
             ref_m.n_carry, ref_m.n_outst, n_hold, n_bubble);
    check(ref_m.n_mps > 0, "no MPS bin");
    check(ref_m.n_lps > 0, "no LPS bin");
    check(ref_m.n_term0 > 0, "no terminate bin 0");
    check(ref_m.n_flush > 1, "no flush");
    for (int l = 1; l <= 4; l++) check(ref_m.n_bypass_len[l] > 0, $sformatf("no bypass group of %0d", l));
    check(ref_m.n_carry > 0, "no carry into outstanding bits");
    check(ref_m.n_outst > 0, "no outstanding bit");
    check(n_hold > 0, "no outstanding accumulation in stage 4");
    check(n_bubble > 0, "no empty cycle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
