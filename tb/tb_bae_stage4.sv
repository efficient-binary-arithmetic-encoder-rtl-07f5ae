// Testbench of bae_stage4, the coded-bit generator.
//
// Random bins (regular, bypass groups of 1..4, terminate 0, and a terminate 1
// ending each slice) go to the bin-by-bin reference encoder in bae_ref_pkg.
// The same bins are turned into stage-3 results here, with a Range and Low
// kept by this testbench and chunk_ref, and fed to the block one per cycle
// with a few empty cycles. The concatenated output words must equal the
// reference bitstream bit for bit, and each word must appear exactly one
// cycle after its input. Outstanding accumulation, carries and flushes are
// counted and must occur. A final directed run of held chunks must raise the
// sticky acc_overflow flag exactly when the count passes 31.
module tb_bae_stage4;
  import bae_pkg::*;
  import bae_ref_pkg::*;

  localparam int N_PACKETS = 20000;

  logic                 clk = 1'b0;
  logic                 rst_n;
  s3_t                  s3;
  logic                 out_valid;
  logic [OUT_W-1:0]     out_bits;
  logic [OUT_CNT_W-1:0] out_nbits;
  logic                 acc_overflow;
  logic [ACC_W-1:0]     acc_q;

  bae_stage4 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hold = 0;
  bit dut_bits[$];
  bae_ref ref_m;
  int unsigned rng, low;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Feeds one packet's stage-3 result and collects the word one cycle later.
  task automatic feed(int unsigned inc, int unsigned shift, bit bypass, bit flush);
    s3_t e;
    int unsigned nl;
    chunk_ref(low, inc, shift, bypass, flush, e, nl);
    low = nl;
    if (e.hold && !(acc_q != 0 ? e.chunk[9] : e.chunk[8])) n_hold++;
    s3 <= e;
    @(posedge clk);
    s3 <= '0;
    #1;
    for (int i = 0; i < int'(out_nbits); i++) dut_bits.push_back(out_bits[OUT_W-1-i]);
    check(out_valid == (out_nbits != 0), "out_valid matches out_nbits");
  endtask

  initial begin
    repeat (N_PACKETS * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent, err_pos;
    ref_m = new();
    rng = 510; low = 0;
    rst_n = 1'b0; s3 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    sent = 0;
    while (sent < N_PACKETS) begin
      int unsigned slice_len;
      slice_len = $urandom_range(10, 300);
      for (int k = 0; k < slice_len; k++) begin
        int unsigned r, sh;
        r = $urandom_range(0, 99);
        sh = 0;
        if (r < 3) begin
          s3 <= '0;
          @(posedge clk);
          #1;
          check(out_valid == 1'b0, "no output for an empty cycle");
        end else if (r < 60) begin
          logic [3:0][7:0] row;
          int unsigned ps, rl, inc;
          bit mps, bin;
          ps  = $urandom_range(0, 62);
          mps = 1'($urandom);
          bin = ($urandom_range(0, 3) != 0) ? mps : !mps;
          ref_m.regular(bin, ps, mps);
          row = rlps_row(6'(ps));
          rl  = int'(row[(rng >> 6) & 3]);
          rng = rng - rl;
          inc = 0;
          if (bin != mps) begin inc = rng; rng = rl; end
          while (rng < 256) begin rng = rng * 2; sh++; end
          feed(inc, sh, 1'b0, 1'b0);
        end else if (r < 96) begin
          int unsigned len, bits;
          len  = $urandom_range(1, 4);
          bits = $urandom_range(0, (1 << len) - 1);
          if ($urandom_range(0, 3) == 0) bits = (1 << len) - 1;
          ref_m.bypass_group(bits, len);
          feed(rng * bits, len, 1'b1, 1'b0);
        end else begin
          ref_m.terminate(1'b0);
          rng = rng - 2;
          while (rng < 256) begin rng = rng * 2; sh++; end
          feed(0, sh, 1'b0, 1'b0);
        end
        sent++;
      end
      // end of slice
      ref_m.terminate(1'b1);
      feed(rng - 2, 7, 1'b0, 1'b1);
      rng = 510;
      sent++;
    end

    check(dut_bits.size() == ref_m.bits.size(),
          $sformatf("bit count %0d, reference %0d", dut_bits.size(), ref_m.bits.size()));
    err_pos = -1;
    for (int i = 0; i < dut_bits.size() && i < ref_m.bits.size(); i++)
      if (dut_bits[i] != ref_m.bits[i]) begin err_pos = i; break; end
    check(err_pos < 0, $sformatf("bitstream differs first at bit %0d", err_pos));
    check(acc_overflow == 1'b0 || ref_m.max_outst > ACC_MAX, "no false overflow");
    $display("bits %0d hold %0d carry %0d flush %0d max outstanding %0d",
             dut_bits.size(), n_hold, ref_m.n_carry, ref_m.n_flush, ref_m.max_outst);
    check(n_hold > 0 && ref_m.n_carry > 0 && ref_m.n_flush > 0, "hold, carry and flush seen");

    // Directed: a run of outstanding bits longer than the accumulator holds.
    // Each chunk "0 1111" with y = 1 adds its 4 bits to the pending count.
    check(acc_overflow == 1'b0, "no overflow before the directed run");
    for (int i = 0; i < 9; i++) begin
      s3_t h;
      h = '0;
      h.valid = 1'b1;
      h.nsh   = 4'd4;
      h.ndet  = 4'd3;
      h.hold  = 1'b1;
      h.chunk = (acc_q == 0) ? 10'b0001110000 : 10'b0011110000;
      s3 <= h;
      @(posedge clk);
      s3 <= '0;
      #1;
      check(out_nbits == 0, "hold chunk writes nothing");
      check(acc_overflow == (i >= 7), $sformatf("overflow flag after %0d held chunks", i + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
