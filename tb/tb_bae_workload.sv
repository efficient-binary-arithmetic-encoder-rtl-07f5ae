// Throughput testbench of bae_top on synthetic bin streams shaped like coded
// video: regular bins interleaved with runs of bypass bins, which a context
// modeler packs into groups of up to four. Two profiles are run, with about
// 25% and about 40% of the bins bypass-coded, each for a few slices.
//
// For each profile the coded bits must equal the bit-serial HEVC reference
// bitstream, the design must take one packet every cycle (so the cycle count
// equals the packet count and the last bits leave 4 cycles after the last
// packet), and the measured bins per cycle, which is
// bins / (regular bins + bypass groups), is printed.
module tb_bae_workload;
  import bae_pkg::*;
  import bae_ref_pkg::*;

  localparam int N_BINS = 30000;   // per profile

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

  int checks = 0, failures = 0;
  longint cycle = 0;
  longint last_out_cycle = 0;
  bit dut_bits[$];

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int i = 0; i < int'(out_nbits); i++) dut_bits.push_back(out_bits[OUT_W-1-i]);
    last_out_cycle = cycle;
  end

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

  initial begin
    repeat (4 * N_BINS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One profile: a bypass run of 1..11 bins starts with probability run_pct
  // percent before each regular bin.
  task automatic profile(string name, int run_pct);
    bae_ref ref_m;
    int nbin, byp_bins, packets, err_pos;
    longint c0, c1;
    ref_m = new();
    dut_bits.delete();
    nbin = 0; byp_bins = 0; packets = 0;
    c0 = cycle;
    while (nbin < N_BINS) begin
      int unsigned ps;
      bit mps, bin;
      if ($urandom_range(0, 99) < run_pct) begin
        int run;
        run = $urandom_range(1, 11);
        while (run > 0) begin
          int len, bits;
          len  = (run > 4) ? 4 : run;
          bits = $urandom_range(0, (1 << len) - 1);
          send({MODE_BYPASS, 4'(bits), 3'(len), 1'b0});
          ref_m.bypass_group(bits, len);
          run -= len; nbin += len; byp_bins += len; packets++;
        end
      end
      ps  = $urandom_range(0, 62);
      mps = 1'($urandom);
      bin = ($urandom_range(0, 4) != 0) ? mps : !mps;
      send({MODE_REGULAR, bin, 6'(ps), mps});
      ref_m.regular(bin, ps, mps);
      nbin++; packets++;
      if (packets % 2000 == 0) begin
        send({MODE_TERMINATE, 1'b1, 6'd0, 1'b0});
        ref_m.terminate(1'b1);
        nbin++; packets++;
      end
    end
    send({MODE_TERMINATE, 1'b1, 6'd0, 1'b0});
    ref_m.terminate(1'b1);
    nbin++; packets++;
    c1 = cycle;
    repeat (8) idle();

    check(c1 - c0 == longint'(packets), $sformatf("%s: %0d packets took %0d cycles", name, packets, c1 - c0));
    check(last_out_cycle - c1 == 4, $sformatf("%s: pipeline drain %0d cycles", name, last_out_cycle - c1));
    check(dut_bits.size() == ref_m.bits.size(),
          $sformatf("%s: bit count %0d, reference %0d", name, dut_bits.size(), ref_m.bits.size()));
    err_pos = -1;
    for (int i = 0; i < dut_bits.size() && i < ref_m.bits.size(); i++)
      if (dut_bits[i] != ref_m.bits[i]) begin err_pos = i; break; end
    check(err_pos < 0, $sformatf("%s: bitstream differs first at bit %0d", name, err_pos));
    check(!acc_overflow, $sformatf("%s: outstanding-bit overflow", name));
    $display("%s: bins %0d (bypass %0.1f%%), packets %0d, cycles %0d, bins/cycle %0.3f",
             name, nbin, 100.0 * byp_bins / nbin, packets, c1 - c0, real'(nbin) / real'(c1 - c0));
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_packet = {MODE_NONE, 8'h00};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    profile("bypass ~25%", 6);
    profile("bypass ~40%", 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
