// Testbench of bae_stage3, Low renormalization and outstanding-bit look-up.
//
// Drives stage-2 results directly with a Range kept here (regular MPS/LPS
// with random rLPS, terminate 0/1, bypass groups, empty cycles). The expected
// chunk, shift count, determined-bit count, outstanding count, hold flag and
// the new Low come from chunk_ref in bae_ref_pkg, which computes the
// renormalized Low as a plain integer and scans its bits one at a time. All
// outputs are compared one cycle after each input.
module tb_bae_stage3;
  import bae_pkg::*;
  import bae_ref_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n;
  s2_t              s2;
  s3_t              s3;
  logic [LOW_W-1:0] low_q;

  bae_stage3 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hold = 0, n_os = 0, n_flush = 0, n_carry = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned rng, low;
    rng   = 510;
    low   = 0;
    rst_n = 1'b0; s2 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(low_q == 0, "Low after reset");

    for (int n = 0; n < 20000; n++) begin
      s2_t x;
      s3_t e;
      int unsigned r, rl, new_low;
      r = $urandom_range(0, 99);
      x = '0;
      x.valid = (r >= 4);
      if (r < 50) begin
        rl = $urandom_range(6, 240);
        if (rl >= rng) rl = rng / 2;
        if ($urandom_range(0, 2) == 0) begin     // LPS
          x.inc = INC_W'(rng - rl);
          rng = rl;
        end else rng = rng - rl;
      end else if (r < 85) begin
        int unsigned len, bits;
        len  = $urandom_range(1, 4);
        bits = $urandom_range(0, (1 << len) - 1);
        x.bypass = 1'b1;
        x.inc    = INC_W'(rng * bits);
        x.shift  = 3'(len);
      end else begin
        rng = rng - 2;
        if ($urandom_range(0, 7) == 0) begin
          x.inc   = INC_W'(rng);
          x.flush = 1'b1;
          rng = 2;
        end
      end
      if (!x.bypass) while (rng < 256) begin rng = rng * 2; x.shift++; end
      if (x.flush) rng = 510;
      if (!x.valid) begin
        // an empty cycle carries nothing and must leave Low alone
        x = '0;
      end
      s2 <= x;
      @(posedge clk);
      #1;
      chunk_ref(low, int'(x.inc), int'(x.shift), x.bypass, x.flush, e, new_low);
      e.valid = x.valid;
      if (x.valid) low = new_low;
      if (x.valid && e.hold) n_hold++;
      if (x.valid && e.oscnt != 0) n_os++;
      if (x.valid && e.flush) n_flush++;
      if (x.valid && e.chunk[9]) n_carry++;
      check(s3.valid == e.valid, "valid");
      if (x.valid)
        check(s3 == e, $sformatf("stage-3 output %p, expected %p", s3, e));
      check(low_q == LOW_W'(low), $sformatf("Low %0d expected %0d", low_q, low));
    end
    $display("hold %0d outstanding %0d flush %0d carry %0d", n_hold, n_os, n_flush, n_carry);
    check(n_hold > 0 && n_os > 0 && n_flush > 0 && n_carry > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
