// Testbench of bae_stage2, Range renormalization and bypass pre-multiplication.
//
// Drives stage-1 results directly: regular bins (MPS and LPS, random state),
// terminate bins 0 and 1, bypass groups of 1..4 bins and empty cycles, one per
// clock. A model written here keeps its own Range, picks rLPS by the Range
// quarter, renormalizes with a bit-at-a-time loop, and predicts the Low
// increment and shift. The registered outputs and the Range register are
// compared one cycle after each input.
module tb_bae_stage2;
  import bae_pkg::*;

  logic               clk = 1'b0;
  logic               rst_n;
  s1_t                s1;
  s2_t                s2;
  logic [RANGE_W-1:0] range_q;

  bae_stage2 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lps = 0, n_mps = 0, n_byp = 0, n_flush = 0;

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
    int unsigned rng;
    rng   = 510;
    rst_n = 1'b0; s1 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(range_q == 510, "Range after reset");

    for (int n = 0; n < 20000; n++) begin
      s1_t x;
      int unsigned r, rl, exp_inc, exp_shift;
      bit exp_flush;
      r = $urandom_range(0, 99);
      x = '0;
      x.valid = (r >= 4);
      if (r < 50) begin
        x.rlps = rlps_row(6'($urandom_range(0, 62)));
        x.lps  = ($urandom_range(0, 2) == 0);
      end else if (r < 85) begin
        x.bypass = 1'b1;
        x.eplen  = 3'($urandom_range(1, 4));
        x.epbits = 4'($urandom_range(0, (1 << x.eplen) - 1));
      end else begin
        x.terminate = 1'b1;
        x.rlps      = {4{8'd2}};
        x.lps       = ($urandom_range(0, 7) == 0);
      end
      s1 <= x;
      @(posedge clk);
      #1;
      // model
      exp_inc = 0; exp_shift = 0; exp_flush = 0;
      if (x.valid) begin
        if (x.bypass) begin
          exp_inc = rng * x.epbits;
          exp_shift = int'(x.eplen);
          n_byp++;
        end else begin
          rl = int'(x.rlps[(rng >> 6) & 3]);
          rng = rng - rl;
          if (x.lps) begin
            exp_inc = rng;
            rng = rl;
            n_lps++;
          end else n_mps++;
          while (rng < 256) begin rng = rng * 2; exp_shift++; end
          if (x.terminate && x.lps) begin
            exp_flush = 1;
            rng = 510;
            n_flush++;
          end
        end
      end
      check(s2.valid == x.valid, "valid");
      if (x.valid) begin
        check(s2.bypass == x.bypass, "bypass");
        check(s2.flush == exp_flush, "flush");
        check(s2.inc == INC_W'(exp_inc), $sformatf("inc %0d expected %0d", s2.inc, exp_inc));
        check(s2.shift == 3'(exp_shift), $sformatf("shift %0d expected %0d", s2.shift, exp_shift));
      end
      check(range_q == RANGE_W'(rng), $sformatf("Range %0d expected %0d", range_q, rng));
    end
    $display("MPS %0d LPS %0d bypass %0d flush %0d", n_mps, n_lps, n_byp, n_flush);
    check(n_mps > 0 && n_lps > 0 && n_byp > 0 && n_flush > 0, "all bin kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
