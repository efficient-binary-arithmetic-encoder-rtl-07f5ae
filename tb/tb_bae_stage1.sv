// Testbench of bae_stage1, the packet analyzer and rLPS look-up.
//
// Sends random packets of every mode, one per cycle, and checks the
// registered decode one cycle later against a decode written here: valid,
// bin type, LPS flag, bypass fields and the four rLPS candidates. The rLPS
// values are checked against rows of HEVC's rangeTabLps typed in here
// (states 0, 1, 12, 31, 47, 62, 63) and, for every state, against the
// table's shape: entries grow with the Range quarter and shrink with the
// state index, and a terminate bin gets 2 in every entry.
module tb_bae_stage1;
  import bae_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    in_valid;
  packet_t in_packet;
  s1_t     s1;

  bae_stage1 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [3:0][7:0] known_row(int ps, output bit known);
    known = 1'b1;
    case (ps)
      0 : return {8'd240, 8'd208, 8'd176, 8'd128};
      1 : return {8'd227, 8'd197, 8'd167, 8'd128};
      12: return {8'd128, 8'd111, 8'd94 , 8'd77 };
      31: return {8'd48 , 8'd41 , 8'd35 , 8'd29 };
      47: return {8'd21 , 8'd18 , 8'd15 , 8'd12 };
      62: return {8'd9  , 8'd8  , 8'd7  , 8'd6  };
      63: return {8'd2  , 8'd2  , 8'd2  , 8'd2  };
      default: begin known = 1'b0; return '0; end
    endcase
  endfunction

  logic [3:0][7:0] rows[64];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_packet = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(s1.valid == 1'b0, "valid after reset");

    // Every probability state once as a regular bin, then random packets.
    for (int n = 0; n < 5064; n++) begin
      packet_t p;
      bit      v;
      mode_e   m;
      int      ps;
      bit      known;
      logic [3:0][7:0] kr;
      if (n < 64) p = {MODE_REGULAR, 1'b1, 6'(n), 1'b0};
      else        p = packet_t'($urandom);
      v = (n < 64) ? 1'b1 : ($urandom_range(0, 9) != 0);
      in_valid  <= v;
      in_packet <= p;
      @(posedge clk);
      #1;
      m  = mode_e'(p[9:8]);
      ps = int'(p[6:1]);
      if (!v || m == MODE_NONE || (m == MODE_BYPASS && (p[3:1] == 0 || p[3:1] > 4))) begin
        check(s1.valid == 1'b0, $sformatf("packet %b must be a bubble", p));
      end else begin
        check(s1.valid == 1'b1, $sformatf("packet %b valid", p));
        check(s1.bypass == (m == MODE_BYPASS), "bypass flag");
        check(s1.terminate == (m == MODE_TERMINATE), "terminate flag");
        if (m == MODE_BYPASS) begin
          check(s1.epbits == p[7:4], "EPbits");
          check(s1.eplen == p[3:1], "EPlen");
        end else if (m == MODE_TERMINATE) begin
          check(s1.lps == p[7], "terminate: LPS is binVal 1");
          check(s1.rlps == {4{8'd2}}, "terminate rLPS is 2");
        end else begin
          check(s1.lps == (p[7] ^ p[0]), $sformatf("LPS flag of %b", p));
          kr = known_row(ps, known);
          if (known) check(s1.rlps == kr, $sformatf("rLPS row of state %0d: %h", ps, s1.rlps));
          if (n < 64) rows[n] = s1.rlps;
        end
      end
    end

    // Shape of the whole table
    for (int ps = 0; ps < 64; ps++)
      for (int q = 1; q < 4; q++)
        check(rows[ps][q] >= rows[ps][q-1], $sformatf("state %0d: rLPS not increasing with Range", ps));
    for (int ps = 1; ps < 64; ps++)
      for (int q = 0; q < 4; q++)
        check(rows[ps][q] <= rows[ps-1][q], $sformatf("state %0d: rLPS not decreasing with state", ps));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
