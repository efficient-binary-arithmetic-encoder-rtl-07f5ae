// Shared definitions of the four-stage HEVC binary arithmetic encoder (BAE).
//
// The encoder takes one 10-bit packet per clock cycle. A packet carries either
// one regular bin, one terminate bin, or a group of up to four bypass bins:
//
//   regular / terminate:  [9:8] mode  [7] binVal  [6:1] pStateIdx  [0] valMPS
//   bypass:               [9:8] mode  [7:4] EPbits  [3:1] EPlen     [0] '0'
//
// The field layout follows the published packet format. The numeric mode
// codes are this design's choice (see mode_e). EPbits holds the EPlen bins
// right-aligned: the first bin is bit EPlen-1, so the group value is the plain
// binary number EPbits and the Low update is Range*EPbits.
//
// The rLPS table is HEVC's rangeTabLps (64 probability states x 4 range
// quarters), indexed by pStateIdx and by bits [7:6] of the current Range.
//
// This package also holds the three pipeline-register structs between the
// stages, so each stage module has a typed interface to its neighbours.
package bae_pkg;

  localparam int unsigned RANGE_W    = 9;    // Range is 9 bits (256..510)
  localparam int unsigned LOW_W      = 10;   // Low register width
  localparam int unsigned RANGE_INIT = 510;  // Range at the start of a slice
  localparam int unsigned EP_MAX     = 4;    // bypass bins per packet
  localparam int unsigned INC_W      = RANGE_W + EP_MAX;  // Range*EPbits
  // Bits that leave the top of Low in one packet: up to 7 for a terminate
  // bin plus 2 more for the end-of-slice flush; the chunk adds the carry bit.
  localparam int unsigned SHIFT_MAX  = 9;
  localparam int unsigned CHUNK_W    = SHIFT_MAX + 1;
  localparam int unsigned ACC_W      = 5;    // outstanding-bit accumulator
  localparam int unsigned ACC_MAX    = (1 << ACC_W) - 1;
  // Output word: first bit, up to ACC_MAX resolved outstanding bits, up to 8
  // determined bits and the flush stop bit.
  localparam int unsigned OUT_W      = 1 + ACC_MAX + (SHIFT_MAX - 1) + 1;
  localparam int unsigned OUT_CNT_W  = $clog2(OUT_W + 1);

  typedef enum logic [1:0] {
    MODE_REGULAR   = 2'b00,
    MODE_TERMINATE = 2'b01,
    MODE_BYPASS    = 2'b10,
    MODE_NONE      = 2'b11   // carries no bin; passes as a bubble
  } mode_e;

  typedef logic [9:0] packet_t;

  // Stage 1 -> stage 2
  typedef struct packed {
    logic                   valid;
    logic                   bypass;     // packet is a bypass group
    logic                   terminate;  // terminate bin (rLPS fixed at 2)
    logic                   lps;        // regular/terminate bin is the LPS
    logic [3:0][7:0]        rlps;       // the four rLPS candidates, [q] for Range[7:6]==q
    logic [EP_MAX-1:0]      epbits;
    logic [2:0]             eplen;
  } s1_t;

  // Stage 2 -> stage 3
  typedef struct packed {
    logic                   valid;
    logic                   bypass;
    logic                   flush;      // terminate bin equal to 1: end of slice
    logic [INC_W-1:0]       inc;        // rMPS: 0, Range-rLPS, or Range*EPbits
    logic [2:0]             shift;      // renormalization shift of Low (0..7)
  } s2_t;

  // Stage 3 -> stage 4
  typedef struct packed {
    logic                   valid;
    logic                   flush;
    logic [CHUNK_W-1:0]     chunk;      // [9]=carry, [8]=s1, [7]=s2 ... left aligned
    logic [3:0]             nsh;        // bits shifted out (0..9)
    logic [3:0]             ndet;       // determined bits after s1 (s2..)
    logic [2:0]             oscnt;      // trailing outstanding bits of this chunk
    logic                   hold;       // no determined bit unless the first bit is 1
  } s3_t;

  // HEVC rangeTabLps: row pStateIdx, entry q = (Range >> 6) & 3.
  function automatic logic [3:0][7:0] rlps_row(input logic [5:0] pstate);
    logic [31:0] r;
    case (pstate)
      6'd0 : r = {8'd240, 8'd208, 8'd176, 8'd128};
      6'd1 : r = {8'd227, 8'd197, 8'd167, 8'd128};
      6'd2 : r = {8'd216, 8'd187, 8'd158, 8'd128};
      6'd3 : r = {8'd205, 8'd178, 8'd150, 8'd123};
      6'd4 : r = {8'd195, 8'd169, 8'd142, 8'd116};
      6'd5 : r = {8'd185, 8'd160, 8'd135, 8'd111};
      6'd6 : r = {8'd175, 8'd152, 8'd128, 8'd105};
      6'd7 : r = {8'd166, 8'd144, 8'd122, 8'd100};
      6'd8 : r = {8'd158, 8'd137, 8'd116, 8'd95 };
      6'd9 : r = {8'd150, 8'd130, 8'd110, 8'd90 };
      6'd10: r = {8'd142, 8'd123, 8'd104, 8'd85 };
      6'd11: r = {8'd135, 8'd117, 8'd99 , 8'd81 };
      6'd12: r = {8'd128, 8'd111, 8'd94 , 8'd77 };
      6'd13: r = {8'd122, 8'd105, 8'd89 , 8'd73 };
      6'd14: r = {8'd116, 8'd100, 8'd85 , 8'd69 };
      6'd15: r = {8'd110, 8'd95 , 8'd80 , 8'd66 };
      6'd16: r = {8'd104, 8'd90 , 8'd76 , 8'd62 };
      6'd17: r = {8'd99 , 8'd86 , 8'd72 , 8'd59 };
      6'd18: r = {8'd94 , 8'd81 , 8'd69 , 8'd56 };
      6'd19: r = {8'd89 , 8'd77 , 8'd65 , 8'd53 };
      6'd20: r = {8'd85 , 8'd73 , 8'd62 , 8'd51 };
      6'd21: r = {8'd80 , 8'd69 , 8'd59 , 8'd48 };
      6'd22: r = {8'd76 , 8'd66 , 8'd56 , 8'd46 };
      6'd23: r = {8'd72 , 8'd63 , 8'd53 , 8'd43 };
      6'd24: r = {8'd69 , 8'd59 , 8'd50 , 8'd41 };
      6'd25: r = {8'd65 , 8'd56 , 8'd48 , 8'd39 };
      6'd26: r = {8'd62 , 8'd54 , 8'd45 , 8'd37 };
      6'd27: r = {8'd59 , 8'd51 , 8'd43 , 8'd35 };
      6'd28: r = {8'd56 , 8'd48 , 8'd41 , 8'd33 };
      6'd29: r = {8'd53 , 8'd46 , 8'd39 , 8'd32 };
      6'd30: r = {8'd50 , 8'd43 , 8'd37 , 8'd30 };
      6'd31: r = {8'd48 , 8'd41 , 8'd35 , 8'd29 };
      6'd32: r = {8'd45 , 8'd39 , 8'd33 , 8'd27 };
      6'd33: r = {8'd43 , 8'd37 , 8'd31 , 8'd26 };
      6'd34: r = {8'd41 , 8'd35 , 8'd30 , 8'd24 };
      6'd35: r = {8'd39 , 8'd33 , 8'd28 , 8'd23 };
      6'd36: r = {8'd37 , 8'd32 , 8'd27 , 8'd22 };
      6'd37: r = {8'd35 , 8'd30 , 8'd26 , 8'd21 };
      6'd38: r = {8'd33 , 8'd29 , 8'd24 , 8'd20 };
      6'd39: r = {8'd31 , 8'd27 , 8'd23 , 8'd19 };
      6'd40: r = {8'd30 , 8'd26 , 8'd22 , 8'd18 };
      6'd41: r = {8'd28 , 8'd25 , 8'd21 , 8'd17 };
      6'd42: r = {8'd27 , 8'd23 , 8'd20 , 8'd16 };
      6'd43: r = {8'd25 , 8'd22 , 8'd19 , 8'd15 };
      6'd44: r = {8'd24 , 8'd21 , 8'd18 , 8'd14 };
      6'd45: r = {8'd23 , 8'd20 , 8'd17 , 8'd14 };
      6'd46: r = {8'd22 , 8'd19 , 8'd16 , 8'd13 };
      6'd47: r = {8'd21 , 8'd18 , 8'd15 , 8'd12 };
      6'd48: r = {8'd20 , 8'd17 , 8'd14 , 8'd12 };
      6'd49: r = {8'd19 , 8'd16 , 8'd14 , 8'd11 };
      6'd50: r = {8'd18 , 8'd15 , 8'd13 , 8'd11 };
      6'd51: r = {8'd17 , 8'd15 , 8'd12 , 8'd10 };
      6'd52: r = {8'd16 , 8'd14 , 8'd12 , 8'd10 };
      6'd53: r = {8'd15 , 8'd13 , 8'd11 , 8'd9  };
      6'd54: r = {8'd14 , 8'd12 , 8'd11 , 8'd9  };
      6'd55: r = {8'd14 , 8'd12 , 8'd10 , 8'd8  };
      6'd56: r = {8'd13 , 8'd11 , 8'd9  , 8'd8  };
      6'd57: r = {8'd12 , 8'd11 , 8'd9  , 8'd7  };
      6'd58: r = {8'd12 , 8'd10 , 8'd9  , 8'd7  };
      6'd59: r = {8'd11 , 8'd10 , 8'd8  , 8'd7  };
      6'd60: r = {8'd11 , 8'd9  , 8'd8  , 8'd6  };
      6'd61: r = {8'd10 , 8'd9  , 8'd7  , 8'd6  };
      6'd62: r = {8'd9  , 8'd8  , 8'd7  , 8'd6  };
      default: r = {8'd2 , 8'd2  , 8'd2  , 8'd2  };
    endcase
    return r;
  endfunction

endpackage
