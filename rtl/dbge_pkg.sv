// dbge_pkg: widths, types and encodings shared by the decision-boundary
// gap estimation (DBGE) calibration blocks.
//
// Samples are signed integers in LSBs of the final 14-bit converter output.
// A gap is the signed number of codes missing (positive) or duplicated
// (negative) at one decision boundary. A 1.5-bit stage decision is 0, 1 or 2
// (number of its two comparators that fired). The widths are this design's
// choice: 18-bit samples leave headroom for corrections of either sign on a
// 14-bit code, 18-bit counters hold a 200000-sample block.
package dbge_pkg;
  localparam int DW = 18;  // sample width (signed)
  localparam int GW = 12;  // gap width (signed)
  localparam int CW = 18;  // histogram / bin counter width

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [GW-1:0] gap_t;
  typedef logic [1:0]           dec_t;   // 1.5-bit stage decision, 0..2
  typedef logic [CW-1:0]        count_t;

  // Which estimate drives the correction.
  typedef enum logic [1:0] {
    EST_MAXMIN     = 2'd0,
    EST_BINRESHAPE = 2'd1,
    EST_COSTMIN    = 2'd2
  } est_sel_e;

  localparam gap_t GAP_MAX = gap_t'((1 << (GW - 1)) - 1);
  localparam gap_t GAP_MIN = gap_t'(-(1 << (GW - 1)));

  // Saturate a wide signed value to the gap range.
  function automatic gap_t sat_gap(input logic signed [31:0] v);
    if (v > 32'(signed'(GAP_MAX))) return GAP_MAX;
    if (v < 32'(signed'(GAP_MIN))) return GAP_MIN;
    return gap_t'(v);
  endfunction
endpackage
