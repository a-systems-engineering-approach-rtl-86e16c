// pattern_matcher: one attack-signature matcher of the DPI unit.
//
// A signature of LEN bytes is checked with LEN byte comparators working in
// parallel: comparator k sees pattern byte k and candidate payload byte k,
// and the AND of all comparator outputs is the match flag, as in the
// design's 7-byte "Patt_Match" cell. The candidate bytes come from the
// payload extractor window, which presents each byte alignment in turn.
// The 'enable' input (window holds at least LEN bytes of the current
// payload) is this design's addition, so that stale bytes of an earlier
// packet can never complete a match. Combinational.
//
//   cand       : candidate bytes, byte k in bits [8k+7:8k] (k = 0 first)
//   enable     : candidate bytes are all valid
//   match_flag : 1 when enable and every byte equals the pattern
module pattern_matcher #(
  parameter int unsigned        LEN     = 7,
  // Default: "STUXNET", byte 0 = 'S'
  parameter logic [LEN*8-1:0]   PATTERN = 56'h54_45_4E_58_55_54_53
) (
  input  logic [LEN*8-1:0] cand,
  input  logic             enable,
  output logic             match_flag
);
  logic [LEN-1:0] byte_eq;

  for (genvar k = 0; k < LEN; k++) begin : g_byte_comp
    xnor_comparator #(.WIDTH(8)) u_byte_comp (
      .a  (PATTERN[8*k +: 8]),
      .b  (cand[8*k +: 8]),
      .eq (byte_eq[k])
    );
  end

  assign match_flag = enable & (&byte_eq);
endmodule
