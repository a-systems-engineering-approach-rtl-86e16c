// rule_block: one ALLOW rule of the static header filtering ruleset.
//
// Four XNOR comparators check the packet's source IP address, destination
// IP address, source UDP port and destination UDP port against the rule's
// settings, and their outputs are ANDed into the rule match flag
// (1 = matched), as the design specifies. Following the ruleset table, a
// rule also constrains the traffic direction and the service (IP protocol,
// UDP), and any field may be "Any"; the wildcard flags that express "Any"
// and the extra direction/protocol terms are this design's encoding of
// that table. A packet whose header could not be parsed never matches.
// Combinational.
//
//   hdr   : extracted header fields (hdr.ok = header complete and IPv4)
//   dir   : side the packet arrived on
//   match : rule match flag
module rule_block #(
  parameter sc_pkg::rule_t RULE = sc_pkg::DEFAULT_RULES[0]
) (
  input  sc_pkg::pkt_hdr_t hdr,
  input  sc_pkg::dir_e     dir,
  output logic             match
);
  import sc_pkg::*;

  logic src_ip_eq, dst_ip_eq, src_port_eq, dst_port_eq, proto_eq;
  logic dir_ok;

  xnor_comparator #(.WIDTH(32)) u_src_ip (
    .a(RULE.src_ip), .b(hdr.src_ip), .eq(src_ip_eq));
  xnor_comparator #(.WIDTH(32)) u_dst_ip (
    .a(RULE.dst_ip), .b(hdr.dst_ip), .eq(dst_ip_eq));
  xnor_comparator #(.WIDTH(16)) u_src_port (
    .a(RULE.src_port), .b(hdr.src_port), .eq(src_port_eq));
  xnor_comparator #(.WIDTH(16)) u_dst_port (
    .a(RULE.dst_port), .b(hdr.dst_port), .eq(dst_port_eq));
  xnor_comparator #(.WIDTH(8)) u_proto (
    .a(RULE.proto), .b(hdr.proto), .eq(proto_eq));

  always_comb begin
    unique case (RULE.dir)
      RDIR_IN:  dir_ok = (dir == INBOUND);
      RDIR_OUT: dir_ok = (dir == OUTBOUND);
      default:  dir_ok = 1'b1;
    endcase
    match = hdr.ok & dir_ok
          & (RULE.proto_any    | proto_eq)
          & (RULE.src_ip_any   | src_ip_eq)
          & (RULE.dst_ip_any   | dst_ip_eq)
          & (RULE.src_port_any | src_port_eq)
          & (RULE.dst_port_any | dst_port_eq);
  end
endmodule
