// tb_rule_block: checks an outbound rule (GW_A, 10.0.1.10:50000) and an
// inbound rule (IPS, 192.168.1.10:50001) of the default ruleset: exact
// hits with any destination, each source field wrong, wrong direction,
// wrong protocol and an unparsed header.
module tb_rule_block;
  import sc_pkg::*;
  int checks = 0, failures = 0;
  pkt_hdr_t hdr;
  dir_e dir;
  logic m_gw, m_ips;

  rule_block #(.RULE(DEFAULT_RULES[0])) dut_gw  (.hdr, .dir, .match(m_gw));
  rule_block #(.RULE(DEFAULT_RULES[4])) dut_ips (.hdr, .dir, .match(m_ips));

  task automatic check(input logic exp_gw, input logic exp_ips, input string what);
    #1;
    checks++;
    if (m_gw !== exp_gw || m_ips !== exp_ips) begin
      failures++;
      $display("FAIL %s: gw=%0b/%0b ips=%0b/%0b", what, m_gw, exp_gw, m_ips, exp_ips);
    end
  endtask

  function automatic pkt_hdr_t mk(input logic [31:0] sip, input logic [15:0] sp);
    pkt_hdr_t h;
    h.ok = 1; h.proto = 8'd17; h.src_ip = sip; h.src_port = sp;
    h.dst_ip = $urandom; h.dst_port = 16'($urandom);
    return h;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      hdr = mk(32'h0A00010A, 16'd50000); dir = OUTBOUND; check(1, 0, "GW_A outbound");
      dir = INBOUND;                                     check(0, 0, "GW_A wrong direction");
      hdr = mk(32'hC0A8010A, 16'd50001); dir = INBOUND;  check(0, 1, "IPS inbound");
      dir = OUTBOUND;                                    check(0, 0, "IPS wrong direction");
      dir = INBOUND;
      hdr.src_ip = hdr.src_ip ^ (32'd1 << $urandom_range(0, 31));       check(0, 0, "IPS source IP bit");
      hdr = mk(32'hC0A8010A, 16'd50001);
      hdr.src_port = hdr.src_port ^ (16'd1 << $urandom_range(0, 15));       check(0, 0, "IPS source port bit");
      hdr = mk(32'hC0A8010A, 16'd50001); hdr.proto = 8'd6; check(0, 0, "TCP");
      hdr = mk(32'hC0A8010A, 16'd50001); hdr.ok = 0;     check(0, 0, "unparsed");
      hdr = mk(32'h0A000114, 16'd50000); dir = OUTBOUND; check(0, 0, "GW_B on GW_A rule");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
