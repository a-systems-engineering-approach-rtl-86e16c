// tb_filtering_unit: sends the header of a frame from every system of the
// deployment in both directions, plus unknown hosts, wrong ports and
// non-UDP frames, through the default ruleset and checks allow/deny, the
// number of the deciding rule (7 = default DENY) and the one-cycle decision
// latency. A second instance with two overlapping rules checks that the
// lower-numbered rule decides. A third instance walks the default ruleset
// one rule per cycle and must reach the same decisions, rule k after k + 2
// cycles and the default DENY after 8.
module tb_filtering_unit;
  import sc_pkg::*;
  import tb_pkt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, eval = 0;
  logic [7:0] in_data = 0;
  logic [15:0] in_off = 0, hdr_len;
  dir_e dir = INBOUND;
  pkt_hdr_t hdr;
  logic hdr_len_valid, dec_valid, allow;
  logic [2:0] rule_no;
  logic o_dec_valid, o_allow;
  logic [1:0] o_rule_no;
  pkt_hdr_t o_hdr;
  logic [15:0] o_hdr_len;
  logic o_hlv;
  logic s_dec_valid, s_allow, s_hlv;
  logic [2:0] s_rule_no;
  pkt_hdr_t s_hdr;
  logic [15:0] s_hdr_len;

  localparam rule_t [2:0] OVL = '{
    allow_from(RDIR_ANY, IP_IPS, PORT_IPS),
    allow_from(RDIR_IN,  IP_IPS, PORT_IPS),
    allow_from(RDIR_OUT, IP_GW_A, PORT_GW)
  };

  filtering_unit dut (.*);
  filtering_unit #(.NUM_RULES(3), .RULES(OVL)) dut_ovl (
    .clk, .rst_n, .clear, .in_valid, .in_data, .in_off, .dir, .eval,
    .hdr_len(o_hdr_len), .hdr_len_valid(o_hlv), .hdr(o_hdr),
    .dec_valid(o_dec_valid), .allow(o_allow), .rule_no(o_rule_no));

  filtering_unit #(.SEQUENTIAL(1'b1)) dut_seq (
    .clk, .rst_n, .clear, .in_valid, .in_data, .in_off, .dir, .eval,
    .hdr_len(s_hdr_len), .hdr_len_valid(s_hlv), .hdr(s_hdr),
    .dec_valid(s_dec_valid), .allow(s_allow), .rule_no(s_rule_no));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic decide(input bq_t f, input dir_e d, input int exp_rule, input string what);
    int seq_wait;
    @(negedge clk); clear = 1; dir = d;
    @(negedge clk); clear = 0;
    for (int i = 0; i < 42; i++) begin
      in_valid = 1; in_data = f[i]; in_off = 16'(i); @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk); eval = 1;
    @(negedge clk); eval = 0;
    checks++;
    if (!dec_valid || allow !== (exp_rule < 7) || int'(rule_no) != exp_rule) begin
      failures++;
      $display("FAIL %s: dec_valid=%0b allow=%0b rule=%0d expected %0d", what, dec_valid,
               allow, rule_no, exp_rule);
    end
    @(negedge clk);
    checks++;
    if (dec_valid) begin failures++; $display("FAIL dec_valid longer than one cycle"); end
    // cascade: decision k + 2 cycles after eval (rule k), 8 for DENY
    seq_wait = 2;
    while (!s_dec_valid && seq_wait < 12) begin @(negedge clk); seq_wait++; end
    checks++;
    if (!s_dec_valid || s_allow !== (exp_rule < 7) || int'(s_rule_no) != exp_rule
        || seq_wait != ((exp_rule < 7) ? exp_rule + 2 : 8)) begin
      failures++;
      $display("FAIL cascade %s: allow=%0b rule=%0d after %0d cycles, expected rule %0d",
               what, s_allow, s_rule_no, seq_wait, exp_rule);
    end
  endtask

  initial begin
    logic [31:0] gw_ip [4] = '{IP_GW_A, IP_GW_B, IP_GW_C, IP_GW_D};
    logic [31:0] dcn_ip [3] = '{IP_IPS, IP_QIAS_N, IP_MDB};
    logic [15:0] dcn_port [3] = '{PORT_IPS, PORT_QIAS_N, PORT_MDB};
    bq_t f;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5; n++) begin
      for (int g = 0; g < 4; g++) begin
        f = build_frame(gw_ip[g], dcn_ip[n % 3], PORT_GW, dcn_port[n % 3], rand_payload(4));
        decide(f, OUTBOUND, g, "gateway outbound");
        decide(f, INBOUND, 7, "gateway address arriving from DCN-I");
        f = build_frame(gw_ip[g], dcn_ip[n % 3], 16'd50001, dcn_port[n % 3], rand_payload(4));
        decide(f, OUTBOUND, 7, "gateway wrong source port");
      end
      for (int s = 0; s < 3; s++) begin
        f = build_frame(dcn_ip[s], gw_ip[n % 4], dcn_port[s], PORT_GW, rand_payload(4));
        decide(f, INBOUND, 4 + s, "DCN-I inbound");
        decide(f, OUTBOUND, 7, "DCN-I address arriving from gateway side");
        f = build_frame(dcn_ip[s], gw_ip[n % 4], dcn_port[s], PORT_GW, rand_payload(4), 5, 8'd6);
        decide(f, INBOUND, 7, "TCP");
        f = build_frame(dcn_ip[s], gw_ip[n % 4], dcn_port[(s + 1) % 3], PORT_GW, rand_payload(4));
        decide(f, INBOUND, 7, "wrong port");
      end
      f = build_frame($urandom, gw_ip[n % 4], 16'($urandom), PORT_GW, rand_payload(4));
      decide(f, INBOUND, 7, "unknown host");
    end
    // overlapping rules: IPS inbound matches rules 1 and 2, rule 1 decides
    f = build_frame(IP_IPS, IP_GW_A, PORT_IPS, PORT_GW, rand_payload(4));
    decide(f, INBOUND, 4, "IPS inbound (default)");
    checks++;
    if (!o_allow || o_rule_no != 2'd1) begin
      failures++; $display("FAIL overlap: rule %0d", o_rule_no);
    end
    decide(f, OUTBOUND, 7, "IPS outbound (default)");
    checks++;
    if (!o_allow || o_rule_no != 2'd2) begin
      failures++; $display("FAIL overlap any-direction: rule %0d", o_rule_no);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
