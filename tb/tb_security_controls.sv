// tb_security_controls: end-to-end test of the security perimeter at its
// default parameters (1514-byte buffer, seven ALLOW rules, "STUXNET"
// signature).
//
// Traffic from every system of the deployment, from unknown hosts, on wrong
// ports, with a non-UDP protocol, with the signature at random byte
// alignments, with empty payloads, at full Ethernet size and oversize, is
// offered on both sides, first one frame at a time and then on both sides
// at once. A reference model decides each frame's fate: passed frames must
// come out unchanged, in order, on the opposite side; dropped frames must
// produce a log record with the right reason and source, and an alert.
// The latency of an isolated pass is checked against the sequencing
// (42 header reads + 3 + payload + 3 + frame length + 1 output register).
// Each mechanism (outbound pass, inbound pass after DPI, default-DENY drop,
// signature drop, oversize drop, outbound frame carrying the signature
// passing uninspected, empty-payload pass, both sides waiting) is counted
// and must occur.
module tb_security_controls;
  import sc_pkg::*;
  import tb_pkt_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic gw_rx_valid = 0, gw_rx_last = 0, gw_rx_ready;
  logic [7:0] gw_rx_data = 0;
  logic gw_tx_valid, gw_tx_last;
  logic [7:0] gw_tx_data;
  logic dcn_rx_valid = 0, dcn_rx_last = 0, dcn_rx_ready;
  logic [7:0] dcn_rx_data = 0;
  logic dcn_tx_valid, dcn_tx_last;
  logic [7:0] dcn_tx_data;
  logic log_valid, alert;
  log_rec_t log_rec;
  stats_t stats;

  security_controls dut (.*);

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ reference
  typedef struct {
    bq_t          frame;
    bit           pass;
    drop_reason_e reason;
    logic [31:0]  src_ip;
  } exp_t;

  exp_t exp_out[2][$];   // per arrival side (dir_e value)
  exp_t exp_drop[2][$];

  int n_pass_out, n_pass_in, n_unauth, n_mal, n_over, n_sig_outbound, n_empty, n_both_wait;

  function automatic bit has_sig(input bq_t p);
    string s = "STUXNET";
    bit ok;
    for (int e = 6; e < p.size(); e++) begin
      ok = 1;
      for (int k = 0; k < 7; k++) if (p[e - 6 + k] != s[k]) ok = 0;
      if (ok) return 1;
    end
    return 0;
  endfunction

  function automatic bit rule_allows(input dir_e d, input logic [31:0] sip,
                                     input logic [15:0] sp, input byte unsigned proto);
    if (proto != 8'd17) return 0;
    if (d == OUTBOUND)
      return sp == PORT_GW && (sip == IP_GW_A || sip == IP_GW_B || sip == IP_GW_C || sip == IP_GW_D);
    return (sip == IP_IPS && sp == PORT_IPS) || (sip == IP_QIAS_N && sp == PORT_QIAS_N)
        || (sip == IP_MDB && sp == PORT_MDB);
  endfunction

  function automatic exp_t model(input dir_e d, input bq_t f, input logic [31:0] sip,
                                 input logic [15:0] sp, input byte unsigned proto, input bq_t pay);
    exp_t e;
    e.frame = f; e.src_ip = sip; e.pass = 0; e.reason = DROP_UNAUTHORIZED;
    if (f.size() > 1514)                      e.reason = DROP_OVERSIZE;
    else if (!rule_allows(d, sip, sp, proto)) e.reason = DROP_UNAUTHORIZED;
    else if (d == INBOUND && has_sig(pay))    e.reason = DROP_MALICIOUS;
    else                                      e.pass = 1;
    return e;
  endfunction

  // ------------------------------------------------------------ stimulus
  logic [31:0] gw_ip [4] = '{IP_GW_A, IP_GW_B, IP_GW_C, IP_GW_D};
  logic [31:0] dcn_ip [3] = '{IP_IPS, IP_QIAS_N, IP_MDB};
  logic [15:0] dcn_port [3] = '{PORT_IPS, PORT_QIAS_N, PORT_MDB};

  // kind: 0 legit clean, 1 legit + signature, 2 unknown host, 3 wrong port,
  //       4 TCP, 5 legit empty payload
  task automatic make(input dir_e d, input int kind, input int plen, output bq_t f, output exp_t e);
    logic [31:0] sip, dip;
    logic [15:0] sp, dp;
    byte unsigned proto;
    bq_t pay, sig;
    int g, s, at;
    proto = 8'd17;
    g = $urandom_range(0, 3);
    s = $urandom_range(0, 2);
    if (d == OUTBOUND) begin sip = gw_ip[g]; sp = PORT_GW; dip = dcn_ip[s]; dp = dcn_port[s]; end
    else begin sip = dcn_ip[s]; sp = dcn_port[s]; dip = gw_ip[g]; dp = PORT_GW; end
    pay = rand_payload(kind == 5 ? 0 : plen);
    if (kind == 1) begin
      at = $urandom_range(0, pay.size());
      sig = str_bytes("STUXNET");
      foreach (sig[k]) pay.insert(at + k, sig[k]);
    end
    if (kind == 2) sip = {8'd172, 8'd16, 8'($urandom), 8'($urandom)};
    if (kind == 3) sp = sp + 16'd7;
    if (kind == 4) proto = 8'd6;
    f = build_frame(sip, dip, sp, dp, pay, 5, proto);
    e = model(d, f, sip, sp, proto, pay);
    if (d == OUTBOUND && kind == 1 && e.pass) n_sig_outbound++;
    if (kind == 5 && e.pass && d == INBOUND) n_empty++;
  endtask

  task automatic send(input dir_e d, input bq_t f, input bit gaps);
    foreach (f[i]) begin
      if (d == OUTBOUND) begin
        gw_rx_valid = 1; gw_rx_data = f[i]; gw_rx_last = (i == f.size() - 1);
        @(posedge clk); while (!gw_rx_ready) @(posedge clk);
        @(negedge clk); gw_rx_valid = 0; gw_rx_last = 0;
      end else begin
        dcn_rx_valid = 1; dcn_rx_data = f[i]; dcn_rx_last = (i == f.size() - 1);
        @(posedge clk); while (!dcn_rx_ready) @(posedge clk);
        @(negedge clk); dcn_rx_valid = 0; dcn_rx_last = 0;
      end
      if (gaps && $urandom_range(0, 7) == 0) @(negedge clk);
    end
  endtask

  task automatic offer(input dir_e d, input int kind, input int plen, input bit gaps);
    bq_t f;
    exp_t e;
    make(d, kind, plen, f, e);
    if (e.pass) exp_out[d].push_back(e);
    else        exp_drop[d].push_back(e);
    send(d, f, gaps);
  endtask

  // ------------------------------------------------------------ observers
  bq_t cur_gw, cur_dcn;
  int last_tx_cycle;
  always @(posedge clk) if (rst_n) begin
    if (gw_rx_valid && dcn_rx_valid) n_both_wait++;
    if (gw_tx_valid) begin
      cur_gw.push_back(gw_tx_data);
      if (gw_tx_last) begin
        exp_t e;
        last_tx_cycle = cyc;
        checks++;
        if (exp_out[INBOUND].size() == 0) begin failures++; $display("FAIL unexpected frame to gateways"); end
        else begin
          e = exp_out[INBOUND].pop_front();
          if (e.frame != cur_gw) begin failures++; $display("FAIL frame to gateways differs"); end
          n_pass_in++;
        end
        cur_gw.delete();
      end
    end
    if (dcn_tx_valid) begin
      cur_dcn.push_back(dcn_tx_data);
      if (dcn_tx_last) begin
        exp_t e;
        last_tx_cycle = cyc;
        checks++;
        if (exp_out[OUTBOUND].size() == 0) begin failures++; $display("FAIL unexpected frame to DCN-I"); end
        else begin
          e = exp_out[OUTBOUND].pop_front();
          if (e.frame != cur_dcn) begin failures++; $display("FAIL frame to DCN-I differs"); end
          n_pass_out++;
        end
        cur_dcn.delete();
      end
    end
    if (log_valid) begin
      exp_t e;
      checks++;
      if (!alert) begin failures++; $display("FAIL drop without alert"); end
      if (exp_drop[log_rec.dir].size() == 0) begin failures++; $display("FAIL unexpected drop"); end
      else begin
        e = exp_drop[log_rec.dir].pop_front();
        if (e.reason != log_rec.reason
            || (e.reason != DROP_OVERSIZE && e.src_ip != log_rec.hdr.src_ip)) begin
          failures++;
          $display("FAIL drop record: reason %0d expected %0d", log_rec.reason, e.reason);
        end
        unique case (log_rec.reason)
          DROP_UNAUTHORIZED: n_unauth++;
          DROP_MALICIOUS:    n_mal++;
          default:           n_over++;
        endcase
      end
    end
  end

  task automatic drain();
    int t = 0;
    while ((exp_out[0].size() + exp_out[1].size() + exp_drop[0].size() + exp_drop[1].size()) != 0
           && t < 20000) begin
      @(negedge clk); t++;
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int t0, plen;
    bq_t f;
    exp_t e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // isolated inbound clean frame: latency
    plen = 30;
    make(INBOUND, 0, plen, f, e);
    exp_out[INBOUND].push_back(e);
    send(INBOUND, f, 0);
    t0 = cyc;
    drain();
    chk(last_tx_cycle - t0 == 42 + 3 + plen + 3 + f.size() + 1,
        $sformatf("inbound pass latency %0d cycles", last_tx_cycle - t0));
    // isolated outbound frame: no DPI stage
    make(OUTBOUND, 0, plen, f, e);
    exp_out[OUTBOUND].push_back(e);
    send(OUTBOUND, f, 0);
    t0 = cyc;
    drain();
    chk(last_tx_cycle - t0 == 42 + 3 + f.size() + 1,
        $sformatf("outbound pass latency %0d cycles", last_tx_cycle - t0));

    // one of each kind on each side, one at a time
    for (int k = 0; k <= 5; k++) begin
      offer(INBOUND, k, $urandom_range(1, 80), 1);  drain();
      offer(OUTBOUND, k, $urandom_range(1, 80), 1); drain();
    end

    // both sides at once, random mix
    fork
      for (int n = 0; n < 40; n++) offer(OUTBOUND, $urandom_range(0, 5), $urandom_range(1, 120), 1);
      for (int n = 0; n < 40; n++) offer(INBOUND, $urandom_range(0, 5), $urandom_range(1, 120), 1);
    join
    drain();

    // full-size frames and an oversize one
    offer(INBOUND, 0, 1514 - 42, 0);      drain();
    offer(INBOUND, 1, 1514 - 42 - 7, 0);  drain();
    offer(OUTBOUND, 0, 1514 - 42, 0);     drain();
    begin
      make(INBOUND, 0, 1600, f, e);
      exp_drop[INBOUND].push_back(e);
      send(INBOUND, f, 0);
      drain();
    end
    offer(INBOUND, 0, 10, 0); drain();

    chk(exp_out[0].size() + exp_out[1].size() + exp_drop[0].size() + exp_drop[1].size() == 0,
        "every frame accounted for");
    chk(stats.pass_out == 32'(n_pass_out) && stats.pass_in == 32'(n_pass_in)
        && stats.drop_unauthorized == 32'(n_unauth) && stats.drop_malicious == 32'(n_mal)
        && stats.drop_oversize == 32'(n_over), "counters agree with observed traffic");
    $display("mechanisms: pass_out=%0d pass_in=%0d deny=%0d signature=%0d oversize=%0d",
             n_pass_out, n_pass_in, n_unauth, n_mal, n_over);
    $display("            outbound-with-signature passed=%0d empty-inbound passed=%0d both-waiting=%0d",
             n_sig_outbound, n_empty, n_both_wait);
    chk(n_pass_out > 0, "outbound pass happened");
    chk(n_pass_in > 0, "inbound pass after DPI happened");
    chk(n_unauth > 0, "default DENY drop happened");
    chk(n_mal > 0, "signature drop happened");
    chk(n_over > 0, "oversize drop happened");
    chk(n_sig_outbound > 0, "outbound frame with signature passed uninspected");
    chk(n_empty > 0, "inbound empty payload passed");
    chk(n_both_wait > 0, "both sides waiting at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
