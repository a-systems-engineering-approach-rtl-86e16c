// tb_eth_io_unit: two senders (gateway side, DCN-I side) offer frames with
// random gaps while a stand-in MCU takes them with random back-pressure.
// Checks that frames reach the MCU whole, never interleaved, tagged with
// the right direction, that both sides are served alternately when both
// wait, that transmitted frames leave on the opposite side one cycle later,
// and that drop commands produce a log record, an alert and counts.
module tb_eth_io_unit;
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
  logic mcu_valid, mcu_last, mcu_ready = 0;
  logic [7:0] mcu_data;
  dir_e mcu_dir;
  logic tx_valid = 0, tx_last = 0;
  logic [7:0] tx_data = 0;
  dir_e tx_dir = INBOUND;
  logic cmd_valid = 0, cmd_pass = 0;
  drop_reason_e cmd_reason = DROP_UNAUTHORIZED;
  dir_e cmd_dir = INBOUND;
  pkt_hdr_t cmd_hdr = '0;
  logic [15:0] cmd_pattern_id = 0;
  logic log_valid, alert;
  log_rec_t log_rec;
  stats_t stats;

  eth_io_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- receive direction
  bq_t gw_q[$], dcn_q[$];     // frames offered, in order
  bq_t cur;                   // frame being assembled at the MCU side
  dir_e cur_dir;
  int got_gw = 0, got_dcn = 0, switches = 0, alternations = 0;
  dir_e prev_dir = INBOUND;
  bit gw_busy = 0, dcn_busy = 0;

  task automatic send_gw(input bq_t f);
    foreach (f[i]) begin
      gw_rx_valid = 1; gw_rx_data = f[i]; gw_rx_last = (i == f.size() - 1);
      @(posedge clk); while (!gw_rx_ready) @(posedge clk);
      @(negedge clk);
      gw_rx_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    gw_rx_last = 0;
  endtask

  task automatic send_dcn(input bq_t f);
    foreach (f[i]) begin
      dcn_rx_valid = 1; dcn_rx_data = f[i]; dcn_rx_last = (i == f.size() - 1);
      @(posedge clk); while (!dcn_rx_ready) @(posedge clk);
      @(negedge clk);
      dcn_rx_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    dcn_rx_last = 0;
  endtask

  always @(negedge clk) mcu_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && mcu_valid && mcu_ready) begin
    if (cur.size() == 0) cur_dir = mcu_dir;
    else if (mcu_dir != cur_dir) begin failures++; checks++; $display("FAIL interleaved frames"); end
    cur.push_back(mcu_data);
    if (mcu_last) begin
      bq_t exp;
      checks++;
      if (cur_dir == OUTBOUND) begin exp = gw_q.pop_front(); got_gw++; end
      else begin exp = dcn_q.pop_front(); got_dcn++; end
      if (exp != cur) begin failures++; $display("FAIL frame content (dir %0d)", cur_dir); end
      if (got_gw + got_dcn > 1 && cur_dir != prev_dir) switches++;
      prev_dir = cur_dir;
      cur.delete();
    end
  end

  // ---------------- transmit direction
  bq_t gw_out, dcn_out;
  int gw_last_seen = 0, dcn_last_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (gw_tx_valid)  gw_out.push_back(gw_tx_data);
    if (dcn_tx_valid) dcn_out.push_back(dcn_tx_data);
    if (gw_tx_valid && gw_tx_last) gw_last_seen++;
    if (dcn_tx_valid && dcn_tx_last) dcn_last_seen++;
  end

  initial begin
    bq_t f, g;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // both sides busy at once: 6 frames each
    fork
      for (int n = 0; n < 6; n++) begin
        f = rand_payload($urandom_range(5, 30)); gw_q.push_back(f); send_gw(f);
      end
      for (int n = 0; n < 6; n++) begin
        g = rand_payload($urandom_range(5, 30)); dcn_q.push_back(g); send_dcn(g);
      end
    join
    repeat (10) @(negedge clk);
    chk(got_gw == 6 && got_dcn == 6, $sformatf("frames received gw=%0d dcn=%0d", got_gw, got_dcn));
    chk(switches >= 5, $sformatf("sides alternate (%0d switches)", switches));

    // transmit: inbound frame leaves on the gateway side, outbound on DCN-I
    f = rand_payload(12);
    foreach (f[i]) begin
      @(negedge clk); tx_valid = 1; tx_data = f[i]; tx_last = (i == 11); tx_dir = INBOUND;
    end
    @(negedge clk); tx_valid = 0; tx_last = 0;
    g = rand_payload(9);
    foreach (g[i]) begin
      @(negedge clk); tx_valid = 1; tx_data = g[i]; tx_last = (i == 8); tx_dir = OUTBOUND;
    end
    @(negedge clk); tx_valid = 0; tx_last = 0;
    @(negedge clk);
    chk(gw_out == f && gw_last_seen == 1, $sformatf("inbound frame sent to gateway side (%0d bytes, %0d last)", gw_out.size(), gw_last_seen));
    chk(dcn_out == g && dcn_last_seen == 1, "outbound frame sent to DCN-I side");

    // commands
    @(negedge clk); cmd_valid = 1; cmd_pass = 1; cmd_dir = OUTBOUND;
    @(negedge clk); cmd_dir = INBOUND;
    @(negedge clk); cmd_valid = 0;
    chk(!log_valid && !alert, "no log for a pass");
    chk(stats.pass_out == 1 && stats.pass_in == 1, "pass counters");
    for (int r = 0; r < 3; r++) begin
      @(negedge clk);
      cmd_valid = 1; cmd_pass = 0; cmd_reason = drop_reason_e'(r); cmd_dir = dir_e'(r % 2);
      cmd_hdr = {1'b1, 8'd17, 32'($urandom), 32'($urandom), 16'($urandom), 16'($urandom)};
      cmd_pattern_id = 16'd5;
      @(negedge clk); cmd_valid = 0;
      chk(log_valid && alert, "drop logged and alerted");
      chk(log_rec.reason == drop_reason_e'(r) && log_rec.dir == dir_e'(r % 2)
          && log_rec.hdr == cmd_hdr
          && log_rec.pattern_id == ((r == 1) ? 16'd5 : 16'd0), "log record contents");
      @(negedge clk);
      chk(!log_valid && !alert, "log and alert are single-cycle pulses");
    end
    chk(stats.drop_unauthorized == 1 && stats.drop_malicious == 1 && stats.drop_oversize == 1,
        "drop counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
