// tb_memory_controller: drives the MCU sequencer with a real buffer memory
// and behavioural stand-ins for the filtering unit (decision given by the
// scenario, 1 to 8 cycles after 'eval' as with either rule evaluation
// order; payload offset 42 known one cycle after
// the IHL byte) and for the DPI unit (verdict given by the scenario, done
// two cycles after the last payload byte). For every scenario it checks
// the header bytes and offsets read, the payload bytes sent to DPI, the
// transmitted frame, the command and drop reason, and the cycle at which
// the command comes.
module tb_memory_controller;
  import sc_pkg::*;
  import tb_pkt_pkg::*;
  localparam int DEPTH = 1514;
  localparam int AW = $clog2(DEPTH);
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, in_ready;
  logic [7:0] in_data = 0;
  dir_e in_dir = INBOUND;
  logic buf_wr_en, buf_rd_en;
  logic [AW-1:0] buf_wr_addr, buf_rd_addr;
  logic [7:0] buf_wr_data, buf_rd_data;
  logic flt_clear, flt_valid, flt_eval;
  logic [7:0] flt_data;
  logic [15:0] flt_off;
  dir_e pkt_dir;
  logic [15:0] hdr_len = 16'd42;
  logic hdr_len_valid = 0, dec_valid = 0, dec_allow = 0;
  logic dpi_start, dpi_valid, dpi_last, dpi_done = 0, dpi_malicious = 0;
  logic [7:0] dpi_data;
  logic tx_valid, tx_last;
  logic [7:0] tx_data;
  dir_e tx_dir;
  logic cmd_valid, cmd_pass;
  drop_reason_e cmd_reason;

  memory_controller #(.DEPTH(DEPTH)) dut (.*);
  buffer_memory #(.DEPTH(DEPTH)) u_buf (
    .clk, .wr_en(buf_wr_en), .wr_addr(buf_wr_addr), .wr_data(buf_wr_data),
    .rd_en(buf_rd_en), .rd_addr(buf_rd_addr), .rd_data(buf_rd_data));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scenario knobs read by the stand-ins
  bit sc_allow, sc_mal;
  int sc_lat;           // filter decision latency in cycles (1 = parallel rules)
  int lat_cnt = 0;
  // observations
  bq_t got_hdr, got_pay, got_tx;
  int  hdr_off_err, dpi_starts, cmd_cycle, cyc, last_tx_ok;
  bit  got_cmd, got_pass;
  drop_reason_e got_reason;
  int  dpi_last_cnt;

  // filtering-unit and DPI-unit stand-ins, observers
  int done_cnt;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (flt_clear) hdr_len_valid <= 0;
    if (flt_valid) begin
      if (int'(flt_off) != got_hdr.size()) hdr_off_err++;
      got_hdr.push_back(flt_data);
      if (flt_off == 16'd14) hdr_len_valid <= 1;
    end
    dec_valid <= 0;
    if (flt_eval) lat_cnt <= sc_lat;
    else if (lat_cnt > 0) lat_cnt <= lat_cnt - 1;
    if ((flt_eval && sc_lat == 1) || lat_cnt == 2) begin dec_valid <= 1; dec_allow <= sc_allow; end
    if (dpi_start) begin dpi_starts++; dpi_malicious <= 0; end
    if (dpi_valid) got_pay.push_back(dpi_data);
    dpi_done <= 0;
    if (done_cnt > 0) begin
      done_cnt <= done_cnt - 1;
      if (done_cnt == 1) begin dpi_done <= 1; dpi_malicious <= sc_mal; end
    end
    if (dpi_valid && dpi_last) begin dpi_last_cnt++; done_cnt <= 1; end
    if (tx_valid) begin
      got_tx.push_back(tx_data);
      if (tx_dir != pkt_dir) last_tx_ok = 0;
    end
    if (cmd_valid && !got_cmd) begin
      got_cmd <= 1; got_pass <= cmd_pass; got_reason <= cmd_reason; cmd_cycle <= cyc;
    end
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic scenario(input dir_e d, input bit allow, input bit mal, input int plen,
                          input string what);
    bq_t f, pay;
    int t_last, exp_cmd, n;
    bit exp_pass, oversize, do_dpi;
    drop_reason_e exp_reason;
    pay = rand_payload(plen);
    f = build_frame($urandom, $urandom, 16'($urandom), 16'($urandom), pay);
    n = f.size();
    oversize = (n > DEPTH);
    sc_allow = allow; sc_mal = mal;
    sc_lat = ($urandom_range(0, 1) == 0) ? 1 : $urandom_range(2, 8);
    got_hdr.delete(); got_pay.delete(); got_tx.delete();
    hdr_off_err = 0; dpi_starts = 0; dpi_last_cnt = 0; last_tx_ok = 1;
    got_cmd = 0;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      in_valid = 1; in_data = f[i]; in_last = (i == n - 1); in_dir = d;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (i == n - 1) t_last = cyc;
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin in_valid = 0; in_last = 0; @(negedge clk); end
    end
    in_valid = 0; in_last = 0;
    while (!got_cmd) @(negedge clk);
    repeat (3) @(negedge clk);
    do_dpi = !oversize && allow && d == INBOUND && plen > 0;
    if (oversize)            begin exp_pass = 0; exp_reason = DROP_OVERSIZE; end
    else if (!allow)         begin exp_pass = 0; exp_reason = DROP_UNAUTHORIZED; end
    else if (do_dpi && mal)  begin exp_pass = 0; exp_reason = DROP_MALICIOUS; end
    else                           exp_pass = 1;
    // command cycle, counted from the first cycle after the last byte
    if (oversize) exp_cmd = 1;
    else begin
      exp_cmd = 42 + 1 + 1 + sc_lat + (do_dpi ? plen + 3 : 0) + (exp_pass ? n : 0);
    end
    chk(got_pass == exp_pass, {what, ": pass/drop"});
    if (!exp_pass) chk(got_reason == exp_reason, {what, ": drop reason"});
    chk(cmd_cycle - t_last - 1 == exp_cmd,
        $sformatf("%s: command at cycle %0d, expected %0d", what, cmd_cycle - t_last - 1, exp_cmd));
    if (!oversize) begin
      chk(got_hdr.size() == 42 && hdr_off_err == 0, {what, ": header bytes read"});
      for (int i = 0; i < 42 && i < got_hdr.size(); i++)
        if (got_hdr[i] != f[i]) begin chk(0, {what, ": header data"}); break; end
    end else chk(got_hdr.size() == 0, {what, ": no header read of oversize frame"});
    chk(dpi_starts == int'(do_dpi), {what, ": DPI run only for allowed inbound payloads"});
    if (do_dpi) chk(got_pay == pay && dpi_last_cnt == 1, {what, ": payload to DPI"});
    if (exp_pass) chk(got_tx == f && last_tx_ok == 1, {what, ": transmitted frame"});
    else          chk(got_tx.size() == 0, {what, ": nothing transmitted"});
  endtask

  initial begin
    cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      scenario(OUTBOUND, 1, 0, $urandom_range(0, 60), "outbound allowed");
      scenario(OUTBOUND, 1, 1, $urandom_range(1, 60), "outbound allowed, DPI not run");
      scenario(OUTBOUND, 0, 0, $urandom_range(0, 60), "outbound denied");
      scenario(INBOUND,  1, 0, $urandom_range(1, 60), "inbound clean");
      scenario(INBOUND,  1, 1, $urandom_range(1, 60), "inbound malicious");
      scenario(INBOUND,  0, 1, $urandom_range(1, 60), "inbound denied");
    end
    scenario(INBOUND, 1, 0, 0, "inbound empty payload");
    scenario(INBOUND, 1, 0, DEPTH - 42, "inbound full-size frame");
    scenario(INBOUND, 1, 0, DEPTH - 41, "inbound oversize frame");
    scenario(OUTBOUND, 1, 0, 20, "after oversize");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
