// tb_header_extractor: streams frames with IHL 5..8 (byte-by-byte, random
// gaps) and checks the captured IP addresses, ports, protocol, the payload
// offset and the 'ok' flag; non-IPv4 EtherType, IPv4 version 6 and frames
// cut inside the UDP header must give ok = 0.
module tb_header_extractor;
  import sc_pkg::*;
  import tb_pkt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [7:0] in_data = 0;
  logic [15:0] in_off = 0;
  pkt_hdr_t hdr;
  logic [15:0] hdr_len;
  logic hdr_len_valid;

  header_extractor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(input bq_t f, input int upto);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int i = 0; i < upto && i < f.size(); i++) begin
      in_valid = 1; in_data = f[i]; in_off = 16'(i);
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0;
    @(negedge clk);
  endtask

  initial begin
    bq_t f;
    logic [31:0] sip, dip;
    logic [15:0] sp, dp;
    int ihl;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      sip = $urandom; dip = $urandom; sp = 16'($urandom); dp = 16'($urandom);
      ihl = $urandom_range(5, 8);
      f = build_frame(sip, dip, sp, dp, rand_payload($urandom_range(0, 20)), ihl);
      feed(f, f.size());
      checks++;
      if (!hdr.ok || hdr.src_ip !== sip || hdr.dst_ip !== dip || hdr.src_port !== sp
          || hdr.dst_port !== dp || hdr.proto !== 8'd17 || !hdr_len_valid
          || int'(hdr_len) != 14 + 4 * ihl + 8) begin
        failures++;
        $display("FAIL ihl=%0d: ok=%0b %h %h %h %h len=%0d", ihl, hdr.ok, hdr.src_ip,
                 hdr.dst_ip, hdr.src_port, hdr.dst_port, hdr_len);
      end
      // cut inside the UDP header
      feed(f, 14 + 4 * ihl + $urandom_range(0, 7));
      checks++;
      if (hdr.ok) begin failures++; $display("FAIL truncated frame accepted"); end
    end
    f = build_frame(1, 2, 3, 4, rand_payload(4), 5, 8'd17, 16'h86DD);
    feed(f, f.size());
    checks++;
    if (hdr.ok) begin failures++; $display("FAIL non-IPv4 EtherType accepted"); end
    f = build_frame(1, 2, 3, 4, rand_payload(4));
    f[14] = 8'h65;
    feed(f, f.size());
    checks++;
    if (hdr.ok) begin failures++; $display("FAIL IP version 6 accepted"); end
    f = build_frame(1, 2, 3, 4, rand_payload(4), 5, 8'd6);
    feed(f, f.size());
    checks++;
    if (!hdr.ok || hdr.proto !== 8'd6) begin failures++; $display("FAIL protocol capture"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
