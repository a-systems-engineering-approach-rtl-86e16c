// tb_dpi_database: the DPI unit with a database of 200 signatures of 3 to
// 7 upper-case bytes (generated by a fixed formula), the scale of a real
// signature set. Random lower-case payloads, about half with one signature
// inserted at a random position, are scanned; the verdict and the reported
// signature are compared with a software search over every alignment.
module tb_dpi_database;
  import tb_pkt_pkg::*;
  localparam int NP = 200, PM = 7;

  // signature i: length 3 + i % 5, byte k = 'A' + (7i + 13k + ik + i/26) mod 26
  function automatic int sig_len(input int i);
    return 3 + i % 5;
  endfunction
  function automatic byte unsigned sig_byte(input int i, input int k);
    return 8'(65 + (7 * i + 13 * k + i * k + i / 26) % 26);
  endfunction
  function automatic logic [NP-1:0][PM*8-1:0] gen_pats();
    logic [NP-1:0][PM*8-1:0] p;
    p = '0;
    for (int i = 0; i < NP; i++)
      for (int k = 0; k < sig_len(i); k++) p[i][8*k +: 8] = sig_byte(i, k);
    return p;
  endfunction
  function automatic logic [NP-1:0][7:0] gen_lens();
    logic [NP-1:0][7:0] l;
    for (int i = 0; i < NP; i++) l[i] = 8'(sig_len(i));
    return l;
  endfunction

  int checks = 0, failures = 0, hits = 0;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_last = 0;
  logic [7:0] in_data = 0;
  logic [15:0] pattern_id;
  logic match_now, malicious, done;

  dpi_unit #(.NUM_PATT(NP), .PATT_MAX(PM), .PATTERNS(gen_pats()), .PATT_LENS(gen_lens())) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_scan(input bq_t p);
    int L;
    bit ok;
    for (int e = 0; e < p.size(); e++)
      for (int i = 0; i < NP; i++) begin
        L = sig_len(i);
        if (e + 1 >= L) begin
          ok = 1;
          for (int k = 0; k < L; k++) if (p[e - L + 1 + k] != sig_byte(i, k)) ok = 0;
          if (ok) return i;
        end
      end
    return -1;
  endfunction

  initial begin
    bq_t p;
    int exp, at, which;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      p = rand_payload($urandom_range(1, 64));
      if ($urandom_range(0, 1)) begin
        at = $urandom_range(0, p.size());
        which = $urandom_range(0, NP - 1);
        for (int k = 0; k < sig_len(which); k++) p.insert(at + k, sig_byte(which, k));
      end
      exp = ref_scan(p);
      if (exp >= 0) hits++;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      foreach (p[i]) begin
        in_valid = 1; in_data = p[i]; in_last = (i == p.size() - 1);
        @(negedge clk);
      end
      in_valid = 0; in_last = 0;
      @(negedge clk);
      checks++;
      if (!done || malicious !== (exp >= 0) || (exp >= 0 && int'(pattern_id) != exp)) begin
        failures++;
        $display("FAIL payload %0d: done=%0b malicious=%0b id=%0d expected %0d", n, done,
                 malicious, pattern_id, exp);
      end
    end
    checks++;
    if (hits < 100) begin failures++; $display("FAIL too few signature hits: %0d", hits); end
    $display("payloads with a signature: %0d of 400", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
