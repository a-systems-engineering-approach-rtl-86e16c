// tb_dpi_unit: runs payloads through a three-signature database
// ("STUXNET", "ABC", "XYZW") and compares the verdict and the first
// matching signature with a software search over every byte alignment.
// Also checks that 'done' comes exactly two cycles after the last byte,
// that a signature split across two packets is not reported, and the
// default one-signature database.
module tb_dpi_unit;
  import tb_pkt_pkg::*;
  localparam int NP = 3, PM = 7;
  localparam logic [NP-1:0][PM*8-1:0] PATS = '{
    {24'h0, 32'h57_5A_59_58},                       // 2: "XYZW"
    {32'h0, 24'h43_42_41},                          // 1: "ABC"
    {8'h54, 8'h45, 8'h4E, 8'h58, 8'h55, 8'h54, 8'h53} // 0: "STUXNET"
  };
  localparam logic [NP-1:0][7:0] LENS = '{8'd4, 8'd3, 8'd7};
  localparam string NAMES [NP] = '{"STUXNET", "ABC", "XYZW"};

  int checks = 0, failures = 0;
  int n_exp_hit = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, in_valid = 0, in_last = 0;
  logic [7:0] in_data = 0;
  logic match_now, malicious, done;
  logic [15:0] pattern_id;
  logic d_start = 0, d_valid = 0, d_last = 0, d_match, d_mal, d_done;
  logic [7:0] d_data = 0;
  logic [15:0] d_pid;

  dpi_unit #(.NUM_PATT(NP), .PATT_MAX(PM), .PATTERNS(PATS), .PATT_LENS(LENS)) dut (
    .clk, .rst_n, .start, .in_valid, .in_data, .in_last,
    .match_now, .malicious, .pattern_id, .done);

  // default database: STUXNET only
  dpi_unit dut_def (
    .clk, .rst_n, .start(d_start), .in_valid(d_valid), .in_data(d_data), .in_last(d_last),
    .match_now(d_match), .malicious(d_mal), .pattern_id(d_pid), .done(d_done));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: first end position at which any signature ends, lowest id
  // among those ending there.
  function automatic int ref_scan(input bq_t p);
    int L;
    bit ok;
    for (int e = 0; e < p.size(); e++)
      for (int i = 0; i < NP; i++) begin
        L = NAMES[i].len();
        if (e + 1 >= L) begin
          ok = 1;
          for (int k = 0; k < L; k++) if (p[e - L + 1 + k] != NAMES[i][k]) ok = 0;
          if (ok) return i;
        end
      end
    return -1;
  endfunction

  task automatic run(input bq_t p, input string what);
    int exp, cyc;
    exp = ref_scan(p);
    if (exp >= 0) n_exp_hit++;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    foreach (p[i]) begin
      in_valid = 1; in_data = p[i]; in_last = (i == p.size() - 1);
      @(negedge clk);
      // random gap
      if ($urandom_range(0, 4) == 0 && i != p.size() - 1) begin
        in_valid = 0; @(negedge clk);
      end
    end
    in_valid = 0; in_last = 0;
    cyc = 1;
    while (!done && cyc < 10) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 2) begin failures++; $display("FAIL %s: done after %0d cycles", what, cyc); end
    checks++;
    if (malicious !== (exp >= 0) || (exp >= 0 && int'(pattern_id) != exp)) begin
      failures++;
      $display("FAIL %s: malicious=%0b id=%0d expected %0d", what, malicious, pattern_id, exp);
    end
  endtask

  task automatic run_def(input bq_t p, input bit exp);
    @(negedge clk); d_start = 1;
    @(negedge clk); d_start = 0;
    foreach (p[i]) begin
      d_valid = 1; d_data = p[i]; d_last = (i == p.size() - 1);
      @(negedge clk);
    end
    d_valid = 0; d_last = 0;
    @(negedge clk);
    checks++;
    if (!d_done || d_mal !== exp) begin
      failures++; $display("FAIL default db: done=%0b mal=%0b exp=%0b", d_done, d_mal, exp);
    end
  endtask

  initial begin
    bq_t p;
    int hits = 0;
    int at, which;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(str_bytes("STUXNET"), "exact");
    run(str_bytes("12asNZ@6"), "reference valid data");
    run(str_bytes("xxSTUXNEyy"), "truncated");
    run(str_bytes("qqABCqq"), "ABC middle");
    run(str_bytes("XYZ"), "too short");
    run(str_bytes("XYZWSTUXNETABC"), "two hits, earliest wins");
    run(str_bytes("STUXNETABC"), "STUXNET first");
    run(str_bytes("abSTUXABCNET"), "nested");
    // signature split over two packets must not match
    run(str_bytes("helloSTU"), "split part 1");
    run(str_bytes("XNETbye"), "split part 2");
    for (int n = 0; n < 300; n++) begin
      p = rand_payload($urandom_range(1, 40));
      if ($urandom_range(0, 1)) begin
        at = $urandom_range(0, p.size() - 1);
        which = $urandom_range(0, NP - 1);
        for (int k = 0; k < NAMES[which].len(); k++) p.insert(at + k, NAMES[which][k]);
        hits++;
      end
      run(p, "random");
    end
    run_def(str_bytes("abcSTUXNETdef"), 1'b1);
    run_def(str_bytes("abcSTUXNEdef"), 1'b0);
    run_def(str_bytes("ABC"), 1'b0);
    $display("inserted signatures: %0d, payloads with a hit: %0d", hits, n_exp_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
