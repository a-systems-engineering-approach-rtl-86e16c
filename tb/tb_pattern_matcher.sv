// tb_pattern_matcher: checks the 7-byte "STUXNET" matcher with the matched
// and unmatched vectors of the reference schematic simulation, with every
// single-byte corruption of the pattern, with the enable gate and with
// random candidates.
module tb_pattern_matcher;
  int checks = 0, failures = 0;
  logic [55:0] cand;
  logic        enable, match_flag;
  // pattern bytes in wire order: S T U X N E T
  localparam byte unsigned PAT [7] = '{8'h53, 8'h54, 8'h55, 8'h58, 8'h4E, 8'h45, 8'h54};
  // non-matching input bytes of the reference simulation
  localparam byte unsigned VALID_IN [7] = '{8'h31, 8'h32, 8'h61, 8'h73, 8'h5A, 8'h40, 8'h36};

  pattern_matcher dut (.cand(cand), .enable(enable), .match_flag(match_flag));

  task automatic check(input logic exp, input string what);
    #1;
    checks++;
    if (match_flag !== exp) begin
      failures++;
      $display("FAIL %s: cand=%h got %0b expected %0b", what, cand, match_flag, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 1'b1;
    for (int k = 0; k < 7; k++) cand[8*k +: 8] = PAT[k];
    check(1'b1, "malicious vector");
    enable = 1'b0; check(1'b0, "disabled");
    enable = 1'b1;
    for (int k = 0; k < 7; k++) cand[8*k +: 8] = VALID_IN[k];
    check(1'b0, "valid vector");
    // reversed byte order must not match
    for (int k = 0; k < 7; k++) cand[8*k +: 8] = PAT[6-k];
    check(1'b0, "reversed");
    for (int k = 0; k < 7; k++) begin
      for (int b = 0; b < 8; b++) begin
        for (int j = 0; j < 7; j++) cand[8*j +: 8] = PAT[j];
        cand[8*k + b] = ~cand[8*k + b];
        check(1'b0, "one bit flipped");
      end
    end
    for (int n = 0; n < 200; n++) begin
      cand = {$urandom, $urandom};
      check(1'b0, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
