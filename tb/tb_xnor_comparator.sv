// tb_xnor_comparator: checks the XNOR equality comparator at 8 and 32 bits
// with equal words, random words and words differing in exactly one bit.
module tb_xnor_comparator;
  int checks = 0, failures = 0;
  logic [7:0]  a8, b8;
  logic [31:0] a32, b32;
  logic        eq8, eq32;

  xnor_comparator #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .eq(eq8));
  xnor_comparator #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .eq(eq32));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
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
    for (int n = 0; n < 256; n++) begin
      a8 = 8'(n); b8 = 8'(n); #1; check(eq8, 1'b1, "eq8 equal");
      b8 = a8 ^ (8'd1 << (n % 8)); #1; check(eq8, 1'b0, "eq8 one bit");
    end
    for (int n = 0; n < 500; n++) begin
      a32 = $urandom; b32 = (n % 3 == 0) ? a32 : $urandom; #1;
      check(eq32, a32 == b32, "eq32 random");
      b32 = a32 ^ (32'd1 << (n % 32)); #1; check(eq32, 1'b0, "eq32 one bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
