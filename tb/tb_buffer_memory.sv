// tb_buffer_memory: fills the whole default-size buffer with random bytes,
// reads every address back (one cycle read latency) and checks a write and
// a read of the same address in one cycle returns the old byte.
module tb_buffer_memory;
  localparam int DEPTH = 1514;
  localparam int AW = $clog2(DEPTH);
  int checks = 0, failures = 0;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0;
  logic [7:0] wr_data = 0, rd_data;
  byte unsigned model [DEPTH];

  buffer_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = 8'($urandom); model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); rd_en = 1; rd_addr = AW'(DEPTH - 1 - a);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data !== model[DEPTH - 1 - a]) begin
        failures++;
        $display("FAIL addr %0d: got %h expected %h", DEPTH - 1 - a, rd_data, model[DEPTH-1-a]);
      end
    end
    // same-address read and write
    @(negedge clk);
    wr_en = 1; wr_addr = 5; wr_data = ~model[5]; rd_en = 1; rd_addr = 5;
    @(negedge clk); wr_en = 0; rd_en = 0;
    checks++;
    if (rd_data !== model[5]) begin failures++; $display("FAIL read-before-write"); end
    @(negedge clk); rd_en = 1; rd_addr = 5;
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data !== ~model[5]) begin failures++; $display("FAIL write took no effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
