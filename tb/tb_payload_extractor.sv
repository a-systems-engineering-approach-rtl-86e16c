// tb_payload_extractor: pushes random bytes with random gaps and compares
// the window and fill count with a queue model after every cycle; 'start'
// must empty the window.
module tb_payload_extractor;
  localparam int WIN = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic [7:0] in_data = 0;
  logic [WIN*8-1:0] window;
  logic [$clog2(WIN+1)-1:0] fill;
  byte unsigned hist[$];

  payload_extractor #(.WIN(WIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic [WIN*8-1:0] exp_w;
    int exp_f;
    exp_w = '0;
    exp_f = (hist.size() > WIN) ? WIN : hist.size();
    for (int j = 0; j < WIN && j < hist.size(); j++)
      exp_w[8*j +: 8] = hist[hist.size() - 1 - j];
    checks++;
    if (window !== exp_w || int'(fill) != exp_f) begin
      failures++;
      $display("FAIL window=%h exp=%h fill=%0d exp=%0d", window, exp_w, fill, exp_f);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 20; pkt++) begin
      @(negedge clk); start = 1; in_valid = 0;
      @(negedge clk); start = 0;
      hist.delete();
      compare();
      for (int n = 0; n < 3 + pkt; n++) begin
        in_valid = ($urandom_range(0, 3) != 0);
        in_data  = 8'($urandom);
        @(posedge clk);
        if (in_valid) hist.push_back(in_data);
        #1 compare();
        @(negedge clk);
      end
      in_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
