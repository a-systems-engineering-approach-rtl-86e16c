// payload_extractor: first-in-first-out window over the packet payload.
//
// The memory controller streams the payload out of the buffer one byte per
// cycle. Each accepted byte is shifted into a WIN-byte shift register, so
// that after every byte the window holds the newest WIN bytes and every
// byte alignment of the payload is presented to the pattern matchers once.
// 'fill' counts the bytes of the current payload (saturating at WIN) so
// that a matcher of length L is enabled only when L real bytes are present.
// Shifting byte by byte follows the design; the window width, the fill
// counter and the 'start' clear are this design's choices.
//
// Timing: a byte presented with in_valid at edge t is visible in 'window'
// from cycle t+1. 'start' (synchronous) empties the window.
//
//   window : byte j (bits [8j+7:8j]) is the byte received j bytes ago
//   fill   : number of valid bytes in the window, 0..WIN
module payload_extractor #(
  parameter int unsigned WIN = 7
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     in_valid,
  input  logic [7:0]               in_data,
  output logic [WIN*8-1:0]         window,
  output logic [$clog2(WIN+1)-1:0] fill
);
  localparam int unsigned FW = $clog2(WIN + 1);

  logic [WIN*8-1:0] shifted;
  assign shifted = (window << 8) | (WIN*8)'(in_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      window <= '0;
      fill   <= '0;
    end else if (start) begin
      window <= '0;
      fill   <= '0;
    end else if (in_valid) begin
      window <= shifted;
      if (fill != FW'(WIN)) fill <= fill + 1'b1;
    end
  end
endmodule
