// buffer_memory: the MCU packet buffer.
//
// Holds one Ethernet frame while it is filtered and inspected. One write
// port (the Ethernet I/O unit's receive stream, addressed by the memory
// controller) and one synchronous read port shared, under the memory
// controller's sequencing, by the header extractor, the payload extractor
// and the transmit path. DEPTH defaults to 1514 bytes, the largest
// Ethernet II frame without FCS; the size and the single-port arrangement
// are this design's choices.
//
// Timing: write on the rising edge when wr_en. Read data appears on rd_data
// the cycle after rd_en (read-before-write on the same address).
module buffer_memory #(
  parameter int unsigned DEPTH = 1514,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [7:0]    wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [7:0]    rd_data
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
