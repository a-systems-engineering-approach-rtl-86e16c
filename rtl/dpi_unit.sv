// dpi_unit: deep packet inspection of allowed inbound payloads.
//
// The payload of a packet that passed header filtering is streamed in one
// byte per cycle. A payload extractor (FIFO window) presents every byte
// alignment to NUM_PATT pattern matchers that run in parallel, one per
// signature of the database; their flags are ORed into the DPI decision.
// A match at any alignment makes the packet malicious. This structure is
// the design's; the sticky verdict, the first-match pattern id and the
// start/last/done handshake are this design's choices.
//
// Database: signature i has PATT_LENS[i] bytes (1..PATT_MAX), byte k of it
// in PATTERNS[i][8k+7:8k]. The default database is the single 7-byte
// signature "STUXNET".
//
// Timing: pulse 'start' once before the first byte; then bytes with
// in_valid, the final one also with in_last. 'done' pulses two cycles after
// the last byte was presented, and 'malicious' / 'pattern_id' are final in
// that cycle and hold until the next 'start'. 'match_now' is the ORed flag
// of the current window (the combinational DPI decision).
module dpi_unit #(
  parameter int unsigned NUM_PATT = sc_pkg::NUM_PATTERNS,
  parameter int unsigned PATT_MAX = sc_pkg::PATT_MAX_BYTES,
  parameter logic [NUM_PATT-1:0][PATT_MAX*8-1:0] PATTERNS  = sc_pkg::DEFAULT_PATTERNS,
  parameter logic [NUM_PATT-1:0][7:0]            PATT_LENS = sc_pkg::DEFAULT_PATT_LENS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       match_now,
  output logic       malicious,
  output logic [15:0] pattern_id,
  output logic       done
);
  localparam int unsigned FW = $clog2(PATT_MAX + 1);

  logic [PATT_MAX*8-1:0] window;
  logic [FW-1:0]         fill;
  logic [NUM_PATT-1:0]   hit;
  logic                  last_q;
  logic [15:0]           first_hit;

  payload_extractor #(.WIN(PATT_MAX)) u_extract (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .in_valid (in_valid),
    .in_data  (in_data),
    .window   (window),
    .fill     (fill)
  );

  for (genvar i = 0; i < NUM_PATT; i++) begin : g_patt
    localparam int unsigned L = int'(PATT_LENS[i]);
    logic [L*8-1:0] cand;
    // Candidate byte k (k = 0 oldest) is the window byte received L-1-k ago.
    for (genvar k = 0; k < L; k++) begin : g_map
      assign cand[8*k +: 8] = window[8*(L-1-k) +: 8];
    end
    pattern_matcher #(
      .LEN     (L),
      .PATTERN (PATTERNS[i][L*8-1:0])
    ) u_match (
      .cand       (cand),
      .enable     (fill >= FW'(L)),
      .match_flag (hit[i])
    );
  end

  assign match_now = |hit;

  always_comb begin
    first_hit = '0;
    for (int i = NUM_PATT - 1; i >= 0; i--) begin
      if (hit[i]) first_hit = 16'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      malicious  <= 1'b0;
      pattern_id <= '0;
      last_q     <= 1'b0;
      done       <= 1'b0;
    end else if (start) begin
      malicious  <= 1'b0;
      pattern_id <= '0;
      last_q     <= 1'b0;
      done       <= 1'b0;
    end else begin
      last_q <= in_valid & in_last;
      done   <= last_q;
      if (match_now && !malicious) begin
        malicious  <= 1'b1;
        pattern_id <= first_hit;
      end
    end
  end

  // At most 65536 signatures; each must fit the window and be at least one
  // byte long.
  if (NUM_PATT == 0 || NUM_PATT > 65536) begin : g_bad_num
    $error("dpi_unit: NUM_PATT out of range");
  end
  for (genvar i = 0; i < NUM_PATT; i++) begin : g_chk
    if (int'(PATT_LENS[i]) == 0 || int'(PATT_LENS[i]) > int'(PATT_MAX)) begin : g_bad
      $error("dpi_unit: pattern length out of range");
    end
  end
endmodule
