// filtering_unit: static header filtering of every packet.
//
// The packet header extractor captures the IPv4/UDP header fields from the
// buffer stream; NUM_RULES rule blocks, one per ALLOW rule of the static
// ruleset, compare them, and the ORed flags give the filtering decision.
// The ruleset is ordered: the lowest-numbered matching rule decides. When
// no ALLOW rule matches, the default DENY rule applies and the memory
// controller drops the packet.
//
// The design describes the rules both as parallel blocks feeding one OR
// gate and as a cascade executed one rule after the other, stopping at the
// first match. Both are provided:
//   SEQUENTIAL = 0 (default): all rules at once; a priority encoder picks
//     the lowest-numbered match. Decision one cycle after 'eval'.
//   SEQUENTIAL = 1: rule 0 is tried in the cycle after 'eval', then rule 1,
//     and so on; the first match ends the walk. Decision k + 2 cycles after
//     'eval' when rule k matches, NUM_RULES + 1 cycles for the default DENY.
// Both give the same decision for every header.
//
// Timing: stream the header bytes (see header_extractor), then pulse
// 'eval'; 'dec_valid' pulses with 'allow' and 'rule_no' (NUM_RULES = the
// default DENY rule), which hold until the next decision. 'hdr' is the
// extracted header.
module filtering_unit #(
  parameter int unsigned OFF_W     = 16,
  parameter int unsigned NUM_RULES = sc_pkg::NUM_ALLOW_RULES,
  parameter sc_pkg::rule_t [NUM_RULES-1:0] RULES = sc_pkg::DEFAULT_RULES,
  parameter bit          SEQUENTIAL = 1'b0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      in_valid,
  input  logic [7:0]                in_data,
  input  logic [OFF_W-1:0]          in_off,
  input  sc_pkg::dir_e              dir,
  input  logic                      eval,
  output logic [OFF_W-1:0]          hdr_len,
  output logic                      hdr_len_valid,
  output sc_pkg::pkt_hdr_t          hdr,
  output logic                      dec_valid,
  output logic                      allow,
  output logic [$clog2(NUM_RULES+1)-1:0] rule_no
);
  import sc_pkg::*;
  localparam int unsigned RW = $clog2(NUM_RULES + 1);

  logic [NUM_RULES-1:0] rule_match;
  logic [RW-1:0]        first;

  header_extractor #(.OFF_W(OFF_W)) u_hdr (
    .clk           (clk),
    .rst_n         (rst_n),
    .clear         (clear),
    .in_valid      (in_valid),
    .in_data       (in_data),
    .in_off        (in_off),
    .hdr           (hdr),
    .hdr_len       (hdr_len),
    .hdr_len_valid (hdr_len_valid)
  );

  for (genvar r = 0; r < NUM_RULES; r++) begin : g_rule
    rule_block #(.RULE(RULES[r])) u_rule (
      .hdr   (hdr),
      .dir   (dir),
      .match (rule_match[r])
    );
  end

  // First matching rule; NUM_RULES stands for the default DENY rule.
  always_comb begin
    first = RW'(NUM_RULES);
    for (int r = NUM_RULES - 1; r >= 0; r--) begin
      if (rule_match[r]) first = RW'(r);
    end
  end

  if (!SEQUENTIAL) begin : g_parallel
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dec_valid <= 1'b0;
        allow     <= 1'b0;
        rule_no   <= '0;
      end else begin
        dec_valid <= eval;
        if (eval) begin
          allow   <= |rule_match;
          rule_no <= first;
        end
      end
    end
  end else begin : g_cascade
    logic          busy;
    logic [RW-1:0] idx;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy      <= 1'b0;
        idx       <= '0;
        dec_valid <= 1'b0;
        allow     <= 1'b0;
        rule_no   <= '0;
      end else begin
        dec_valid <= 1'b0;
        if (eval) begin
          busy <= 1'b1;
          idx  <= '0;
        end else if (busy) begin
          if (rule_match[idx]) begin
            busy      <= 1'b0;
            dec_valid <= 1'b1;
            allow     <= 1'b1;
            rule_no   <= idx;
          end else if (idx == RW'(NUM_RULES - 1)) begin
            busy      <= 1'b0;
            dec_valid <= 1'b1;
            allow     <= 1'b0;
            rule_no   <= RW'(NUM_RULES);
          end else begin
            idx <= idx + 1'b1;
          end
        end
      end
    end
  end
endmodule
