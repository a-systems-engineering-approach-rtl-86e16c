// security_controls: hardware network security perimeter placed between the
// non-safety data network (DCN-I) and the redundant-channel DCS gateway
// servers.
//
// Every frame is intercepted by the Ethernet I/O unit and written into the
// MCU buffer. The filtering unit extracts the IPv4/UDP header and checks it
// against the static ruleset (seven ALLOW rules, then default DENY). A
// refused frame is dropped, logged and alerted. An allowed frame from the
// gateway side (periodic outbound data) is passed straight on. An allowed
// frame from the DCN-I side (on-demand inbound request) has its payload
// scanned byte by byte by the DPI unit against the signature database; a
// signature hit drops, logs and alerts it, otherwise it is passed to the
// gateways. The buffer is then cleared for the next frame. Units and their
// order follow the design; one-frame-at-a-time processing, the byte-stream
// ports and all widths are this design's choices. SEQ_RULES selects whether
// the ALLOW rules are evaluated all at once (0, default) or one per cycle
// until the first match (1); the decision is the same.
//
// Ports: gw_* is the gateway side, dcn_* the DCN-I side. Receive ports are
// valid/ready byte streams with 'last' (frames without preamble/FCS);
// transmit ports send one byte per cycle while valid. log_valid/log_rec and
// alert report each dropped frame; stats counts passes and drops.
module security_controls #(
  parameter int unsigned BUF_DEPTH = 1514,
  // 1: try the ALLOW rules one per cycle instead of all at once
  parameter bit          SEQ_RULES = 1'b0,
  parameter int unsigned NUM_RULES = sc_pkg::NUM_ALLOW_RULES,
  parameter sc_pkg::rule_t [NUM_RULES-1:0] RULES = sc_pkg::DEFAULT_RULES,
  parameter int unsigned NUM_PATT  = sc_pkg::NUM_PATTERNS,
  parameter int unsigned PATT_MAX  = sc_pkg::PATT_MAX_BYTES,
  parameter logic [NUM_PATT-1:0][PATT_MAX*8-1:0] PATTERNS  = sc_pkg::DEFAULT_PATTERNS,
  parameter logic [NUM_PATT-1:0][7:0]            PATT_LENS = sc_pkg::DEFAULT_PATT_LENS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             gw_rx_valid,
  input  logic [7:0]       gw_rx_data,
  input  logic             gw_rx_last,
  output logic             gw_rx_ready,
  output logic             gw_tx_valid,
  output logic [7:0]       gw_tx_data,
  output logic             gw_tx_last,
  input  logic             dcn_rx_valid,
  input  logic [7:0]       dcn_rx_data,
  input  logic             dcn_rx_last,
  output logic             dcn_rx_ready,
  output logic             dcn_tx_valid,
  output logic [7:0]       dcn_tx_data,
  output logic             dcn_tx_last,
  output logic             log_valid,
  output sc_pkg::log_rec_t log_rec,
  output logic             alert,
  output sc_pkg::stats_t   stats
);
  import sc_pkg::*;
  localparam int unsigned AW    = $clog2(BUF_DEPTH);
  localparam int unsigned LEN_W = 16;

  // Ethernet I/O <-> MCU
  logic         mcu_valid, mcu_last, mcu_ready;
  logic [7:0]   mcu_data;
  dir_e         mcu_dir;
  logic         tx_valid, tx_last;
  logic [7:0]   tx_data;
  dir_e         tx_dir;
  logic         cmd_valid, cmd_pass;
  drop_reason_e cmd_reason;
  // MCU buffer
  logic          buf_wr_en, buf_rd_en;
  logic [AW-1:0] buf_wr_addr, buf_rd_addr;
  logic [7:0]    buf_wr_data, buf_rd_data;
  // MCU <-> filtering unit
  logic             flt_clear, flt_valid, flt_eval;
  logic [7:0]       flt_data;
  logic [LEN_W-1:0] flt_off, hdr_len;
  logic             hdr_len_valid, dec_valid, dec_allow;
  pkt_hdr_t         hdr;
  dir_e             pkt_dir;
  // MCU <-> DPI unit
  logic       dpi_start, dpi_valid, dpi_last, dpi_done, dpi_malicious;
  logic [7:0]  dpi_data;
  logic [15:0] pattern_id;

  eth_io_unit u_eth_io (
    .clk, .rst_n,
    .gw_rx_valid, .gw_rx_data, .gw_rx_last, .gw_rx_ready,
    .gw_tx_valid, .gw_tx_data, .gw_tx_last,
    .dcn_rx_valid, .dcn_rx_data, .dcn_rx_last, .dcn_rx_ready,
    .dcn_tx_valid, .dcn_tx_data, .dcn_tx_last,
    .mcu_valid, .mcu_data, .mcu_last, .mcu_dir, .mcu_ready,
    .tx_valid, .tx_data, .tx_last, .tx_dir,
    .cmd_valid, .cmd_pass, .cmd_reason,
    .cmd_dir        (pkt_dir),
    .cmd_hdr        (hdr),
    .cmd_pattern_id (pattern_id),
    .log_valid, .log_rec, .alert, .stats
  );

  buffer_memory #(.DEPTH(BUF_DEPTH), .AW(AW)) u_buffer (
    .clk,
    .wr_en   (buf_wr_en),
    .wr_addr (buf_wr_addr),
    .wr_data (buf_wr_data),
    .rd_en   (buf_rd_en),
    .rd_addr (buf_rd_addr),
    .rd_data (buf_rd_data)
  );

  memory_controller #(.DEPTH(BUF_DEPTH), .AW(AW), .LEN_W(LEN_W)) u_mem_ctrl (
    .clk, .rst_n,
    .in_valid (mcu_valid), .in_data (mcu_data), .in_last (mcu_last),
    .in_dir   (mcu_dir),   .in_ready (mcu_ready),
    .buf_wr_en, .buf_wr_addr, .buf_wr_data, .buf_rd_en, .buf_rd_addr, .buf_rd_data,
    .flt_clear, .flt_valid, .flt_data, .flt_off, .flt_eval, .pkt_dir,
    .hdr_len, .hdr_len_valid, .dec_valid, .dec_allow,
    .dpi_start, .dpi_valid, .dpi_data, .dpi_last, .dpi_done, .dpi_malicious,
    .tx_valid, .tx_data, .tx_last, .tx_dir,
    .cmd_valid, .cmd_pass, .cmd_reason
  );

  filtering_unit #(
    .OFF_W(LEN_W), .NUM_RULES(NUM_RULES), .RULES(RULES), .SEQUENTIAL(SEQ_RULES)
  ) u_filter (
    .clk, .rst_n,
    .clear    (flt_clear),
    .in_valid (flt_valid),
    .in_data  (flt_data),
    .in_off   (flt_off),
    .dir      (pkt_dir),
    .eval     (flt_eval),
    .hdr_len, .hdr_len_valid, .hdr,
    .dec_valid,
    .allow    (dec_allow),
    .rule_no  ()
  );

  dpi_unit #(
    .NUM_PATT (NUM_PATT), .PATT_MAX (PATT_MAX),
    .PATTERNS (PATTERNS), .PATT_LENS (PATT_LENS)
  ) u_dpi (
    .clk, .rst_n,
    .start      (dpi_start),
    .in_valid   (dpi_valid),
    .in_data    (dpi_data),
    .in_last    (dpi_last),
    .match_now  (),
    .malicious  (dpi_malicious),
    .pattern_id (pattern_id),
    .done       (dpi_done)
  );
endmodule
