// eth_io_unit: Ethernet I/O unit of the security controls.
//
// Two network sides meet here: the DCN-I side (low-secured segment) and the
// gateway side (the four DCS gateway servers, trusted segment). Received
// frames from either side are intercepted and handed, whole and one at a
// time, to the MCU buffer, tagged with their direction (from the gateway
// side = OUTBOUND, from DCN-I = INBOUND). When the MCU decides to pass a
// frame it streams it back here and it leaves on the opposite side. When
// the MCU decides to drop a frame, this unit logs the event (one log record
// per dropped frame, with the reason and the extracted header) and raises
// a one-cycle alert. Running counters of passed and dropped frames are
// kept. Intercepting, passing, dropping, logging and alerting are the
// design's; the byte-stream ports, the round-robin choice between two
// sides that both have a frame waiting, the log record and the counters
// are this design's choices. The MAC/PHY layers are outside this unit:
// ports carry frames as bytes, without preamble and FCS.
//
// Ports: *_rx_* are valid/ready byte streams with a last flag (a byte moves
// when valid && ready; once a side is chosen it is served until its last
// byte). *_tx_* carry one byte per cycle while valid, without
// back-pressure, and lag the MCU's transmit stream by one cycle. log_valid
// and alert pulse one cycle after the MCU's drop command.
module eth_io_unit (
  input  logic                  clk,
  input  logic                  rst_n,
  // gateway side
  input  logic                  gw_rx_valid,
  input  logic [7:0]            gw_rx_data,
  input  logic                  gw_rx_last,
  output logic                  gw_rx_ready,
  output logic                  gw_tx_valid,
  output logic [7:0]            gw_tx_data,
  output logic                  gw_tx_last,
  // DCN-I side
  input  logic                  dcn_rx_valid,
  input  logic [7:0]            dcn_rx_data,
  input  logic                  dcn_rx_last,
  output logic                  dcn_rx_ready,
  output logic                  dcn_tx_valid,
  output logic [7:0]            dcn_tx_data,
  output logic                  dcn_tx_last,
  // to the MCU buffer
  output logic                  mcu_valid,
  output logic [7:0]            mcu_data,
  output logic                  mcu_last,
  output sc_pkg::dir_e          mcu_dir,
  input  logic                  mcu_ready,
  // from the MCU
  input  logic                  tx_valid,
  input  logic [7:0]            tx_data,
  input  logic                  tx_last,
  input  sc_pkg::dir_e          tx_dir,
  input  logic                  cmd_valid,
  input  logic                  cmd_pass,
  input  sc_pkg::drop_reason_e  cmd_reason,
  input  sc_pkg::dir_e          cmd_dir,
  input  sc_pkg::pkt_hdr_t      cmd_hdr,
  input  logic [15:0]           cmd_pattern_id,
  // log, alert, counters
  output logic                  log_valid,
  output sc_pkg::log_rec_t      log_rec,
  output logic                  alert,
  output sc_pkg::stats_t        stats
);
  import sc_pkg::*;

  logic locked;      // a frame is being received from side 'sel'
  dir_e sel;
  dir_e cur;
  dir_e prefer;      // side served first when both have a frame waiting

  always_comb begin
    if (locked)                         cur = sel;
    else if (gw_rx_valid && dcn_rx_valid) cur = prefer;
    else if (gw_rx_valid)               cur = OUTBOUND;
    else                                cur = INBOUND;

    mcu_dir      = cur;
    mcu_valid    = (cur == OUTBOUND) ? gw_rx_valid : dcn_rx_valid;
    mcu_data     = (cur == OUTBOUND) ? gw_rx_data  : dcn_rx_data;
    mcu_last     = (cur == OUTBOUND) ? gw_rx_last  : dcn_rx_last;
    gw_rx_ready  = mcu_ready && (cur == OUTBOUND);
    dcn_rx_ready = mcu_ready && (cur == INBOUND);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      sel    <= INBOUND;
      prefer <= INBOUND;
    end else if (mcu_valid && mcu_ready) begin
      if (mcu_last) begin
        locked <= 1'b0;
        prefer <= (cur == OUTBOUND) ? INBOUND : OUTBOUND;
      end else begin
        locked <= 1'b1;
        sel    <= cur;
      end
    end
  end

  // Passed frames leave on the side opposite to the one they came from.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gw_tx_valid  <= 1'b0;
      gw_tx_last   <= 1'b0;
      gw_tx_data   <= '0;
      dcn_tx_valid <= 1'b0;
      dcn_tx_last  <= 1'b0;
      dcn_tx_data  <= '0;
    end else begin
      gw_tx_valid  <= tx_valid && (tx_dir == INBOUND);
      gw_tx_last   <= tx_valid && tx_last && (tx_dir == INBOUND);
      gw_tx_data   <= tx_data;
      dcn_tx_valid <= tx_valid && (tx_dir == OUTBOUND);
      dcn_tx_last  <= tx_valid && tx_last && (tx_dir == OUTBOUND);
      dcn_tx_data  <= tx_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      log_valid <= 1'b0;
      log_rec   <= '0;
      alert     <= 1'b0;
      stats     <= '0;
    end else begin
      log_valid <= cmd_valid && !cmd_pass;
      alert     <= cmd_valid && !cmd_pass;
      if (cmd_valid) begin
        if (cmd_pass) begin
          if (cmd_dir == OUTBOUND) stats.pass_out <= stats.pass_out + 1;
          else                     stats.pass_in  <= stats.pass_in + 1;
        end else begin
          log_rec.reason     <= cmd_reason;
          log_rec.dir        <= cmd_dir;
          log_rec.pattern_id <= (cmd_reason == DROP_MALICIOUS) ? cmd_pattern_id : 16'd0;
          log_rec.hdr        <= cmd_hdr;
          unique case (cmd_reason)
            DROP_UNAUTHORIZED: stats.drop_unauthorized <= stats.drop_unauthorized + 1;
            DROP_MALICIOUS:    stats.drop_malicious    <= stats.drop_malicious + 1;
            default:           stats.drop_oversize     <= stats.drop_oversize + 1;
          endcase
        end
      end
    end
  end

  // A sender must hold a byte until it is taken.
  a_rx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (mcu_valid && !mcu_ready && locked) |=> mcu_valid);
endmodule
