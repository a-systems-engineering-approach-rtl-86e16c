// memory_controller: sequencer of the memory control unit (MCU).
//
// It owns the packet buffer and walks every packet through the security
// controls, one packet at a time:
//   RECV      accept the frame from the Ethernet I/O unit into the buffer
//   HDR       read the frame start out to the filtering unit's header
//             extractor, up to the end of the UDP header
//   FILT      ask the filtering unit for its decision
//   DPI       allowed inbound packet: read the payload out to the DPI unit
//             and wait for its verdict
//   PASS      read the whole frame out to the Ethernet I/O unit, which
//             sends it on to the other side, then report the pass
//   DROP      tell the Ethernet I/O unit to drop, log and alert
//   CLEAR     empty the buffer (length set to zero) for the next packet
// A packet refused by the rules (default DENY) is dropped without DPI; an
// allowed outbound packet (from the gateway servers) passes without DPI;
// an allowed inbound packet passes only if no signature matches. This
// order of operations is the design's. The state encoding, the 1-cycle
// buffer read pipeline, the oversize drop and the clear-by-length are this
// design's choices.
//
// Interfaces: receive stream in_* with valid/ready (a byte moves when
// in_valid && in_ready; in_dir must hold for the whole frame); buffer
// write/read ports; header bytes to the filtering unit with their offset
// (flt_valid/flt_off), 'flt_eval' and the returned decision; payload bytes
// to the DPI unit (dpi_start, dpi_valid, dpi_last) and its done/malicious;
// frame bytes to transmit (tx_valid/tx_last, one byte per cycle, no
// back-pressure) and a one-cycle command cmd_valid/cmd_pass/cmd_reason.
//
// The byte buses to the filtering unit, the DPI unit and the transmit path
// are the buffer's read data itself, and the write data is the receive
// byte: only the valid/last/offset qualifiers differ between consumers.
//
// Timing for a frame of N bytes with H header bytes read and P payload
// bytes, counted from the cycle after the last byte is received: H + 1
// header cycles, 1 + D filter cycles where D is the filtering unit's
// decision latency (1 with parallel rules), P + 3 DPI cycles (inbound
// only), then
// N + 1 pass cycles ending with the pass command, or 1 drop cycle; then 1
// clear cycle before the next frame is accepted. An oversize frame is
// dropped in the second cycle.
module memory_controller #(
  parameter int unsigned DEPTH = 1514,
  parameter int unsigned AW    = $clog2(DEPTH),
  parameter int unsigned LEN_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // receive stream from the Ethernet I/O unit
  input  logic               in_valid,
  input  logic [7:0]         in_data,
  input  logic               in_last,
  input  sc_pkg::dir_e       in_dir,
  output logic               in_ready,
  // buffer memory
  output logic               buf_wr_en,
  output logic [AW-1:0]      buf_wr_addr,
  output logic [7:0]         buf_wr_data,
  output logic               buf_rd_en,
  output logic [AW-1:0]      buf_rd_addr,
  input  logic [7:0]         buf_rd_data,
  // filtering unit
  output logic               flt_clear,
  output logic               flt_valid,
  output logic [7:0]         flt_data,
  output logic [LEN_W-1:0]   flt_off,
  output logic               flt_eval,
  output sc_pkg::dir_e       pkt_dir,
  input  logic [LEN_W-1:0]   hdr_len,
  input  logic               hdr_len_valid,
  input  logic               dec_valid,
  input  logic               dec_allow,
  // DPI unit
  output logic               dpi_start,
  output logic               dpi_valid,
  output logic [7:0]         dpi_data,
  output logic               dpi_last,
  input  logic               dpi_done,
  input  logic               dpi_malicious,
  // transmit stream and commands to the Ethernet I/O unit
  output logic               tx_valid,
  output logic [7:0]         tx_data,
  output logic               tx_last,
  output sc_pkg::dir_e       tx_dir,
  output logic               cmd_valid,
  output logic               cmd_pass,
  output sc_pkg::drop_reason_e cmd_reason
);
  import sc_pkg::*;

  typedef enum logic [3:0] {
    S_RECV, S_HDR, S_HDR_WAIT, S_FILT, S_FILT_WAIT,
    S_DPI, S_DPI_WAIT, S_PASS, S_PASS_WAIT, S_DROP, S_CLEAR
  } state_e;

  typedef enum logic [1:0] {T_HDR, T_PAY, T_TX} rd_tag_e;

  localparam logic [LEN_W-1:0] LEN_MAX = '1;

  state_e           state;
  logic [LEN_W-1:0] wr_cnt;
  logic [LEN_W-1:0] frame_len;
  logic [LEN_W-1:0] rd_ptr;
  dir_e             dir;
  drop_reason_e     reason;
  logic             last_rd;
  rd_tag_e          tag;

  logic             oversize_q;
  logic             rd_q;
  rd_tag_e          rd_tag_q;
  logic             rd_last_q;
  logic [LEN_W-1:0] rd_off_q;

  // ---------------------------------------------------------------- control
  always_comb begin
    in_ready  = (state == S_RECV);
    buf_wr_en = (state == S_RECV) && in_valid && (wr_cnt < LEN_W'(DEPTH));
    buf_wr_addr = AW'(wr_cnt);
    buf_wr_data = in_data;

    tag     = T_HDR;
    last_rd = (rd_ptr == frame_len - 1'b1);
    unique case (state)
      S_HDR: begin
        tag     = T_HDR;
        last_rd = (rd_ptr == frame_len - 1'b1)
               || (hdr_len_valid && (rd_ptr + 1'b1 >= hdr_len));
      end
      S_DPI:   tag = T_PAY;
      S_PASS:  tag = T_TX;
      default: ;
    endcase
    buf_rd_en   = (state == S_HDR && !oversize_q) || state == S_DPI || state == S_PASS;
    buf_rd_addr = AW'(rd_ptr);

    flt_clear = (state == S_CLEAR);
    flt_eval  = (state == S_FILT);
    dpi_start = (state == S_FILT_WAIT) && dec_valid && dec_allow && (dir == INBOUND)
             && (hdr_len < frame_len);
    cmd_valid  = (state == S_PASS_WAIT) || (state == S_DROP);
    cmd_pass   = (state == S_PASS_WAIT);
    cmd_reason = reason;
    pkt_dir    = dir;
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RECV;
      wr_cnt     <= '0;
      frame_len  <= '0;
      rd_ptr     <= '0;
      dir        <= INBOUND;
      reason     <= DROP_UNAUTHORIZED;
      oversize_q <= 1'b0;
    end else begin
      unique case (state)
        S_RECV: if (in_valid) begin
          if (wr_cnt != LEN_MAX) wr_cnt <= wr_cnt + 1'b1;
          if (in_last) begin
            frame_len  <= (wr_cnt == LEN_MAX) ? LEN_MAX : wr_cnt + 1'b1;
            dir        <= in_dir;
            oversize_q <= (wr_cnt >= LEN_W'(DEPTH));
            rd_ptr     <= '0;
            state      <= S_HDR;
          end
        end
        S_HDR: begin
          if (oversize_q) begin
            reason <= DROP_OVERSIZE;
            state  <= S_DROP;
          end else if (last_rd) begin
            state <= S_HDR_WAIT;
          end else begin
            rd_ptr <= rd_ptr + 1'b1;
          end
        end
        S_HDR_WAIT: state <= S_FILT;     // last header byte captured
        S_FILT:     state <= S_FILT_WAIT;
        S_FILT_WAIT: if (dec_valid) begin
          rd_ptr <= '0;
          if (!dec_allow) begin
            reason <= DROP_UNAUTHORIZED;
            state  <= S_DROP;
          end else if (dir == OUTBOUND || hdr_len >= frame_len) begin
            state <= S_PASS;             // trusted outbound, or no payload
          end else begin
            rd_ptr <= hdr_len;
            state  <= S_DPI;
          end
        end
        S_DPI: begin
          if (last_rd) state <= S_DPI_WAIT;
          else         rd_ptr <= rd_ptr + 1'b1;
        end
        S_DPI_WAIT: if (dpi_done) begin
          rd_ptr <= '0;
          if (dpi_malicious) begin
            reason <= DROP_MALICIOUS;
            state  <= S_DROP;
          end else begin
            state <= S_PASS;
          end
        end
        S_PASS: begin
          if (last_rd) state <= S_PASS_WAIT;
          else         rd_ptr <= rd_ptr + 1'b1;
        end
        S_PASS_WAIT: state <= S_CLEAR;
        S_DROP:      state <= S_CLEAR;
        S_CLEAR: begin
          wr_cnt     <= '0;
          frame_len  <= '0;
          oversize_q <= 1'b0;
          state      <= S_RECV;
        end
        default: state <= S_RECV;
      endcase
    end
  end

  // ------------------------------------------------------ read data routing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q      <= 1'b0;
      rd_tag_q  <= T_HDR;
      rd_last_q <= 1'b0;
      rd_off_q  <= '0;
    end else begin
      rd_q      <= buf_rd_en;
      rd_tag_q  <= tag;
      rd_last_q <= last_rd;
      rd_off_q  <= rd_ptr;
    end
  end

  assign flt_valid = rd_q && (rd_tag_q == T_HDR);
  assign flt_data  = buf_rd_data;
  assign flt_off   = rd_off_q;
  assign dpi_valid = rd_q && (rd_tag_q == T_PAY);
  assign dpi_data  = buf_rd_data;
  assign dpi_last  = rd_last_q;
  assign tx_valid  = rd_q && (rd_tag_q == T_TX);
  assign tx_data   = buf_rd_data;
  assign tx_last   = rd_last_q;
  assign tx_dir    = dir;

  // Only allowed inbound packets are deep-inspected.
  a_dpi_inbound_only: assert property (@(posedge clk) disable iff (!rst_n)
    dpi_start |-> (dir == INBOUND));
  // A frame is never transmitted while another is being received.
  a_no_tx_in_recv: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RECV) |-> !buf_rd_en);
endmodule
