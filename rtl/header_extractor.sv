// header_extractor: packet header extractor of the filtering unit.
//
// The memory controller reads the start of the buffered frame and streams
// it here, one byte per cycle with its byte offset. The extractor picks out
// the fields the rules compare: IPv4 protocol, source and destination IP
// addresses, and UDP source and destination ports. The frame is taken to
// be Ethernet II without preamble and FCS: EtherType at offsets 12-13,
// IPv4 header at 14 (its length from IHL), UDP header right after it.
// 'hdr.ok' is set once the EtherType is IPv4, the version is 4, IHL >= 5
// and the last UDP header byte has been seen. Field offsets follow the
// standard frame formats; the streaming capture is this design's choice.
//
// Timing: 'clear' (synchronous) forgets the previous packet. Fields are
// registered one cycle after their byte is presented. 'hdr_len' (offset of
// the first payload byte, 14 + 4*IHL + 8) is valid when 'hdr_len_valid'.
module header_extractor #(
  parameter int unsigned OFF_W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  logic [7:0]          in_data,
  input  logic [OFF_W-1:0]    in_off,
  output sc_pkg::pkt_hdr_t    hdr,
  output logic [OFF_W-1:0]    hdr_len,
  output logic                hdr_len_valid
);
  import sc_pkg::*;

  logic [15:0]      ethertype;
  logic [3:0]       version;
  logic [3:0]       ihl;
  logic             ihl_seen;
  logic             last_seen;
  logic [OFF_W-1:0] l4_off;
  pkt_hdr_t         f;

  assign l4_off        = OFF_W'(ETH_HDR_BYTES) + OFF_W'({ihl, 2'b00});
  assign hdr_len       = l4_off + OFF_W'(UDP_HDR_BYTES);
  assign hdr_len_valid = ihl_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ethertype <= '0;
      version   <= '0;
      ihl       <= '0;
      ihl_seen  <= 1'b0;
      last_seen <= 1'b0;
      f         <= '0;
    end else if (clear) begin
      ethertype <= '0;
      version   <= '0;
      ihl       <= '0;
      ihl_seen  <= 1'b0;
      last_seen <= 1'b0;
      f         <= '0;
    end else if (in_valid) begin
      unique case (in_off)
        OFF_W'(12): ethertype[15:8] <= in_data;
        OFF_W'(13): ethertype[7:0]  <= in_data;
        OFF_W'(14): begin
          version  <= in_data[7:4];
          ihl      <= in_data[3:0];
          ihl_seen <= 1'b1;
        end
        OFF_W'(23): f.proto <= in_data;
        OFF_W'(26): f.src_ip[31:24] <= in_data;
        OFF_W'(27): f.src_ip[23:16] <= in_data;
        OFF_W'(28): f.src_ip[15:8]  <= in_data;
        OFF_W'(29): f.src_ip[7:0]   <= in_data;
        OFF_W'(30): f.dst_ip[31:24] <= in_data;
        OFF_W'(31): f.dst_ip[23:16] <= in_data;
        OFF_W'(32): f.dst_ip[15:8]  <= in_data;
        OFF_W'(33): f.dst_ip[7:0]   <= in_data;
        default: ;
      endcase
      // UDP header fields sit after the variable-length IPv4 header.
      if (ihl_seen) begin
        if (in_off == l4_off)              f.src_port[15:8] <= in_data;
        if (in_off == l4_off + OFF_W'(1))  f.src_port[7:0]  <= in_data;
        if (in_off == l4_off + OFF_W'(2))  f.dst_port[15:8] <= in_data;
        if (in_off == l4_off + OFF_W'(3))  f.dst_port[7:0]  <= in_data;
        if (in_off == hdr_len - OFF_W'(1)) last_seen        <= 1'b1;
      end
    end
  end

  always_comb begin
    hdr    = f;
    hdr.ok = last_seen && ihl_seen && (ethertype == ETHERTYPE_IP4)
          && (version == 4'd4) && (ihl >= 4'd5);
  end
endmodule
