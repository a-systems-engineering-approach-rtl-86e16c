// sc_pkg: types and constants shared by the security-controls perimeter.
//
// The perimeter sits between the low-secured DCN-I segment (IPS, QIAS-N,
// MDB) and the trusted segment holding the four redundant-channel DCS
// gateway servers. The socket addresses and the static ALLOW ruleset below
// are the ones of the reference deployment: seven ALLOW rules (four
// outbound rules for the gateways, three inbound rules for the DCN-I
// servers) followed by an implicit default DENY. The signature database
// holds one 7-byte pattern, the ASCII string "STUXNET". Header field
// layout, rule encoding, wildcard flags, drop reasons and the log record
// format are this design's own choices.
package sc_pkg;

  typedef logic [31:0] ipv4_addr_t;
  typedef logic [15:0] udp_port_t;

  // Which side a packet entered on. OUTBOUND = from the gateway servers
  // toward DCN-I, INBOUND = from DCN-I toward the gateways.
  typedef enum logic {INBOUND = 1'b0, OUTBOUND = 1'b1} dir_e;

  // Direction constraint of a rule.
  typedef enum logic [1:0] {RDIR_IN = 2'd0, RDIR_OUT = 2'd1, RDIR_ANY = 2'd2} rule_dir_e;

  localparam logic [7:0]  IP_PROTO_UDP  = 8'd17;
  localparam logic [15:0] ETHERTYPE_IP4 = 16'h0800;
  localparam int unsigned ETH_HDR_BYTES = 14;
  localparam int unsigned UDP_HDR_BYTES = 8;

  // Header fields the filtering rules look at.
  typedef struct packed {
    logic       ok;        // Ethernet II + IPv4 + complete UDP header seen
    logic [7:0] proto;     // IPv4 protocol field
    ipv4_addr_t src_ip;
    ipv4_addr_t dst_ip;
    udp_port_t  src_port;
    udp_port_t  dst_port;
  } pkt_hdr_t;

  // One ALLOW rule. A field whose *_any flag is set matches everything
  // ("Any" in the ruleset table).
  typedef struct packed {
    rule_dir_e  dir;
    logic       proto_any;
    logic [7:0] proto;
    logic       src_ip_any;
    ipv4_addr_t src_ip;
    logic       dst_ip_any;
    ipv4_addr_t dst_ip;
    logic       src_port_any;
    udp_port_t  src_port;
    logic       dst_port_any;
    udp_port_t  dst_port;
  } rule_t;

  function automatic rule_t allow_from(rule_dir_e d, ipv4_addr_t ip, udp_port_t port);
    rule_t r;
    r.dir          = d;
    r.proto_any    = 1'b0;
    r.proto        = IP_PROTO_UDP;
    r.src_ip_any   = 1'b0;
    r.src_ip       = ip;
    r.dst_ip_any   = 1'b1;
    r.dst_ip       = '0;
    r.src_port_any = 1'b0;
    r.src_port     = port;
    r.dst_port_any = 1'b1;
    r.dst_port     = '0;
    return r;
  endfunction

  // Network sockets of the deployment.
  localparam ipv4_addr_t IP_GW_A   = {8'd10, 8'd0, 8'd1, 8'd10};
  localparam ipv4_addr_t IP_GW_B   = {8'd10, 8'd0, 8'd1, 8'd20};
  localparam ipv4_addr_t IP_GW_C   = {8'd10, 8'd0, 8'd1, 8'd30};
  localparam ipv4_addr_t IP_GW_D   = {8'd10, 8'd0, 8'd1, 8'd40};
  localparam ipv4_addr_t IP_IPS    = {8'd192, 8'd168, 8'd1, 8'd10};
  localparam ipv4_addr_t IP_QIAS_N = {8'd192, 8'd168, 8'd1, 8'd20};
  localparam ipv4_addr_t IP_MDB    = {8'd192, 8'd168, 8'd1, 8'd30};
  localparam udp_port_t  PORT_GW     = 16'd50000;
  localparam udp_port_t  PORT_IPS    = 16'd50001;
  localparam udp_port_t  PORT_QIAS_N = 16'd50002;
  localparam udp_port_t  PORT_MDB    = 16'd50003;

  // Static filtering ruleset, evaluated from rule 0 upward. Rule 7, the
  // default DENY, is not a block: it is what happens when none matches.
  localparam int unsigned NUM_ALLOW_RULES = 7;
  localparam rule_t [NUM_ALLOW_RULES-1:0] DEFAULT_RULES = '{
    allow_from(RDIR_IN,  IP_MDB,    PORT_MDB),     // 6: MDB    inbound
    allow_from(RDIR_IN,  IP_QIAS_N, PORT_QIAS_N),  // 5: QIAS-N inbound
    allow_from(RDIR_IN,  IP_IPS,    PORT_IPS),     // 4: IPS    inbound
    allow_from(RDIR_OUT, IP_GW_D,   PORT_GW),      // 3: GW_D   outbound
    allow_from(RDIR_OUT, IP_GW_C,   PORT_GW),      // 2: GW_C   outbound
    allow_from(RDIR_OUT, IP_GW_B,   PORT_GW),      // 1: GW_B   outbound
    allow_from(RDIR_OUT, IP_GW_A,   PORT_GW)       // 0: GW_A   outbound
  };

  // Signature database. Pattern byte k (k = 0 first on the wire) sits in
  // bits [8k+7:8k]; a pattern shorter than the slot uses only its low bytes.
  localparam int unsigned NUM_PATTERNS    = 1;
  localparam int unsigned PATT_MAX_BYTES  = 7;
  // "STUXNET": S=0x53 T=0x54 U=0x55 X=0x58 N=0x4E E=0x45 T=0x54
  localparam logic [NUM_PATTERNS-1:0][PATT_MAX_BYTES*8-1:0] DEFAULT_PATTERNS = '{
    {8'h54, 8'h45, 8'h4E, 8'h58, 8'h55, 8'h54, 8'h53}
  };
  localparam logic [NUM_PATTERNS-1:0][7:0] DEFAULT_PATT_LENS = '{8'd7};

  // Why a packet was dropped.
  typedef enum logic [1:0] {
    DROP_UNAUTHORIZED = 2'd0,  // no ALLOW rule matched: default DENY
    DROP_MALICIOUS    = 2'd1,  // a signature matched the payload
    DROP_OVERSIZE     = 2'd2   // frame longer than the buffer
  } drop_reason_e;

  // Record emitted for every dropped packet.
  typedef struct packed {
    drop_reason_e reason;
    dir_e         dir;
    logic [15:0]  pattern_id;  // valid for DROP_MALICIOUS
    pkt_hdr_t     hdr;
  } log_rec_t;

  // Running event counters.
  typedef struct packed {
    logic [31:0] pass_out;
    logic [31:0] pass_in;
    logic [31:0] drop_unauthorized;
    logic [31:0] drop_malicious;
    logic [31:0] drop_oversize;
  } stats_t;

endpackage
