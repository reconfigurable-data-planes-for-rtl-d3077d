// vnet_pkg: types and constants shared by the virtual data plane datapath.
//
// Packets move through the datapath as a stream of 64-bit words (big-endian:
// byte 0 of the frame is data[63:56] of the first word), the bus width of the
// NetFPGA reference pipeline. Every word carries a small sideband (source port,
// destination port, tag) so no separate module-header word is needed. Ports 0-3
// are the Ethernet MACs, ports 4-7 the CPU DMA queues, so a 3-bit port number
// covers both, matching the 3-bit output port field of the forwarding entries.
//
// Frame layout (IPIP tunnelling, layer 3 virtualization): Ethernet header
// (bytes 0-13), outer IPv4 header (14-33, SRC IP at 26, DST IP at 30), inner
// IPv4 header (34-53, DST VIP at 50). ROFL frames are assumed to carry their
// 32-bit destination label at the DST VIP position, so both are classified by
// the same word. Byte-granular frame ends are not modelled: frames are whole
// words and at least 7 words (56 bytes) long.
package vnet_pkg;

  localparam int DATA_W    = 64;
  localparam int NUM_MAC   = 4;
  localparam int NUM_PORTS = 8;     // 4 MAC + 4 CPU DMA queues
  localparam int PORT_W    = 3;
  localparam int VID_W     = 4;     // up to 15 virtual networks plus one spare
  localparam int HDR_WORDS = 7;     // words 0..6 hold every field that is looked up or rewritten
  localparam int SRAM_AW   = 19;    // 512K entries per 18-Mbit bank
  localparam int SRAM_DW   = 36;
  localparam int L2_SET_BITS = 13;  // 2^13 entries per L2 set
  localparam int L2_SET_W  = SRAM_AW - L2_SET_BITS;  // 64 sets per bank

  typedef enum logic [0:0] {PROTO_IPV4 = 1'b0, PROTO_ROFL = 1'b1} proto_e;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              sop;
    logic              eop;
    logic [PORT_W-1:0] src;   // port the frame entered on
    logic [PORT_W-1:0] dst;   // port the frame leaves on
    logic [VID_W-1:0]  tag;   // VID for hardware planes, software interface for the CPU path
  } pkt_word_t;

  typedef struct packed {
    logic [VID_W-1:0] vid;
    logic [31:0]      addr;   // search address: DST VIP or SRC VIP (IPv4), destination label (ROFL)
    logic [31:0]      src;    // SRC VIP, second key half for source-and-destination routing
  } lkup_req_t;

  typedef struct packed {
    logic              hit;
    logic [PORT_W-1:0] port;
    logic [31:0]       nh;    // next-hop IP (IPv4) or matched label (ROFL)
  } lkup_rsp_t;

  // Register write port from the host (control plane over PCI).
  typedef struct packed {
    logic         we;
    logic [3:0]   unit;   // 0..NUM_PLANES-1: a data plane; see UNIT_* for the rest
    logic [3:0]   tbl;    // table inside the unit, see TBL_*
    logic [18:0]  idx;    // entry index / SRAM address / port number
    logic [127:0] data;   // [31:0] key, [63:32] mask, [111:64] result, [123:120] VID, [127] valid
  } cfg_wr_t;

  localparam logic [3:0] UNIT_CPUX = 4'hC;   // CPU transceiver
  localparam logic [3:0] UNIT_DSEL = 4'hD;   // dynamic design select
  localparam logic [3:0] UNIT_SRAM = 4'hE;   // external SRAM, tbl = bank

  localparam logic [3:0] TBL_FIB    = 4'd0;  // route TCAM (IPv4) or label TCAM (ROFL)
  localparam logic [3:0] TBL_AUX    = 4'd1;  // Conflict CAM (IPv4 SRAM) or pointer cache (ROFL)
  localparam logic [3:0] TBL_ARP    = 4'd2;  // next hop -> MAC
  localparam logic [3:0] TBL_PMAC   = 4'd3;  // per-port MAC address, idx = port
  localparam logic [3:0] TBL_PIP    = 4'd4;  // per-port IP address, idx = port
  localparam logic [3:0] TBL_NS     = 4'd5;  // ROFL namespace base/mask, idx = VID
  localparam logic [3:0] TBL_MODE   = 4'd6;  // design select: data[0] = single-receiver mode;
                                             // IPv4 plane: data[1:0] = routing mode (route_mode_e)
  localparam logic [3:0] TBL_SRC    = 4'd7;  // IPv4 TCAM plane: source prefix for the next TBL_FIB write

  // Routing modes of an IPv4 plane.
  typedef enum logic [1:0] {
    RT_DST     = 2'd0,   // destination-based: key = DST VIP
    RT_SRC     = 2'd1,   // source-based: key = SRC VIP
    RT_SRC_DST = 2'd2    // source-and-destination: key = {SRC VIP, DST VIP} (TCAM table only)
  } route_mode_e;

  // Field access helpers for the 7 header words.
  function automatic logic [31:0] get_vip(input logic [DATA_W-1:0] w6);
    return w6[47:16];
  endfunction

  // Inner SRC IP (SRC VIP), bytes 46..49: the last two bytes of word 5 and the first two of word 6.
  function automatic logic [31:0] get_svip(input logic [DATA_W-1:0] w5, input logic [DATA_W-1:0] w6);
    return {w5[15:0], w6[63:48]};
  endfunction

  // One's-complement sum of the outer IPv4 header (bytes 14..33), checksum field excluded.
  function automatic logic [15:0] ipv4_csum(input logic [DATA_W-1:0] w1, input logic [DATA_W-1:0] w2,
                                            input logic [DATA_W-1:0] w3, input logic [DATA_W-1:0] w4);
    logic [19:0] s;
    s = 20'(w1[15:0]) + 20'(w2[63:48]) + 20'(w2[47:32]) + 20'(w2[31:16]) + 20'(w2[15:0])
      + 20'(w3[47:32]) + 20'(w3[31:16]) + 20'(w3[15:0]) + 20'(w4[63:48]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    return ~s[15:0];
  endfunction

endpackage
