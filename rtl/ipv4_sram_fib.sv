// ipv4_sram_fib: IPv4 forwarding table of one hardware data plane held in the
// two shared external SRAM banks, an extension of the DIR-24-8-BASIC scheme.
//
// Bank L1 (512K x 36) is indexed by the 19 most significant bits of the
// virtual destination address. Prefixes of length <= 19 are expanded into all
// 2^(19-l) L1 entries they cover. An L1 entry is {flag, port[2:0], next hop[31:0]}.
// With flag = 0 it is the answer. With flag = 1 its low 6 bits name an L2 set,
// and the L2 entry {set, address[12:0]} (bank L2, 64 sets of 2^13) holds
// {0, port, next hop} for the longer prefix.
// Several virtual routers share the banks. Where their prefixes would collide,
// the control plane moves the entry to a free L1 location (first fit) and
// stores {VID, prefix} -> that indirect index in the 32-entry Conflict CAM. A
// lookup therefore searches the Conflict CAM with {VID, address} first and
// uses the indirect index on a hit, the address bits otherwise.
// An all-zero next hop marks an empty entry (lookup miss); the control plane
// clears the banks before use.
//
// Timing, with the SRAM command registered in sram_arbiter and RD_LAT the
// chip's read latency: short prefix 4 + RD_LAT cycles from request to rsp_valid
// (6 at RD_LAT = 2), long prefix 6 + 2*RD_LAT (10). One lookup at a time;
// req_ready is high only when idle.
// Conflict CAM writes: tbl = TBL_AUX, data[31:0] prefix, data[63:32] mask,
// data[82:64] indirect index, data[123:120] VID, data[127] valid.
module ipv4_sram_fib
  import vnet_pkg::*;
#(
  parameter int CCAM_ENTRIES = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_en,
  input  cfg_wr_t            cfg,
  input  logic               req_valid,
  output logic               req_ready,
  input  lkup_req_t          req,
  output logic               rsp_valid,
  output lkup_rsp_t          rsp,
  // L1 bank requester port
  output logic               l1_req,
  output logic [SRAM_AW-1:0] l1_addr,
  input  logic               l1_gnt,
  input  logic               l1_rvalid,
  input  logic [SRAM_DW-1:0] l1_rdata,
  // L2 bank requester port
  output logic               l2_req,
  output logic [SRAM_AW-1:0] l2_addr,
  input  logic               l2_gnt,
  input  logic               l2_rvalid,
  input  logic [SRAM_DW-1:0] l2_rdata,
  output logic               conflict_hit   // pulses when the Conflict CAM redirected a lookup
);
  typedef enum logic [2:0] {S_IDLE, S_CAM, S_L1, S_L1W, S_L2, S_L2W} state_e;
  state_e state;

  logic [31:0]        addr_q;
  logic [SRAM_AW-1:0] l1a, l2a;
  logic               c_valid, c_hit;
  logic [18:0]        c_idx;

  tcam #(.ENTRIES(CCAM_ENTRIES), .KEY_W(32 + VID_W), .RES_W(SRAM_AW)) u_ccam (
    .clk, .rst_n,
    .w_en   (cfg_en && cfg.we && cfg.tbl == TBL_AUX),
    .w_idx  (cfg.idx[$clog2(CCAM_ENTRIES)-1:0]),
    .w_valid(cfg.data[127]),
    .w_key  ({cfg.data[123:120], cfg.data[31:0]}),
    .w_mask ({{VID_W{1'b1}}, cfg.data[63:32]}),
    .w_res  (cfg.data[82:64]),
    .s_valid(req_valid && req_ready),
    .s_key  ({req.vid, req.addr}),
    .r_valid(c_valid),
    .r_hit  (c_hit),
    .r_idx  (),
    .r_key  (),
    .r_res  (c_idx)
  );

  assign req_ready = (state == S_IDLE);
  assign l1_req    = (state == S_L1);
  assign l1_addr   = l1a;
  assign l2_req    = (state == S_L2);
  assign l2_addr   = l2a;
  assign conflict_hit = c_valid && c_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      addr_q    <= '0;
      l1a       <= '0;
      l2a       <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          addr_q <= req.addr;
          state  <= S_CAM;
        end
        S_CAM: begin
          l1a   <= c_hit ? c_idx : addr_q[31:L2_SET_BITS];
          state <= S_L1;
        end
        S_L1: if (l1_gnt) state <= S_L1W;
        S_L1W: if (l1_rvalid) begin
          if (l1_rdata[35]) begin
            l2a   <= {l1_rdata[L2_SET_W-1:0], addr_q[L2_SET_BITS-1:0]};
            state <= S_L2;
          end else begin
            rsp_valid <= 1'b1;
            rsp.hit   <= (l1_rdata[31:0] != '0);
            rsp.port  <= l1_rdata[34:32];
            rsp.nh    <= l1_rdata[31:0];
            state     <= S_IDLE;
          end
        end
        S_L2: if (l2_gnt) state <= S_L2W;
        S_L2W: if (l2_rvalid) begin
          rsp_valid <= 1'b1;
          rsp.hit   <= (l2_rdata[31:0] != '0);
          rsp.port  <= l2_rdata[34:32];
          rsp.nh    <= l2_rdata[31:0];
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
