// vnet_top: FPGA data path of a heterogeneous virtual router. Hardware virtual
// data planes run in the FPGA; the rest of the virtual networks are forwarded
// by software data planes on the host, reached through the CPU DMA queues.
//
//   MAC RX 0..3, CPU RX 0..3 -> input queues (8) -> input arbiter
//     -> dynamic design select --+--> 32-word FIFO -> data plane p (x NUM_PLANES) --+
//                                +--> CPU transceiver -------------------------------+
//     -> output arbiter -> output queues -> MAC TX 0..3, CPU TX 0..3
//
// The design select table sends each frame, by its destination virtual
// address, to a hardware plane or (single-receiver mode) to the CPU
// transceiver, which hands it to the host. Frames the host has forwarded come
// back on CPU RX and leave on the matching MAC port. Moving a virtual network
// between hardware and software is a table write. By default the design hosts
// the document's four hardware planes, three IPv4 and one ROFL (PLANE_ROFL).
// All four keep their forwarding tables in the two shared external SRAM banks
// (PLANE_SRAM); bank L1 is port 0 of the SRAM pins and bank L2 port 1. Each bank
// is shared by the planes' lookup engines and host table writes through an
// sram_arbiter. A plane whose PLANE_SRAM bit is 0 uses an on-chip 32-entry TCAM.
//
// Register writes (cfg) come from the host: unit 0..NUM_PLANES-1 addresses a
// plane, UNIT_DSEL the design select, UNIT_CPUX the CPU transceiver, UNIT_SRAM
// an SRAM word (tbl = bank, idx = address, data[35:0]). An SRAM write waits
// for its bank's grant; cfg_busy is high meanwhile and no new cfg write may be
// issued. All streams use valid/ready; a word moves when both are high.
// The Ethernet MACs, the PCI DMA engine and the SRAM chips are outside this
// module: their streams and pins are ports.
module vnet_top
  import vnet_pkg::*;
#(
  parameter int       NUM_PLANES  = 4,
  parameter bit [7:0] PLANE_ROFL  = 8'b0000_1000,
  parameter bit [7:0] PLANE_SRAM  = 8'b1111_1111,
  parameter int       IQ_DEPTH    = 256,
  parameter int       OQ_DEPTH    = 256,
  parameter int       FIFO_DEPTH  = 32,
  parameter int       DSEL_ENTRIES = 16,
  parameter int       SRAM_RD_LAT = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // receive streams: 0..3 MAC RX, 4..7 CPU RX (frames returned by software)
  input  logic               rx_valid [NUM_PORTS],
  output logic               rx_ready [NUM_PORTS],
  input  pkt_word_t          rx_word  [NUM_PORTS],
  // transmit streams: 0..3 MAC TX, 4..7 CPU TX (frames for software)
  output logic               tx_valid [NUM_PORTS],
  input  logic               tx_ready [NUM_PORTS],
  output pkt_word_t          tx_word  [NUM_PORTS],
  // host register writes
  input  cfg_wr_t            cfg,
  output logic               cfg_busy,
  // external SRAM banks: [0] = L1, [1] = L2
  output logic               sram_en    [2],
  output logic               sram_we    [2],
  output logic [SRAM_AW-1:0] sram_addr  [2],
  output logic [SRAM_DW-1:0] sram_wdata [2],
  input  logic [SRAM_DW-1:0] sram_rdata [2],
  // status
  output logic               single_rx,
  output logic [31:0]        ds_n_hw,
  output logic [31:0]        ds_n_sw,
  output logic [31:0]        ds_n_ret,
  output logic [31:0]        ds_n_drop,
  output logic [31:0]        cx_n_to_sw,
  output logic [31:0]        cx_n_from_sw,
  output logic [31:0]        pl_n_fwd      [NUM_PLANES],
  output logic [31:0]        pl_n_drop     [NUM_PLANES],
  output logic [31:0]        pl_n_conflict [NUM_PLANES]
);
  localparam int NP = NUM_PLANES;

  // ------------------------------------------------------------ input queues
  logic      iq_valid [NUM_PORTS], iq_ready [NUM_PORTS];
  pkt_word_t iq_word  [NUM_PORTS];

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_iq
    pkt_word_t w;
    always_comb begin
      w     = rx_word[i];
      w.src = PORT_W'(i);
    end
    pkt_fifo #(.DEPTH(IQ_DEPTH)) u_iq (
      .clk, .rst_n,
      .in_valid(rx_valid[i]), .in_ready(rx_ready[i]), .in_word(w),
      .out_valid(iq_valid[i]), .out_ready(iq_ready[i]), .out_word(iq_word[i]), .count());
  end

  logic      ia_valid, ia_ready;
  pkt_word_t ia_word;

  input_arbiter #(.N(NUM_PORTS)) u_in_arb (
    .clk, .rst_n, .in_valid(iq_valid), .in_ready(iq_ready), .in_word(iq_word),
    .out_valid(ia_valid), .out_ready(ia_ready), .out_word(ia_word));

  // ------------------------------------------------------------ design select
  logic      ds_pl_valid [NP], ds_pl_ready [NP];
  logic      ds_cpu_valid, ds_cpu_ready;
  pkt_word_t ds_word;

  design_select #(.NUM_PLANES(NP), .ENTRIES(DSEL_ENTRIES)) u_dsel (
    .clk, .rst_n, .cfg_en(cfg.unit == UNIT_DSEL), .cfg,
    .in_valid(ia_valid), .in_ready(ia_ready), .in_word(ia_word),
    .pl_valid(ds_pl_valid), .pl_ready(ds_pl_ready),
    .cpu_valid(ds_cpu_valid), .cpu_ready(ds_cpu_ready), .out_word(ds_word),
    .single_rx, .n_hw(ds_n_hw), .n_sw(ds_n_sw), .n_ret(ds_n_ret), .n_drop(ds_n_drop));

  // ------------------------------------------------------------ SRAM banks
  localparam int NR = NP + 1;   // requesters per bank: planes + host
  logic               b_req    [2][NR];
  logic               b_we     [2][NR];
  logic [SRAM_AW-1:0] b_addr   [2][NR];
  logic [SRAM_DW-1:0] b_wdata  [2][NR];
  logic               b_gnt    [2][NR];
  logic               b_rvalid [2][NR];
  logic [SRAM_DW-1:0] b_rdata  [2];

  // host writes: one pending write per bank
  logic               h_req  [2];
  logic [SRAM_AW-1:0] h_addr [2];
  logic [SRAM_DW-1:0] h_data [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++) begin
        h_req[b]  <= 1'b0;
        h_addr[b] <= '0;
        h_data[b] <= '0;
      end
    end else begin
      for (int b = 0; b < 2; b++) begin
        if (b_gnt[b][NP]) h_req[b] <= 1'b0;
        if (cfg.we && cfg.unit == UNIT_SRAM && cfg.tbl[0] == b[0]) begin
          h_req[b]  <= 1'b1;
          h_addr[b] <= cfg.idx;
          h_data[b] <= cfg.data[SRAM_DW-1:0];
        end
      end
    end
  end
  assign cfg_busy = h_req[0] || h_req[1];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    always_comb begin
      b_req[b][NP]   = h_req[b];
      b_we[b][NP]    = 1'b1;
      b_addr[b][NP]  = h_addr[b];
      b_wdata[b][NP] = h_data[b];
    end
    sram_arbiter #(.N(NR), .RD_LAT(SRAM_RD_LAT)) u_arb (
      .clk, .rst_n,
      .req(b_req[b]), .we(b_we[b]), .addr(b_addr[b]), .wdata(b_wdata[b]),
      .gnt(b_gnt[b]), .rvalid(b_rvalid[b]), .rdata(b_rdata[b]),
      .sram_en(sram_en[b]), .sram_we(sram_we[b]), .sram_addr(sram_addr[b]),
      .sram_wdata(sram_wdata[b]), .sram_rdata(sram_rdata[b]));
  end

  // ------------------------------------------------------------ data planes
  logic      pf_valid [NP], pf_ready [NP];
  pkt_word_t pf_word  [NP];
  logic      oa_valid [NR], oa_ready [NR];
  pkt_word_t oa_word  [NR];

  for (genvar p = 0; p < NP; p++) begin : g_plane
    pkt_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .in_valid(ds_pl_valid[p]), .in_ready(ds_pl_ready[p]), .in_word(ds_word),
      .out_valid(pf_valid[p]), .out_ready(pf_ready[p]), .out_word(pf_word[p]), .count());

    always_comb begin
      b_we[0][p] = 1'b0;  b_wdata[0][p] = '0;
      b_we[1][p] = 1'b0;  b_wdata[1][p] = '0;
    end

    vdp_plane #(
      .PROTO   (PLANE_ROFL[p] ? PROTO_ROFL : PROTO_IPV4),
      .USE_SRAM(PLANE_SRAM[p])
    ) u_plane (
      .clk, .rst_n, .cfg_en(cfg.unit == 4'(p)), .cfg,
      .in_valid(pf_valid[p]), .in_ready(pf_ready[p]), .in_word(pf_word[p]),
      .out_valid(oa_valid[p]), .out_ready(oa_ready[p]), .out_word(oa_word[p]),
      .l1_req(b_req[0][p]), .l1_addr(b_addr[0][p]), .l1_gnt(b_gnt[0][p]),
      .l1_rvalid(b_rvalid[0][p]), .l1_rdata(b_rdata[0]),
      .l2_req(b_req[1][p]), .l2_addr(b_addr[1][p]), .l2_gnt(b_gnt[1][p]),
      .l2_rvalid(b_rvalid[1][p]), .l2_rdata(b_rdata[1]),
      .n_fwd(pl_n_fwd[p]), .n_drop(pl_n_drop[p]), .n_conflict(pl_n_conflict[p]));
  end

  // ------------------------------------------------------------ CPU transceiver
  cpu_transceiver u_cpux (
    .clk, .rst_n, .cfg_en(cfg.unit == UNIT_CPUX), .cfg,
    .in_valid(ds_cpu_valid), .in_ready(ds_cpu_ready), .in_word(ds_word),
    .out_valid(oa_valid[NP]), .out_ready(oa_ready[NP]), .out_word(oa_word[NP]),
    .n_to_sw(cx_n_to_sw), .n_from_sw(cx_n_from_sw));

  // ------------------------------------------------------------ output side
  logic      oq_in_valid, oq_in_ready;
  pkt_word_t oq_in_word;

  input_arbiter #(.N(NR)) u_out_arb (
    .clk, .rst_n, .in_valid(oa_valid), .in_ready(oa_ready), .in_word(oa_word),
    .out_valid(oq_in_valid), .out_ready(oq_in_ready), .out_word(oq_in_word));

  output_queues #(.NQ(NUM_PORTS), .DEPTH(OQ_DEPTH)) u_oq (
    .clk, .rst_n, .in_valid(oq_in_valid), .in_ready(oq_in_ready), .in_word(oq_in_word),
    .q_valid(tx_valid), .q_ready(tx_ready), .q_word(tx_word));
endmodule
