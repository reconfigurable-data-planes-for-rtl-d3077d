// tcam: ternary content-addressable memory with a registered search.
//
// Each of ENTRIES entries holds a key, a care-mask (1 = bit compared) and a
// result word. A search compares the search key with every valid entry in
// parallel; the lowest-index matching entry wins. The controlling software
// orders entries so that this priority gives the wanted answer: longest prefix
// first for IPv4 routes, ascending label order for ROFL. Search results appear
// one cycle after s_valid (the single-cycle TCAM lookup of the forwarding
// tables). Entries are written one at a time through the w_* port; a write
// and a search in the same cycle see the old contents.
module tcam #(
  parameter int ENTRIES = 32,
  parameter int KEY_W   = 32,
  parameter int RES_W   = 35
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // write port
  input  logic                       w_en,
  input  logic [$clog2(ENTRIES)-1:0] w_idx,
  input  logic                       w_valid,
  input  logic [KEY_W-1:0]           w_key,
  input  logic [KEY_W-1:0]           w_mask,
  input  logic [RES_W-1:0]           w_res,
  // search port
  input  logic                       s_valid,
  input  logic [KEY_W-1:0]           s_key,
  output logic                       r_valid,
  output logic                       r_hit,
  output logic [$clog2(ENTRIES)-1:0] r_idx,
  output logic [KEY_W-1:0]           r_key,   // stored key of the winning entry
  output logic [RES_W-1:0]           r_res
);
  localparam int IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] vld;
  logic [KEY_W-1:0]   key  [ENTRIES];
  logic [KEY_W-1:0]   mask [ENTRIES];
  logic [RES_W-1:0]   res  [ENTRIES];

  logic          m_hit;
  logic [IW-1:0] m_idx;

  always_comb begin
    m_hit = 1'b0;
    m_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (vld[i] && (((s_key ^ key[i]) & mask[i]) == '0)) begin
        m_hit = 1'b1;
        m_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (w_en) begin
      key[w_idx]  <= w_key;
      mask[w_idx] <= w_mask;
      res[w_idx]  <= w_res;
    end
    r_idx <= m_idx;
    r_key <= key[m_idx];
    r_res <= res[m_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld     <= '0;
      r_valid <= 1'b0;
      r_hit   <= 1'b0;
    end else begin
      if (w_en) vld[w_idx] <= w_valid;
      r_valid <= s_valid;
      r_hit   <= s_valid && m_hit;
    end
  end
endmodule
