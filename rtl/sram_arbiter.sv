// sram_arbiter: shares one external SRAM bank (512K x 36) between N requesters:
// the lookup engines of the hardware data planes and the host's forwarding
// table writes.
//
// Each cycle one waiting request is granted in round-robin order (gnt is
// combinational with req). The granted command is registered onto the SRAM
// pins, so it reaches the chip one cycle later. Reads return RD_LAT cycles
// after the command is on the pins; a shift register carries the requester
// number alongside so that rvalid[i] pulses for the requester that issued the
// read, with the data on the shared rdata bus. The document only names the
// SRAM arbitration controller; the round-robin policy and timing are this
// design's choices.
module sram_arbiter
  import vnet_pkg::*;
#(
  parameter int N      = 5,
  parameter int RD_LAT = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req   [N],
  input  logic               we    [N],
  input  logic [SRAM_AW-1:0] addr  [N],
  input  logic [SRAM_DW-1:0] wdata [N],
  output logic               gnt   [N],
  output logic               rvalid[N],
  output logic [SRAM_DW-1:0] rdata,
  // SRAM chip pins
  output logic               sram_en,
  output logic               sram_we,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [SRAM_DW-1:0] sram_wdata,
  input  logic [SRAM_DW-1:0] sram_rdata
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last, pick;
  logic          any;

  always_comb begin
    pick = last;
    any  = 1'b0;
    for (int k = 1; k <= N; k++) begin
      if (!any && req[(int'(last) + k) % N]) begin
        pick = IW'((int'(last) + k) % N);
        any  = 1'b1;
      end
    end
    for (int i = 0; i < N; i++) gnt[i] = any && (pick == IW'(i));
  end

  // Read tracking: stage k holds the read whose data is on the pins k cycles
  // after the command.
  logic          p_vld [RD_LAT+1];
  logic [IW-1:0] p_id  [RD_LAT+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last    <= IW'(N - 1);
      sram_en <= 1'b0;
      sram_we <= 1'b0;
      for (int k = 0; k <= RD_LAT; k++) begin
        p_vld[k] <= 1'b0;
        p_id[k]  <= '0;
      end
    end else begin
      if (any) last <= pick;
      sram_en  <= any;
      sram_we  <= any && we[pick];
      p_vld[0] <= any && !we[pick];
      p_id[0]  <= pick;
      for (int k = 1; k <= RD_LAT; k++) begin
        p_vld[k] <= p_vld[k-1];
        p_id[k]  <= p_id[k-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    sram_addr  <= addr[pick];
    sram_wdata <= wdata[pick];
  end

  assign rdata = sram_rdata;
  always_comb
    for (int i = 0; i < N; i++) rvalid[i] = p_vld[RD_LAT] && (p_id[RD_LAT] == IW'(i));
endmodule
