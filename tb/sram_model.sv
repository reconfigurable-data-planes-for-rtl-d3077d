// sram_model: behavioural model of one external 18-Mbit synchronous SRAM
// (512K x 36) for simulation only. A command presented with en high in cycle t
// writes at the clock edge, or returns the read word in cycle t + RD_LAT.
// Contents start at zero, as after the control plane has cleared the table.
module sram_model #(
  parameter int AW     = 19,
  parameter int DW     = 36,
  parameter int RD_LAT = 2
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [1 << AW];
  logic [DW-1:0] pipe [RD_LAT];

  initial begin
    for (int i = 0; i < (1 << AW); i++) mem[i] = '0;
    for (int k = 0; k < RD_LAT; k++) pipe[k] = '0;
  end

  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= wdata;
    if (en && !we) pipe[0] <= mem[addr];
    for (int k = 1; k < RD_LAT; k++) pipe[k] <= pipe[k-1];
  end
  assign rdata = pipe[RD_LAT-1];

endmodule
