// sp_ram: single-port synchronous SRAM model used for the line buffers.
//
// One access per cycle: with en high, we high writes wdata at addr; with we
// low the word at addr appears on rdata after the clock edge and holds
// until the next read. Contents are not reset. Depth and width are set by
// the instantiating block; the port timing is the usual single-port SRAM
// behaviour, which this design assumes for the on-chip memories.
module sp_ram #(
  parameter int unsigned DEPTH = 120,
  parameter int unsigned WIDTH = 67,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
