// cabac_ctx_mem: context model memory, a two-port SRAM of 112 x 28 bits.
//
// One word holds a group of four 7-bit context models. Port A reads, port B
// writes; both may be used in the same cycle. The read is synchronous: data
// for the address presented with rd_en appears on rd_data after the next
// clock edge and holds until the next read. A read and a write of the same
// address in one cycle returns the old word. Depth and width are the
// document's; the port timing is the usual synchronous SRAM behaviour,
// which this design assumes. The array is not reset: the init engine
// writes every word before decoding starts.
module cabac_ctx_mem #(
  parameter int unsigned DEPTH = 112,
  parameter int unsigned WIDTH = 28,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
