// dp_ram: simple dual-port memory, one write port and one read port.
//
// Written as an array with a registered read so an FPGA tool maps it onto one
// block RAM, as the published design proposes for the VC buffers of an input port.
// Timing: a write at edge t is readable by a read issued in cycle t+1 or later;
// rd_data is valid in the cycle after rd_en and holds its value otherwise.
// Contents are not reset.
module dp_ram #(
  parameter int DW    = 34,
  parameter int DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [DW-1:0]            wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [DW-1:0]            rd_data
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
