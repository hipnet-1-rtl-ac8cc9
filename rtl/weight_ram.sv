// weight_ram: the weight memory of one synapse unit, one shared weight bank of a neuron.
//
// A DEPTH x WIDTH array (128 x 12 bit by default, the 32 x 48 bit macro of the floorplan
// seen as 128 words) with one read and one write port, both used every cycle: the read
// fetches the weight of the feature entering the bank, the write stores an updated weight.
// Timing: both ports act on the rising clock edge. rd_data is registered and holds, from
// the cycle after the edge, the word at rd_addr before any write on that same edge
// (read-before-write). A write on wr_en is visible to reads on later edges.
// The single-cycle read plus write per cycle follows the HiPNeT-1 paper; the read-before-write
// ordering on an address collision is this design's choice. Word 127 exists because the
// array is a power of two; feature code 127 is usable but the application uses 0..126.
module weight_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 12,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
