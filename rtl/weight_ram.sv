// weight_ram: binary synaptic weight memory of one layer.
//
// One row per presynaptic neuron (or pixel), addressed directly by its index
// 1..DEPTH as produced by the priority encoder; one bit per postsynaptic
// neuron, 1 = weight +1 (excitatory), 0 = weight -1 (inhibitory). Every neuron
// of the layer reads the same address and takes its own bit of the row.
// Row 0 does not exist: index 0 means "no input".
//
// Timing: synchronous read, rdata holds row raddr one clock after re. The
// write port (we, waddr, wdata) loads one whole row per clock and is meant for
// configuration before inference. A one-read one-write array infers a block
// RAM; the published design stores weights in FPGA block RAM, the port layout
// is this design's own.
module weight_ram #(
  parameter int unsigned DEPTH = 1023,  // presynaptic neurons
  parameter int unsigned NW    = 1023,  // postsynaptic neurons (row width)
  parameter int unsigned AW    = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [NW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [NW-1:0] wdata
);
  logic [NW-1:0] mem [1:DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr >= AW'(1) && waddr <= AW'(DEPTH))
      mem[waddr] <= wdata;
    if (re)
      rdata <= mem[raddr];
  end

endmodule
