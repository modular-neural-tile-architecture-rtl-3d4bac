// topology_memory - 4 KByte dual-ported SNN topology memory of the MNT.
//
// Holds the synaptic connections of the NCM outputs: 64 blocks of 16 entries,
// each entry four bytes at byte address 4*(16*block + entry), stored little
// endian as a 32-bit word in spike packet layout (destination X, Y, input
// neuron number, synaptic weight, and type 001 when the entry is in use).
// Port A is a byte write port for the packet decoder, port B a byte read
// port for the packet encoder; read data appears one cycle after re.
// A dual-ported RAM of this size with byte-wide ports follows the published
// tile (where it is a vendor macro or one FPGA block RAM); the synchronous
// read and the entry layout are this design's choice. The array is not reset.
module topology_memory #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
