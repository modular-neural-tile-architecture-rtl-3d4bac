// mnt_top - modular neural tile (MNT): one node of a mesh NoC spiking
// neural network.
//
// The tile packs 32 LIF neurons as a 16:16 fully connected feed-forward
// network (the neural computing module, NCM). Connections inside the NCM are
// wires, so only the connections leaving the tile need memory. Packets from
// the router enter the packet decoder:
//   * configuration packets write the configuration memory (output-layer
//     weights, thresholds, lookup table, decay period) or the 4 KByte
//     topology memory, one byte per packet;
//   * spike packets drive one input-layer neuron with the weight carried in
//     the packet.
// Spikes from the NCM's 16 outputs go to the packet encoder, which uses the
// lookup table to find the topology memory blocks owned by each output and
// sends one spike packet per stored destination back to the router.
//
// Latency: a spike packet taken in cycle t reaches the NCM at t+1; an output
// spike shows on spike_out at t+3; its first outgoing packet is offered no
// earlier than t+12. Router interface: 32-bit data, valid and acknowledge in
// each direction; a word moves in a cycle where valid and ack are both high.
//
// The partitioning into decoder, configuration memory, topology memory, NCM
// and encoder, the packet formats and the memory sizes follow the published
// tile. spike_out, encoder_busy and spike_merged (a spike folded into one
// still waiting in the encoder) are brought out only for observation.
module mnt_top
  import mnt_pkg::*;
#(
  parameter int unsigned N_NEURONS    = 16,
  parameter int unsigned N_BLOCKS     = 64,
  parameter int unsigned SC_PER_BLOCK = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [31:0]          packet_in,
  input  logic                 packet_in_valid,
  output logic                 packet_in_ack,
  output logic [31:0]          packet_out,
  output logic                 packet_out_valid,
  input  logic                 packet_out_ack,
  output logic [N_NEURONS-1:0] spike_out,
  output logic                 encoder_busy,
  output logic                 spike_merged
);

  localparam int unsigned AW = $clog2(N_BLOCKS) + $clog2(SC_PER_BLOCK) + 2;

  // Decoder outputs
  logic        cfg_we, topo_we;
  logic [11:0] write_addr;
  logic [7:0]  write_data;
  logic        spike_in;
  logic [3:0]  neuron_n;
  logic [4:0]  syn_wt;

  // Configuration memory outputs
  logic [N_NEURONS-1:0][MPOT_BITS-1:0]                  th_in, th_out;
  logic [N_NEURONS-1:0][N_NEURONS-1:0][WT_BITS-1:0]   wt_out;
  logic [N_NEURONS-1:0][N_BLOCKS-1:0]              lut;
  logic [15:0]                                     decay_period;

  // Topology memory read port
  logic          read_enable;
  logic [AW-1:0] read_address;
  logic [7:0]    read_data;

  packet_decoder u_dec (
    .clk, .rst_n,
    .packet_in(packet_in), .packet_valid(packet_in_valid), .packet_ack(packet_in_ack),
    .cfg_we, .topo_we, .write_addr, .write_data,
    .spike_in, .neuron_n, .syn_wt
  );

  config_memory #(.N(N_NEURONS), .N_BLK(N_BLOCKS), .MP_W(MPOT_BITS), .WT_W(WT_BITS)) u_cfg (
    .clk, .rst_n, .we(cfg_we), .waddr(write_addr), .wdata(write_data),
    .th_in, .th_out, .wt_out, .lut, .decay_period
  );

  topology_memory #(.DEPTH(1 << AW)) u_topo (
    .clk, .we(topo_we), .waddr(write_addr[AW-1:0]), .wdata(write_data),
    .re(read_enable), .raddr(read_address), .rdata(read_data)
  );

  ncm #(.N(N_NEURONS), .MP_W(MPOT_BITS), .WT_W(WT_BITS)) u_ncm (
    .clk, .rst_n, .spike_in, .neuron_n(neuron_n[$clog2(N_NEURONS)-1:0]), .syn_wt,
    .th_in, .th_out, .wt_out, .decay_period, .spike_out
  );

  packet_encoder #(.N_OUT(N_NEURONS), .N_BLK(N_BLOCKS), .N_SC(SC_PER_BLOCK)) u_enc (
    .clk, .rst_n, .spike_out, .lut,
    .read_enable, .read_address, .read_data,
    .packet_out, .packet_valid(packet_out_valid), .packet_ack(packet_out_ack),
    .busy(encoder_busy), .spike_merged(spike_merged)
  );

endmodule
