// packet_decoder - MNT input packet decoder.
//
// Takes 32-bit packets from the router and sorts them by the packet type in
// bits 23:21. A configuration packet (010) becomes one byte write: address
// bit 12 selects the memory (0 = configuration memory, 1 = topology memory),
// bits 11:0 give the byte address, bits 7:0 the data. A spike packet (001)
// becomes a one-cycle spike_in pulse with the packet's input-layer neuron
// number and synaptic weight for the neural computing module. Other types
// are accepted and dropped.
//
// Handshake: a packet is taken in a cycle where packet_valid and packet_ack
// are both high. The decoder never stalls, so packet_ack simply follows
// packet_valid. All outputs are registered: they appear the cycle after the
// packet is taken. Decoding by type and the packet fields follow the
// published tile; the memory select bit, the always-ready acknowledge and the
// output register are this design's choices.
module packet_decoder
  import mnt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] packet_in,
  input  logic        packet_valid,
  output logic        packet_ack,
  output logic        cfg_we,
  output logic        topo_we,
  output logic [11:0] write_addr,
  output logic [7:0]  write_data,
  output logic        spike_in,
  output logic [3:0]  neuron_n,
  output logic [4:0]  syn_wt
);

  spike_pkt_t sp;
  cfg_pkt_t   cp;
  logic       take;

  assign sp         = spike_pkt_t'(packet_in);
  assign cp         = cfg_pkt_t'(packet_in);
  assign packet_ack = packet_valid;
  assign take       = packet_valid && packet_ack;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_we     <= 1'b0;
      topo_we    <= 1'b0;
      write_addr <= '0;
      write_data <= '0;
      spike_in   <= 1'b0;
      neuron_n   <= '0;
      syn_wt     <= '0;
    end else begin
      cfg_we   <= 1'b0;
      topo_we  <= 1'b0;
      spike_in <= 1'b0;
      if (take && sp.ptype == PKT_SPIKE) begin
        spike_in <= 1'b1;
        neuron_n <= sp.neuron;
        syn_wt   <= sp.syn_wt;
      end
      if (take && cp.ptype == PKT_CONFIG) begin
        cfg_we     <= ~cp.addr[12];
        topo_we    <= cp.addr[12];
        write_addr <= cp.addr[11:0];
        write_data <= cp.data;
      end
    end
  end

endmodule
