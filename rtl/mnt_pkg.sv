// mnt_pkg - shared types and constants of the modular neural tile (MNT).
//
// Holds the two 32-bit packet formats that cross the router interface, the
// packet type codes and the byte address map of the configuration memory.
// The packet bit fields are those of the tile's published packet format:
// X[31:28], Y[27:24], type[23:21], then either a 13-bit configuration
// address [20:8] and an 8-bit data byte [7:0], or a spike payload with the
// input-layer neuron number in [11:8] and the 5-bit synaptic weight in [4:0].
// The configuration address map (which byte holds which weight, threshold or
// lookup-table bit) and the extra decay-period bytes are this design's own
// choice; the tile description fixes only what the memory holds.
package mnt_pkg;

  localparam int unsigned MPOT_BITS = 16;  // membrane potential / threshold width
  localparam int unsigned WT_BITS   = 5;   // synaptic weight width (sign + 4-bit magnitude)

  typedef enum logic [2:0] {
    PKT_SPIKE  = 3'b001,
    PKT_CONFIG = 3'b010
  } pkt_type_e;

  // Spike packet, also the layout of one 32-bit topology memory entry.
  typedef struct packed {
    logic [3:0] x;
    logic [3:0] y;
    logic [2:0] ptype;
    logic [8:0] rsvd_hi;
    logic [3:0] neuron;
    logic [2:0] rsvd_lo;
    logic [4:0] syn_wt;
  } spike_pkt_t;

  // Configuration packet.
  typedef struct packed {
    logic [3:0]  x;
    logic [3:0]  y;
    logic [2:0]  ptype;
    logic [12:0] addr;
    logic [7:0]  data;
  } cfg_pkt_t;

  // Configuration memory byte map (ConfigAddress[12] = 0).
  //   0x000-0x0FF : weight of output neuron j, synapse i at 16*j + i (bits 4:0)
  //   0x100-0x13F : threshold of neuron k at 0x100 + 2k (low), +1 (high);
  //                 k = 0..15 input layer, k = 16..31 output layer
  //   0x140-0x1BF : lookup row r, byte b at 0x140 + 8r + b; bit i = block 8b+i
  //   0x1C0-0x1C1 : decay strobe period, low byte then high byte
  localparam logic [11:0] CFG_WT_BASE    = 12'h000;
  localparam logic [11:0] CFG_TH_BASE    = 12'h100;
  localparam logic [11:0] CFG_LUT_BASE   = 12'h140;
  localparam logic [11:0] CFG_DECAY_BASE = 12'h1C0;

  function automatic spike_pkt_t make_spike(logic [3:0] x, logic [3:0] y,
                                            logic [3:0] neuron, logic [4:0] wt);
    spike_pkt_t p;
    p = '0;
    p.x = x; p.y = y; p.ptype = PKT_SPIKE; p.neuron = neuron; p.syn_wt = wt;
    return p;
  endfunction

  function automatic cfg_pkt_t make_cfg(logic [3:0] x, logic [3:0] y,
                                        logic [12:0] addr, logic [7:0] data);
    cfg_pkt_t p;
    p.x = x; p.y = y; p.ptype = PKT_CONFIG; p.addr = addr; p.data = data;
    return p;
  endfunction

endpackage
