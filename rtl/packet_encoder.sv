// packet_encoder - output spike packet generation and flow control.
//
// Every NCM output that spikes sends one spike packet to each of its
// synaptic destinations. The destinations are found through the lookup
// table: row r has one bit per topology memory block, and each set bit hands
// that block's 16 entries to output r. Blocks are shared out freely, so one
// output may own many blocks and another none.
//
// Operation: spikes are collected in a pending register (one bit per
// output). When idle, the encoder takes the lowest pending output, copies its
// lookup row and then, lowest block first, reads each allocated block's 16
// entries. An entry is four bytes read over the byte-wide topology memory
// read port (byte address {block, entry, byte}, data one cycle later). An
// entry whose type field is 001 is sent as a spike packet; any other type
// marks an unused entry and is skipped. A packet is held on packet_out with
// packet_valid high until packet_ack is seen. An unused entry costs 6 cycles,
// a used one 6 plus the cycles spent waiting for packet_ack (7 in all with
// packet_ack held high).
// A spike on an output whose bit is still pending is merged into it and
// reported on spike_merged.
//
// Lookup-table allocation, the block/entry organisation and the byte-wide
// read port follow the published tile. The pending register, the service
// order, the used-entry marker and the merge rule are this design's choices.
module packet_encoder
  import mnt_pkg::*;
#(
  parameter int unsigned N_OUT  = 16,
  parameter int unsigned N_BLK  = 64,
  parameter int unsigned N_SC   = 16,
  parameter int unsigned AW     = $clog2(N_BLK) + $clog2(N_SC) + 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_OUT-1:0]            spike_out,
  input  logic [N_OUT-1:0][N_BLK-1:0] lut,
  output logic                        read_enable,
  output logic [AW-1:0]               read_address,
  input  logic [7:0]                  read_data,
  output logic [31:0]                 packet_out,
  output logic                        packet_valid,
  input  logic                        packet_ack,
  output logic                        busy,
  output logic                        spike_merged
);

  localparam int unsigned OW = $clog2(N_OUT);
  localparam int unsigned BW = $clog2(N_BLK);
  localparam int unsigned EW = $clog2(N_SC);

  typedef enum logic [2:0] {S_IDLE, S_FIND, S_READ, S_CHECK, S_SEND} state_e;

  state_e             state;
  logic [N_OUT-1:0]   pending;
  logic [N_BLK-1:0]   row;
  logic [BW-1:0]      blk;
  logic [EW-1:0]      sc;
  logic [2:0]         bcnt;
  spike_pkt_t         entry;

  logic [OW-1:0]      next_out;
  logic [BW-1:0]      next_blk;
  logic [N_OUT-1:0]   take_mask;
  logic               last_entry;

  // Lowest set bit of the pending vector and of the working lookup row.
  always_comb begin
    next_out = '0;
    for (int i = int'(N_OUT) - 1; i >= 0; i--)
      if (pending[i]) next_out = OW'(i);
    next_blk = '0;
    for (int i = int'(N_BLK) - 1; i >= 0; i--)
      if (row[i]) next_blk = BW'(i);
  end

  always_comb begin
    take_mask = '0;
    if (state == S_IDLE && pending != '0) take_mask[next_out] = 1'b1;
  end

  assign spike_merged = |(spike_out & pending & ~take_mask);
  assign busy         = (state != S_IDLE) || (pending != '0);
  assign last_entry   = (sc == EW'(N_SC - 1));

  assign read_enable  = (state == S_READ) && (bcnt < 3'd4);
  assign read_address = {blk, sc, bcnt[1:0]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      pending      <= '0;
      row          <= '0;
      blk          <= '0;
      sc           <= '0;
      bcnt         <= '0;
      entry        <= '0;
      packet_out   <= '0;
      packet_valid <= 1'b0;
    end else begin
      pending <= (pending & ~take_mask) | spike_out;
      unique case (state)
        S_IDLE: begin
          if (pending != '0) begin
            row   <= lut[next_out];
            state <= S_FIND;
          end
        end
        S_FIND: begin
          if (row == '0) begin
            state <= S_IDLE;
          end else begin
            blk   <= next_blk;
            sc    <= '0;
            bcnt  <= '0;
            state <= S_READ;
          end
        end
        S_READ: begin
          if (bcnt != 3'd0) entry[8*(bcnt-1) +: 8] <= read_data;
          bcnt <= bcnt + 3'd1;
          if (bcnt == 3'd4) state <= S_CHECK;
        end
        S_CHECK: begin
          if (entry.ptype == PKT_SPIKE) begin
            packet_out   <= make_spike(entry.x, entry.y, entry.neuron, entry.syn_wt);
            packet_valid <= 1'b1;
            state        <= S_SEND;
          end else if (last_entry) begin
            row[blk] <= 1'b0;
            state    <= S_FIND;
          end else begin
            sc    <= sc + 1'b1;
            bcnt  <= '0;
            state <= S_READ;
          end
        end
        S_SEND: begin
          if (packet_ack) begin
            packet_valid <= 1'b0;
            if (last_entry) begin
              row[blk] <= 1'b0;
              state    <= S_FIND;
            end else begin
              sc    <= sc + 1'b1;
              bcnt  <= '0;
              state <= S_READ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A packet on offer stays on offer, unchanged, until it is acknowledged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    packet_valid && !packet_ack |=> packet_valid && $stable(packet_out));

endmodule
