// config_memory - MNT configuration memory (weights, thresholds, lookup table).
//
// A byte-writable register file whose whole contents drive the neural
// computing module and the packet encoder in parallel, as control signals:
//   wt_out : 16 x 16 five-bit weights of the output-layer synapses  (1,280 bits)
//   th_in, th_out : 32 sixteen-bit firing thresholds                  (512 bits)
//   lut    : 16 rows x 64 bits, row r allocates topology memory blocks
//            to NCM output r                                          (1,024 bits)
// which is the 2,816 bits of the published tile, plus a 16-bit decay strobe
// period. Writes come from the packet decoder, one byte per cycle, at the
// byte addresses given in mnt_pkg; writes to unused addresses are ignored.
// There is no read port: nothing in the tile reads the memory back.
// The contents follow the published tile; the byte map, the register
// implementation and the extra decay-period register are this design's choice.
module config_memory
  import mnt_pkg::*;
#(
  parameter int unsigned N        = 16,
  parameter int unsigned N_BLK    = 64,
  parameter int unsigned MP_W     = 16,
  parameter int unsigned WT_W     = 5,
  parameter int unsigned PERIOD_W = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          we,
  input  logic [11:0]                   waddr,
  input  logic [7:0]                    wdata,
  output logic [N-1:0][MP_W-1:0]        th_in,
  output logic [N-1:0][MP_W-1:0]        th_out,
  output logic [N-1:0][N-1:0][WT_W-1:0] wt_out,
  output logic [N-1:0][N_BLK-1:0]       lut,
  output logic [PERIOD_W-1:0]           decay_period
);

  localparam int LUT_BYTES = N_BLK / 8;   // bytes per lookup row
  // Region bounds; each region must fit below the next base in mnt_pkg.
  localparam int WT_LO  = int'(CFG_WT_BASE);
  localparam int TH_LO  = int'(CFG_TH_BASE);
  localparam int LUT_LO = int'(CFG_LUT_BASE);
  localparam int DEC_LO = int'(CFG_DECAY_BASE);

  int a;
  assign a = int'(waddr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      th_in        <= '0;
      th_out       <= '0;
      wt_out       <= '0;
      lut          <= '0;
      decay_period <= '0;
    end else if (we) begin
      if (a >= WT_LO && a < WT_LO + int'(N*N)) begin
        wt_out[(a - WT_LO) / N][(a - WT_LO) % N] <= wdata[WT_W-1:0];
      end else if (a >= TH_LO && a < TH_LO + int'(4*N)) begin
        if ((a - TH_LO) / 2 < int'(N))
          th_in[(a - TH_LO) / 2][8*((a - TH_LO) % 2) +: 8] <= wdata;
        else
          th_out[(a - TH_LO) / 2 - N][8*((a - TH_LO) % 2) +: 8] <= wdata;
      end else if (a >= LUT_LO && a < LUT_LO + int'(N)*LUT_BYTES) begin
        lut[(a - LUT_LO) / LUT_BYTES][8*((a - LUT_LO) % LUT_BYTES) +: 8] <= wdata;
      end else if (a >= DEC_LO && a < DEC_LO + int'(PERIOD_W / 8)) begin
        decay_period[8*(a - DEC_LO) +: 8] <= wdata;
      end
    end
  end

endmodule
