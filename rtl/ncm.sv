// ncm - neural computing module: a 16:16 fully connected feed-forward SNN.
//
// Layer 0 has N input neurons N[0,n], layer 1 has N output neurons N[1,j];
// every input neuron is wired to every output neuron, so no connectivity has
// to be stored. The module works as a two-stage pipeline:
//   cycle n   : spike_in/neuron_n/syn_wt arrive; a 4:16 decoder gated by
//               spike_in applies syn_wt to input neuron neuron_n, and neuron_n
//               is captured in a 4-bit register.
//   cycle n+1 : the stored number selects, through a 16:1 one-bit multiplexer,
//               the spike output of that input neuron and, through one 16:1
//               five-bit multiplexer per output neuron, weight wt_out[j][sel]
//               from the configuration memory. Every output neuron receives
//               that spike with its own weight.
//   cycle n+2 : an output neuron that crossed its threshold shows spike_out[j].
// Only one input neuron can receive a spike per cycle, so only the selected
// input neuron can have fired, which is why one multiplexer per layer is
// enough. All 2N neurons share one decay strobe generator.
//
// The structure follows the published module. Input-layer weights arrive with
// each spike (single dynamic synapse); output-layer weights and all thresholds
// come from the configuration memory.
module ncm #(
  parameter int unsigned N        = 16,
  parameter int unsigned MP_W     = 16,
  parameter int unsigned WT_W     = 5,
  parameter int unsigned PERIOD_W = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          spike_in,
  input  logic [$clog2(N)-1:0]          neuron_n,
  input  logic [WT_W-1:0]               syn_wt,
  input  logic [N-1:0][MP_W-1:0]        th_in,
  input  logic [N-1:0][MP_W-1:0]        th_out,
  input  logic [N-1:0][N-1:0][WT_W-1:0] wt_out,   // [output j][input i]
  input  logic [PERIOD_W-1:0]           decay_period,
  output logic [N-1:0]                  spike_out
);

  localparam int unsigned SW = $clog2(N);

  logic [SW-1:0]  sel_q;          // "Column 1 synapse select"
  logic [N-1:0]   in_spike;       // 4:16 decoder output
  logic [N-1:0]   col0_spike;     // input-layer spike outputs
  logic           col1_spike;     // spike applied to every output neuron
  logic           decay;

  always_ff @(posedge clk) begin
    if (!rst_n)        sel_q <= '0;
    else if (spike_in) sel_q <= neuron_n;
  end

  always_comb begin
    in_spike = '0;
    if (spike_in) in_spike[neuron_n] = 1'b1;
  end

  assign col1_spike = col0_spike[sel_q];

  decay_strobe_gen #(.PERIOD_W(PERIOD_W)) u_decay (
    .clk(clk), .rst_n(rst_n), .period(decay_period), .strobe(decay)
  );

  for (genvar n = 0; n < N; n++) begin : g_layer0
    lif_neuron #(.MP_W(MP_W), .WT_W(WT_W)) u_n0 (
      .clk(clk), .rst_n(rst_n), .th_pot(th_in[n]), .mpot_decay(decay),
      .spike_in(in_spike[n]), .syn_wt(syn_wt),
      .spike_out(col0_spike[n]), .mem_pot()
    );
  end

  for (genvar j = 0; j < N; j++) begin : g_layer1
    lif_neuron #(.MP_W(MP_W), .WT_W(WT_W)) u_n1 (
      .clk(clk), .rst_n(rst_n), .th_pot(th_out[j]), .mpot_decay(decay),
      .spike_in(col1_spike), .syn_wt(wt_out[j][sel_q]),
      .spike_out(spike_out[j]), .mem_pot()
    );
  end

endmodule
