// lif_neuron - multiplier-less digital leaky integrate-and-fire neuron.
//
// The membrane potential lives in a 16-bit register. A pulse on spike_in adds
// or subtracts the synaptic weight through a 16-bit adder/subtractor whose
// carry/borrow bit drives saturation at 0 and at 2^16-1. A pulse on
// mpot_decay shifts the register right by one (divide by two), which gives a
// stepwise exponential leak towards the resting value 0; how often the strobe
// comes sets the leakage coefficient. spike_out is the comparator output
// (potential > th_pot). It is combinational, so a spike appears in the cycle
// after the input spike that caused it, and the same pulse clears the
// register at the next clock edge, giving a one-cycle output pulse.
//
// Structure, widths and names follow the published neuron. This design's own
// choices: syn_wt is sign-magnitude (bit 4 set = inhibitory, bits 3:0 the
// magnitude); the potential is unsigned; in one cycle clearing wins over a
// weight update, which wins over decay; reset is synchronous, active low.
module lif_neuron #(
  parameter int unsigned MP_W = 16,
  parameter int unsigned WT_W = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [MP_W-1:0] th_pot,
  input  logic            mpot_decay,
  input  logic            spike_in,
  input  logic [WT_W-1:0] syn_wt,
  output logic            spike_out,
  output logic [MP_W-1:0] mem_pot
);

  logic            inhibit;
  logic [MP_W-1:0] magnitude;
  logic [MP_W:0]   sum;       // one extra bit: carry (add) or borrow (subtract)
  logic [MP_W-1:0] updated;

  assign inhibit   = syn_wt[WT_W-1];
  assign magnitude = MP_W'(syn_wt[WT_W-2:0]);

  always_comb begin
    if (inhibit) sum = {1'b0, mem_pot} - {1'b0, magnitude};
    else         sum = {1'b0, mem_pot} + {1'b0, magnitude};
    // Saturation: the extra bit flags overflow (add) or underflow (subtract).
    if (sum[MP_W]) updated = inhibit ? '0 : '1;
    else           updated = sum[MP_W-1:0];
  end

  assign spike_out = (mem_pot > th_pot);

  always_ff @(posedge clk) begin
    if (!rst_n)           mem_pot <= '0;
    else if (spike_out)   mem_pot <= '0;
    else if (spike_in)    mem_pot <= updated;
    else if (mpot_decay)  mem_pot <= mem_pot >> 1;
  end

endmodule
