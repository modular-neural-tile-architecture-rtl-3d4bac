// tb_lif_neuron - self-checking testbench for the digital LIF neuron.
//
// Drives random spikes, weights (excitatory and inhibitory), decay strobes and
// thresholds and compares the membrane potential and spike output every cycle
// with a reference model written here: potential +/- magnitude clamped to
// [0, 65535], halved on decay, cleared the cycle after it exceeds the
// threshold. Directed phases force saturation at both ends, a decay sequence
// and a fire-and-clear. Also checks that a spike appears exactly one cycle
// after the input spike that crosses the threshold.
module tb_lif_neuron;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] th_pot;
  logic        mpot_decay, spike_in;
  logic [4:0]  syn_wt;
  logic        spike_out;
  logic [15:0] mem_pot;

  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_fire = 0, n_decay = 0;
  int unsigned model;

  lif_neuron dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s: mem_pot=%0d model=%0d th=%0d spike=%0b", what, mem_pot, model, th_pot, spike_out);
    end
  endtask

  // Apply one cycle of stimulus and update the model at the clock edge.
  task automatic step(bit s, logic [4:0] w, bit d, logic [15:0] th);
    int signed next;
    spike_in = s; syn_wt = w; mpot_decay = d; th_pot = th;
    #1;
    check(mem_pot == 16'(model), "potential");
    check(spike_out == (model > th), "spike");
    if (model > th) begin
      next = 0; n_fire++;
    end else if (s) begin
      if (w[4]) next = int'(model) - int'(w[3:0]);
      else      next = int'(model) + int'(w[3:0]);
      if (next > 65535) begin next = 65535; n_sat_hi++; end
      if (next < 0)     begin next = 0;     n_sat_lo++; end
    end else if (d) begin
      next = int'(model) >> 1; n_decay++;
    end else next = int'(model);
    @(posedge clk);
    model = int'(next);
    #1;
  endtask

  initial begin
    rst_n = 1'b0; spike_in = 0; syn_wt = 0; mpot_decay = 0; th_pot = 16'hFFFF;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1; model = 0;
    // Underflow: inhibitory spikes from rest.
    repeat (3) step(1, 5'b1_0111, 0, 16'hFFFF);
    // Climb with the largest excitatory weight, then check decay.
    repeat (40) step(1, 5'b0_1111, 0, 16'hFFFF);
    check(mem_pot == 16'd600, "40 x 15");
    repeat (3) step(0, 0, 1, 16'hFFFF);
    check(mem_pot == 16'd75, "600 >> 3");
    // Fire: threshold 100, spike appears one cycle after the crossing input.
    repeat (2) step(1, 5'b0_1111, 0, 16'd100);     // 75 -> 90 -> 105
    check(spike_out == 1'b1, "spike one cycle after crossing");
    step(0, 0, 0, 16'd100);                          // clears
    check(mem_pot == 16'd0 && spike_out == 1'b0, "cleared after spike");
    // Overflow: threshold at the top, drive the potential into saturation.
    repeat (4400) step(1, 5'b0_1111, 0, 16'hFFFF);
    check(mem_pot == 16'hFFFF, "saturated high");
    // Random phase.
    repeat (15000) step($urandom_range(0, 2) == 0, 5'($urandom), $urandom_range(0, 7) == 0,
                       16'($urandom_range(0, 200)));
    check(n_sat_hi > 0 && n_sat_lo > 0 && n_fire > 10 && n_decay > 10, "all mechanisms seen");
    $display("saturate_hi=%0d saturate_lo=%0d fire=%0d decay=%0d", n_sat_hi, n_sat_lo, n_fire, n_decay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
