// tb_ncm - self-checking testbench for the 16:16 neural computing module.
//
// A cycle model of the two-layer network, written here, runs next to the
// module: 32 saturating membrane potentials, the stored neuron number that
// picks the input-layer spike and the output-layer weight column in the
// following cycle, and clear-on-fire. Every cycle the 16 spike outputs are
// compared with the model. The decay strobe is read from the module's own
// strobe generator (tested on its own) and fed to the model.
// A directed phase checks the pipeline latency: with every threshold 0 and
// every weight positive, a spike into input neuron n gives a spike on all
// 16 outputs exactly two cycles later, and on none before.
module tb_ncm;
  localparam int N = 16;
  logic                       clk = 1'b0;
  logic                       rst_n;
  logic                       spike_in;
  logic [3:0]                 neuron_n;
  logic [4:0]                 syn_wt;
  logic [N-1:0][15:0]         th_in, th_out;
  logic [N-1:0][N-1:0][4:0]   wt_out;
  logic [15:0]                decay_period;
  logic [N-1:0]               spike_out;

  int checks = 0, failures = 0;
  int n_out_spikes = 0, n_in_spikes = 0, n_decays = 0;
  int unsigned mp0 [N], mp1 [N];
  int unsigned sel;

  ncm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int unsigned apply(int unsigned mp, logic [4:0] w);
    int signed v;
    v = w[4] ? int'(mp) - int'(w[3:0]) : int'(mp) + int'(w[3:0]);
    if (v < 0) v = 0;
    if (v > 65535) v = 65535;
    return int'(v);
  endfunction

  // One cycle: drive inputs, compare outputs, advance the model.
  task automatic step(bit s, logic [3:0] n, logic [4:0] w);
    logic [N-1:0] col0, exp_out;
    bit col1, d;
    spike_in = s; neuron_n = n; syn_wt = w;
    #1;
    d = dut.decay;
    for (int i = 0; i < N; i++) col0[i] = (mp0[i] > th_in[i]);
    for (int j = 0; j < N; j++) exp_out[j] = (mp1[j] > th_out[j]);
    col1 = col0[sel];
    check(spike_out == exp_out, $sformatf("spike_out %h expected %h", spike_out, exp_out));
    n_out_spikes += $countones(exp_out);
    if (col0[sel]) n_in_spikes++;
    if (d) n_decays++;
    for (int i = 0; i < N; i++) begin
      if (col0[i])              mp0[i] = 0;
      else if (s && n == 4'(i)) mp0[i] = apply(mp0[i], w);
      else if (d)               mp0[i] = mp0[i] >> 1;
    end
    for (int j = 0; j < N; j++) begin
      if (exp_out[j])  mp1[j] = 0;
      else if (col1)   mp1[j] = apply(mp1[j], wt_out[j][sel]);
      else if (d)      mp1[j] = mp1[j] >> 1;
    end
    if (s) sel = n;
    @(posedge clk);
  endtask

  task automatic do_reset();
    rst_n = 1'b0; spike_in = 0; neuron_n = 0; syn_wt = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (mp0[i]) begin mp0[i] = 0; mp1[i] = 0; end
    sel = 0;
  endtask

  initial begin
    // Directed latency test.
    th_in = '0; th_out = '0; decay_period = 16'd0;
    for (int j = 0; j < N; j++) for (int i = 0; i < N; i++) wt_out[j][i] = 5'd1;
    do_reset();
    @(negedge clk);
    spike_in = 1'b1; neuron_n = 4'd5; syn_wt = 5'd3;
    #1 check(spike_out == '0, "no output in cycle 0");
    @(negedge clk); spike_in = 1'b0;
    #1 check(spike_out == '0, "no output in cycle 1");
    @(negedge clk);
    #1 check(spike_out == '1, "all outputs in cycle 2");
    @(negedge clk);
    #1 check(spike_out == '0, "one-cycle output pulse");

    // Random configuration and traffic, with and without decay.
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < N; i++) begin
        th_in[i]  = 16'($urandom_range(0, 40));
        th_out[i] = 16'($urandom_range(0, 60));
        for (int j = 0; j < N; j++) wt_out[i][j] = 5'($urandom);
      end
      decay_period = (round % 2 == 1) ? 16'($urandom_range(3, 20)) : 16'd0;
      do_reset();
      @(negedge clk);
      repeat (8000) begin
        step($urandom_range(0, 3) != 0, 4'($urandom), 5'($urandom_range(0, 31)));
        @(negedge clk);
      end
    end
    check(n_out_spikes > 100 && n_in_spikes > 100 && n_decays > 100, "mechanisms seen");
    $display("input-layer spikes=%0d output spikes=%0d decay strobes=%0d", n_in_spikes, n_out_spikes, n_decays);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
