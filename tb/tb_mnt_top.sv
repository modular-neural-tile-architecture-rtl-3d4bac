// tb_mnt_top - end-to-end testbench of the modular neural tile at full size.
//
// Acts as the router on both sides of the tile. Everything is set up through
// configuration packets: thresholds, output-layer weights, the lookup table,
// the decay period and topology memory entries for three blocks (output 0
// owns blocks 0 and 5, output 3 owns block 1). Then spike packets exercise:
//   1. fan-out: one spike fires all 16 outputs (thresholds 0) two cycles after
//      it reaches the NCM; the tile sends exactly the packets stored for
//      outputs 0 and 3, in order, the first one 12 cycles after the spike
//      packet was taken;
//   2. integration: an output with threshold 20 and weight +5 fires on the
//      5th spike and not before;
//   3. inhibition: an output with an inhibitory weight, held at 0 by
//      saturation, never fires;
//   4. leak: with a decay strobe every 2 cycles, widely spaced spikes never
//      reach the threshold of 20;
//   5. back-pressure: a spike stream while the router acknowledges at random
//      makes the encoder stall and merge spikes; every packet still belongs
//      to a stored destination and arrives in whole per-output groups;
//   6. a packet of unknown type changes nothing.
// Each mechanism is counted and must occur at least once.
module tb_mnt_top;
  import mnt_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] packet_in;
  logic        packet_in_valid, packet_in_ack;
  logic [31:0] packet_out;
  logic        packet_out_valid, packet_out_ack;
  logic [15:0] spike_out;
  logic        encoder_busy, spike_merged;

  int checks = 0, failures = 0;
  int cyc = 0, accept_cyc = 0;
  int n_cfg = 0, n_topo = 0, n_spk = 0, n_fire = 0, n_out = 0;
  int n_stall = 0, n_merge = 0, n_inhib = 0, n_integrate = 0, n_leak = 0, n_unknown = 0;
  bit random_ack = 0;
  logic [31:0] got [$];
  int          got_cyc [$];
  logic [31:0] row0 [$], row3 [$];

  mnt_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // Router sink and monitors.
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    // the acknowledge set here is the one the next rising edge samples
    packet_out_ack = random_ack ? ($urandom_range(0, 2) == 0) : 1'b1;
    if (packet_out_valid && packet_out_ack) begin
      got.push_back(packet_out); got_cyc.push_back(cyc); n_out++;
    end
    if (packet_out_valid && !packet_out_ack) n_stall++;
    if (spike_merged) n_merge++;
    n_fire += $countones(spike_out);
  end

  // Router source: offer a packet, wait for the acknowledge.
  task automatic send(logic [31:0] p);
    @(negedge clk);
    packet_in = p; packet_in_valid = 1'b1;
    #1;
    while (!packet_in_ack) begin @(negedge clk); #1; end
    accept_cyc = cyc;
    @(negedge clk);
    packet_in_valid = 1'b0;
  endtask

  task automatic cfg(logic [12:0] a, logic [7:0] d);
    send(make_cfg(4'd0, 4'd0, a, d));
    if (a[12]) n_topo++; else n_cfg++;
  endtask

  task automatic set_th(int k, logic [15:0] v);   // k: 0-15 input, 16-31 output layer
    cfg(13'('h100 + 2*k), v[7:0]);
    cfg(13'('h101 + 2*k), v[15:8]);
  endtask

  task automatic set_wt(int j, int i, logic [4:0] w);
    cfg(13'(16*j + i), {3'b0, w});
  endtask

  task automatic set_entry(int b, int e, logic [31:0] w);
    for (int k = 0; k < 4; k++) cfg(13'h1000 | 13'(4 * (16*b + e) + k), w[8*k +: 8]);
  endtask

  task automatic spike(int n, logic [4:0] w);
    send(make_spike(4'd0, 4'd0, 4'(n), w));
    n_spk++;
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (encoder_busy || packet_out_valid);
  endtask

  // Fill one block: entries below 'used' are destinations, the rest unused.
  task automatic fill_block(int b, int used, logic [3:0] x, ref logic [31:0] q [$]);
    for (int e = 0; e < 16; e++) begin
      logic [31:0] w;
      if (e < used) begin
        w = make_spike(x, 4'(e), 4'(15 - e), 5'(e));
        q.push_back(w);
      end else w = 32'h0;
      set_entry(b, e, w);
    end
  endtask

  initial begin
    int n0, n3;
    rst_n = 1'b0; packet_in = '0; packet_in_valid = 1'b0; packet_out_ack = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- Configuration ----
    for (int j = 0; j < 16; j++) for (int i = 0; i < 16; i++) set_wt(j, i, 5'd1);
    // thresholds are 0 after reset; lookup: output 0 -> blocks 0 and 5, output 3 -> block 1
    cfg(13'h140 + 0, 8'b0000_0001);
    cfg(13'h140 + 0, 8'b0010_0001);
    cfg(13'h140 + 8*3, 8'b0000_0010);
    fill_block(0, 3, 4'd1, row0);
    fill_block(5, 16, 4'd3, row0);
    fill_block(1, 5, 4'd4, row3);

    // ---- 1. fan-out, order and latency ----
    got.delete(); got_cyc.delete();
    fork
      spike(7, 5'd3);
      begin
        // spike_out rises two cycles after the NCM sees the spike
        @(posedge packet_in_valid);
        repeat (3) @(negedge clk);
        #1 check(spike_out == 16'hFFFF, "all outputs fire");
      end
    join
    wait_idle();
    check(got.size() == row0.size() + row3.size(), $sformatf("%0d packets", got.size()));
    for (int i = 0; i < got.size() && i < row0.size() + row3.size(); i++)
      check(got[i] == (i < row0.size() ? row0[i] : row3[i - row0.size()]), $sformatf("packet %0d", i));
    check(got_cyc.size() > 0 && got_cyc[0] - accept_cyc == 12, $sformatf("first packet after %0d cycles", got_cyc.size() > 0 ? got_cyc[0] - accept_cyc : -1));

    // ---- 2. integration: output 2, threshold 20, weight +5 from input 4 ----
    set_th(16 + 2, 16'd20);
    set_wt(2, 4, 5'd5);
    for (int s = 1; s <= 5; s++) begin
      bit fired;
      fired = 0;
      spike(4, 5'd1);
      repeat (4) begin @(negedge clk); #1 if (spike_out[2]) fired = 1; end
      check(fired == (s == 5), $sformatf("integration spike %0d fired=%0b", s, fired));
      if (fired && s == 5) n_integrate++;
      wait_idle();
    end

    // ---- 3. inhibition: output 5 gets -3 from input 4 ----
    set_wt(5, 4, 5'b1_0011);
    for (int s = 0; s < 4; s++) begin
      bit fired;
      fired = 0;
      spike(4, 5'd1);
      repeat (4) begin @(negedge clk); #1 if (spike_out[5]) fired = 1; end
      check(!fired, "inhibited output stays silent");
      if (!fired) n_inhib++;
      wait_idle();
    end

    // ---- 4. leak: decay strobe every 2 cycles ----
    cfg(13'h1C0, 8'd2);
    repeat (40) @(negedge clk);         // let earlier charge leak away
    for (int s = 0; s < 8; s++) begin
      bit fired;
      fired = 0;
      spike(4, 5'd1);
      repeat (4) begin @(negedge clk); #1 if (spike_out[2]) fired = 1; end
      check(!fired, "leaky output stays below threshold");
      if (!fired) n_leak++;
      wait_idle();
      repeat (40) @(negedge clk);
    end
    cfg(13'h1C0, 8'd0);

    // ---- 5. back-pressure and merging ----
    got.delete();
    random_ack = 1;
    repeat (30) spike(9, 5'd1);
    random_ack = 0;
    wait_idle();
    n0 = 0; n3 = 0;
    foreach (got[i]) begin
      if (got[i][31:28] == 4'd4) n3++; else n0++;
      check(got[i] inside {row0} || got[i] inside {row3}, "packet is a stored destination");
    end
    $display("back-pressure phase: %0d packets for output 0, %0d for output 3", n0, n3);
    check(n0 % row0.size() == 0 && n3 % row3.size() == 0 && n0 > 0 && n3 > 0, "whole packet groups");

    // ---- 6. unknown packet type ----
    begin
      logic [31:0] p;
      bit fired;
      fired = 0;
      p = make_spike(4'd0, 4'd0, 4'd7, 5'd3);
      p[23:21] = 3'b111;
      send(p);
      repeat (5) begin @(negedge clk); #1 if (spike_out != 0) fired = 1; end
      check(!fired, "unknown packet type ignored");
      if (!fired) n_unknown++;
    end

    $display("config writes=%0d topology writes=%0d spikes in=%0d output spikes=%0d packets out=%0d",
             n_cfg, n_topo, n_spk, n_fire, n_out);
    $display("stall cycles=%0d merges=%0d integrate=%0d inhibit=%0d leak=%0d unknown=%0d",
             n_stall, n_merge, n_integrate, n_inhib, n_leak, n_unknown);
    check(n_cfg > 0 && n_topo > 0 && n_spk > 0 && n_fire > 0 && n_out > 0, "basic traffic seen");
    check(n_stall > 0, "router stall seen");
    check(n_merge > 0, "spike merge seen");
    check(n_integrate > 0 && n_inhib > 0 && n_leak > 0 && n_unknown > 0, "neuron mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
