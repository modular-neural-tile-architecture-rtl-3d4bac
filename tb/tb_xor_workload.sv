// tb_xor_workload - two-input XOR classifier on one modular neural tile.
//
// Runs the tile as a spike-rate XOR gate with a hand-set configuration using
// three neurons: input neurons N[0,0] and N[0,1] and output neuron N[1,0].
// Two behavioural spike-rate encoders turn logic inputs into spike trains
// (logic 1: a spike every 8 cycles, logic 0: every 64 cycles). Each encoder
// spike becomes two spike packets: input A excites N[0,0] (+5) and inhibits
// N[0,1] (-5); input B does the opposite. An input neuron (threshold 12) only
// fires when its own input is clearly faster than the other, and N[1,0]
// (threshold 10, weight +15 from both) fires on every input-layer spike.
// Output 0 owns one topology memory block with one destination, so every
// output spike leaves the tile as one packet; a behavioural rate decoder
// counts those packets over a 4,000-cycle window and reads more than 20 as
// logic 1. The four input patterns are scored as a classifier: correct
// outputs c give fitness c*c (0, 1, 4, 9, 16), and the run must reach 16.
module tb_xor_workload;
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
  int out_packets = 0;
  logic [31:0] fifo [$];

  mnt_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Router side: always accept output packets and count them (rate decoder).
  assign packet_out_ack = 1'b1;
  always @(posedge clk) if (packet_out_valid) out_packets <= out_packets + 1;

  // Router side: one input packet per cycle from a queue.
  always @(negedge clk) begin
    if (packet_in_valid && packet_in_ack) void'(fifo.pop_front());
    packet_in_valid = (fifo.size() != 0);
    packet_in = packet_in_valid ? fifo[0] : 32'h0;
  end

  function automatic logic [4:0] neg(int m);
    return {1'b1, 4'(m)};
  endfunction

  task automatic cfg(logic [12:0] a, logic [7:0] d);
    fifo.push_back(make_cfg(4'd0, 4'd0, a, d));
  endtask

  // Spike-rate encoders for one input pattern, run for 'len' cycles.
  task automatic run_pattern(bit a, bit b, int len);
    int pa, pb;
    pa = a ? 8 : 64;
    pb = b ? 8 : 64;
    for (int t = 0; t < len; t++) begin
      @(posedge clk);
      if (t % pa == 0) begin
        fifo.push_back(make_spike(4'd0, 4'd0, 4'd0, 5'd5));
        fifo.push_back(make_spike(4'd0, 4'd0, 4'd1, neg(5)));
      end
      if (t % pb == 3) begin
        fifo.push_back(make_spike(4'd0, 4'd0, 4'd1, 5'd5));
        fifo.push_back(make_spike(4'd0, 4'd0, 4'd0, neg(5)));
      end
    end
  endtask

  initial begin
    int correct, count;
    bit out_bit;
    rst_n = 1'b0; packet_in_valid = 1'b0; packet_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // thresholds: inputs 0 and 1 at 12, output 0 at 10; all others left at 0
    cfg(13'h100, 8'd12); cfg(13'h102, 8'd12); cfg(13'h120, 8'd10);
    cfg(13'h000, 8'd15); cfg(13'h001, 8'd15);       // N[1,0] weights from inputs 0 and 1
    cfg(13'h1C0, 8'd32);                           // leak: halve every 32 cycles
    cfg(13'h140, 8'h01);                           // output 0 owns block 0
    begin
      logic [31:0] w;
      w = make_spike(4'd2, 4'd3, 4'd0, 5'd1);       // its single destination
      for (int k = 0; k < 4; k++) cfg(13'h1000 | 13'(k), w[8*k +: 8]);
      for (int k = 4; k < 64; k++) cfg(13'h1000 | 13'(k), 8'h00);
    end
    wait (fifo.size() == 0);
    repeat (10) @(posedge clk);

    correct = 0;
    for (int p = 0; p < 4; p++) begin
      bit a, b;
      a = p[1]; b = p[0];
      repeat (200) @(posedge clk);                  // settle between patterns
      count = out_packets;
      run_pattern(a, b, 4000);
      count = out_packets - count;
      out_bit = (count > 20);
      $display("A=%0b B=%0b: %0d output packets -> %0b", a, b, count, out_bit);
      check(out_bit == (a ^ b), $sformatf("XOR(%0b,%0b)", a, b));
      if (out_bit == (a ^ b)) correct++;
    end
    $display("fitness %0d of 16", correct * correct);
    check(correct * correct == 16, "fitness 16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
