// tb_robot_workload - obstacle avoidance controller on one modular neural tile.
//
// A hand-set controller with two sensor channels and two motor channels:
//   input neuron 0: front sonar, spike rate rising as an obstacle gets closer
//   input neuron 3: constant-rate bias ("go") input
//   output neuron 0: acceleration, excited by the bias (+7, threshold 20) and
//                    strongly inhibited by the front sonar (-15)
//   output neuron 1: turning, excited by the front sonar (+15, threshold 10)
// Both input neurons have threshold 10 and receive +15 per spike packet, so
// they fire once per packet. Rate decoders count spike_out pulses of the two
// motor outputs over a 2,000-cycle window.
// Part 1 checks the open-loop map (clear path: move, no turn; obstacle: slow
// down and turn). Part 2 closes the loop with a behavioural robot in a world
// of walls: each window the robot moves by (acceleration count / 10) cm and
// turns away when the turning count exceeds 50. It must run 30 windows
// without reaching a wall and cover a minimum distance.
module tb_robot_workload;
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
  int acc_spikes = 0, turn_spikes = 0;
  logic [31:0] fifo [$];

  localparam int WINDOW = 2000;

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
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  assign packet_out_ack = 1'b1;

  // Rate decoders on the two motor outputs.
  always @(posedge clk) begin
    if (spike_out[0]) acc_spikes  <= acc_spikes + 1;
    if (spike_out[1]) turn_spikes <= turn_spikes + 1;
  end

  always @(negedge clk) begin
    if (packet_in_valid && packet_in_ack) void'(fifo.pop_front());
    packet_in_valid = (fifo.size() != 0);
    packet_in = packet_in_valid ? fifo[0] : 32'h0;
  end

  task automatic cfg(logic [12:0] a, logic [7:0] d);
    fifo.push_back(make_cfg(4'd0, 4'd0, a, d));
  endtask

  // Front sonar encoder: spike period from obstacle distance (0 = silent).
  function automatic int front_period(int range_cm);
    if (range_cm < 20) return 6;
    if (range_cm < 50) return 12;
    return 0;
  endfunction

  // Drive both encoders for one window and return the decoded counts.
  task automatic run_window(int range_cm, output int acc, output int turn);
    int pf, a0, t0;
    pf = front_period(range_cm);
    a0 = acc_spikes; t0 = turn_spikes;
    for (int t = 0; t < WINDOW; t++) begin
      @(posedge clk);
      if (t % 8 == 0) fifo.push_back(make_spike(4'd0, 4'd0, 4'd3, 5'd15));
      if (pf != 0 && t % pf == 3) fifo.push_back(make_spike(4'd0, 4'd0, 4'd0, 5'd15));
    end
    repeat (20) @(posedge clk);
    acc = acc_spikes - a0;
    turn = turn_spikes - t0;
  endtask

  initial begin
    int acc, turn, acc_clear, range_cm, travelled, turns;
    bit crashed;
    rst_n = 1'b0; packet_in_valid = 1'b0; packet_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    cfg(13'h100, 8'd10);                // front sonar input neuron
    cfg(13'h106, 8'd10);                // bias input neuron
    cfg(13'h120, 8'd20);                // acceleration output
    cfg(13'h122, 8'd10);                // turning output
    cfg(13'h003, 8'd7);                 // bias -> acceleration
    cfg(13'h000, 8'h1F);                // front -> acceleration, -15
    cfg(13'h010, 8'd15);                // front -> turning
    cfg(13'h1C0, 8'd64);                // leak: halve every 64 cycles
    wait (fifo.size() == 0);
    repeat (10) @(posedge clk);

    // Part 1: open-loop control map.
    run_window(100, acc_clear, turn);
    $display("clear path:  acceleration %0d, turning %0d", acc_clear, turn);
    check(acc_clear > 50, "clear path: robot accelerates");
    check(turn == 0, "clear path: no turning");
    run_window(30, acc, turn);
    $display("obstacle 30: acceleration %0d, turning %0d", acc, turn);
    check(turn > 50, "obstacle at 30: robot turns");
    run_window(10, acc, turn);
    $display("obstacle 10: acceleration %0d, turning %0d", acc, turn);
    check(acc * 4 < acc_clear, "close obstacle: robot slows down");
    check(turn > 100, "close obstacle: strong turning");

    // Part 2: closed loop.
    range_cm = 120; travelled = 0; turns = 0; crashed = 0;
    for (int w = 0; w < 30; w++) begin
      run_window(range_cm, acc, turn);
      if (turn > 50) begin
        turns++;
        range_cm = 120 - 17 * (turns % 4);  // new heading, next wall at varying range
      end else begin
        range_cm -= acc / 10;
        travelled += acc / 10;
      end
      if (range_cm <= 0) crashed = 1;
    end
    $display("closed loop: travelled %0d cm, %0d turns, crashed %0b", travelled, turns, crashed);
    check(!crashed, "closed loop: no collision in 30 windows");
    check(travelled >= 150, "closed loop: minimum travel distance");
    check(turns > 0, "closed loop: obstacles met and avoided");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
