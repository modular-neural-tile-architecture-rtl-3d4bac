// tb_packet_encoder - self-checking testbench for the spike packet encoder.
//
// The topology memory is modelled here as a byte array with one-cycle read
// latency, filled with random entries of which about half are marked used
// (type 001). Lookup rows are random and sparse, some empty.
// Phase A (exact): a burst of spikes on several outputs at once, router
//   always ready. The packets must come out in order (output, block, entry
//   ascending), each equal to its stored entry, at the cycle given by the
//   cost model: 1 cycle to take an output, 1 per allocated block plus 1 to
//   finish the row, 6 per entry, 1 more per packet sent.
// Phase B (random): single-output spikes at random times while the router
//   acknowledges at random. The packets are checked as a multiset against
//   the rows of the spikes sent, less the spikes the encoder reports merged.
//   Both a merge and a router stall must occur at least once.
module tb_packet_encoder;
  import mnt_pkg::*;
  localparam int N_OUT = 16, N_BLK = 64, N_SC = 16;

  logic                        clk = 1'b0;
  logic                        rst_n;
  logic [N_OUT-1:0]            spike_out;
  logic [N_OUT-1:0][N_BLK-1:0] lut;
  logic                        read_enable;
  logic [11:0]                 read_address;
  logic [7:0]                  read_data;
  logic [31:0]                 packet_out;
  logic                        packet_valid, packet_ack;
  logic                        busy, spike_merged;

  int checks = 0, failures = 0;
  int cyc = 0;
  // Loop bounds held in variables so that the simulator keeps the loops rolled.
  int nb, ns, no;
  int n_merge = 0, n_stall = 0, n_sent = 0;
  logic [7:0] mem [4096];
  int exp_cnt [logic [31:0]];
  logic [31:0] got_pkt [$];
  int          got_cyc [$];

  packet_encoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (read_enable) read_data <= mem[read_address];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] entry(int b, int e);
    int a = 4 * (N_SC * b + e);
    return {mem[a+3], mem[a+2], mem[a+1], mem[a]};
  endfunction

  // Record every transfer; count stalls.
  always @(negedge clk) begin
    if (packet_valid && packet_ack) begin
      got_pkt.push_back(packet_out);
      got_cyc.push_back(cyc);
      n_sent++;
    end
    if (packet_valid && !packet_ack) n_stall++;
  end

  task automatic fill_random();
    for (int b = 0; b < nb; b++)
      for (int e = 0; e < ns; e++) begin
        logic [31:0] w;
        w = $urandom;
        if ($urandom_range(0, 1) == 0) w[23:21] = 3'b001;
        else if (w[23:21] == 3'b001) w[23:21] = 3'b000;
        w[20:12] = '0; w[7:5] = '0;
        for (int k = 0; k < 4; k++) mem[4 * (N_SC * b + e) + k] = w[8*k +: 8];
      end
    for (int r = 0; r < no; r++) begin
      lut[r] = '0;
      if ($urandom_range(0, 3) != 0)
        for (int b = 0; b < nb; b++) lut[r][b] = ($urandom_range(0, 15) == 0);
    end
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (busy || packet_valid);
  endtask

  initial begin
    int c0, t, k;
    logic [N_OUT-1:0] burst;
    nb = N_BLK; ns = N_SC; no = N_OUT;
    rst_n = 1'b0; spike_out = '0; packet_ack = 1'b1; read_data = '0;
    fill_random();
    lut[0] = '0; lut[0][0] = 1'b1; lut[0][63] = 1'b1;   // first and last block
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------------- Phase A: exact order and timing ----------------
    for (int rep = 0; rep < 4; rep++) begin
      @(negedge clk);
      burst = 16'($urandom) | 16'h0001;
      got_pkt.delete(); got_cyc.delete();
      spike_out = burst; c0 = cyc;
      @(negedge clk); spike_out = '0;
      wait_idle();
      // Cost model
      t = c0 + 1; k = 0;
      for (int r = 0; r < no; r++) begin
        if (!burst[r]) continue;
        t += 1;                                  // take the output
        for (int b = 0; b < nb; b++) begin
          if (!lut[r][b]) continue;
          t += 1;                                // find the block
          for (int e = 0; e < ns; e++) begin
            logic [31:0] w;
            w = entry(b, e);
            t += 6;                              // read four bytes, check
            if (w[23:21] == 3'b001) begin
              check(k < got_pkt.size(), "packet missing");
              if (k < got_pkt.size()) begin
                check(got_pkt[k] == w, $sformatf("packet %0d: %h expected %h", k, got_pkt[k], w));
                check(got_cyc[k] == t, $sformatf("packet %0d at cycle %0d expected %0d", k, got_cyc[k] - c0, t - c0));
              end
              k++;
              t += 1;                            // send
            end
          end
        end
        t += 1;                                  // row finished
      end
      check(got_pkt.size() == k, $sformatf("%0d packets, expected %0d", got_pkt.size(), k));
    end

    // ---------------- Phase B: random traffic and stalls ----------------
    for (int round = 0; round < 3; round++) begin
      exp_cnt.delete(); got_pkt.delete(); got_cyc.delete();
      repeat (3000) begin
        int r;
        @(negedge clk);
        packet_ack = $urandom_range(0, 3) != 0;
        spike_out = '0;
        if ($urandom_range(0, 199) == 0) begin
          r = $urandom_range(0, N_OUT - 1);
          spike_out[r] = 1'b1;
          #1;
          for (int b = 0; b < nb; b++)
            if (lut[r][b])
              for (int e = 0; e < ns; e++) begin
                logic [31:0] w;
            w = entry(b, e);
                if (w[23:21] == 3'b001) begin
                  if (spike_merged) exp_cnt[w] = exp_cnt.exists(w) ? exp_cnt[w] : 0;
                  else exp_cnt[w] = exp_cnt.exists(w) ? exp_cnt[w] + 1 : 1;
                end
              end
          if (spike_merged) n_merge++;
        end
      end
      @(negedge clk); spike_out = '0; packet_ack = 1'b1;
      wait_idle();
      foreach (got_pkt[i]) begin
        logic [31:0] p;
        p = got_pkt[i];
        check(exp_cnt.exists(p) && exp_cnt[p] > 0, $sformatf("unexpected packet %h", p));
        if (exp_cnt.exists(p)) exp_cnt[p] = exp_cnt[p] - 1;
      end
      foreach (exp_cnt[p]) check(exp_cnt[p] == 0, $sformatf("packet %h missing %0d times", p, exp_cnt[p]));
    end
    check(n_merge > 0, "spike merge happened");
    check(n_stall > 0, "router stall happened");
    $display("packets=%0d merges=%0d stall cycles=%0d", n_sent, n_merge, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
