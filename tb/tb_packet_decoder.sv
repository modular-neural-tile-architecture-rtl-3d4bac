// tb_packet_decoder - self-checking testbench for the MNT packet decoder.
//
// Offers random spike, configuration and unknown-type packets, with random
// gaps, and checks: the acknowledge accompanies every valid packet; one cycle
// after a spike packet a single spike_in pulse carries its neuron number and
// weight; one cycle after a configuration packet exactly one of the two write
// enables is high (address bit 12 picks the topology memory) with the
// packet's address and data; unknown types and idle cycles produce nothing.
module tb_packet_decoder;
  import mnt_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] packet_in;
  logic        packet_valid, packet_ack;
  logic        cfg_we, topo_we;
  logic [11:0] write_addr;
  logic [7:0]  write_data;
  logic        spike_in;
  logic [3:0]  neuron_n;
  logic [4:0]  syn_wt;

  int checks = 0, failures = 0;
  int n_spike = 0, n_cfg = 0, n_topo = 0, n_other = 0;

  packet_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  initial begin
    logic [31:0] prev;
    bit          prev_valid;
    logic [2:0]  t;
    rst_n = 1'b0; packet_valid = 0; packet_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    prev_valid = 0; prev = '0;
    repeat (20000) begin
      @(negedge clk);
      // Outputs belong to the packet offered in the previous cycle.
      if (prev_valid && prev[23:21] == 3'b001) begin
        check(spike_in && !cfg_we && !topo_we, "spike pulse");
        check(neuron_n == prev[11:8] && syn_wt == prev[4:0], "spike fields");
      end else if (prev_valid && prev[23:21] == 3'b010) begin
        check(!spike_in && (cfg_we == !prev[20]) && (topo_we == prev[20]), "write enable select");
        check(write_addr == prev[19:8] && write_data == prev[7:0], "write fields");
      end else begin
        check(!spike_in && !cfg_we && !topo_we, "nothing for idle or unknown type");
      end
      // Next packet.
      packet_valid = $urandom_range(0, 3) != 0;
      t = ($urandom_range(0, 4) == 0) ? 3'($urandom) : (($urandom_range(0, 1) == 0) ? 3'b001 : 3'b010);
      packet_in = $urandom;
      packet_in[23:21] = t;
      #1 check(packet_ack == packet_valid, "ack follows valid");
      if (packet_valid) begin
        if (t == 3'b001) n_spike++;
        else if (t == 3'b010) begin if (packet_in[20]) n_topo++; else n_cfg++; end
        else n_other++;
      end
      prev = packet_in; prev_valid = packet_valid;
    end
    check(n_spike > 0 && n_cfg > 0 && n_topo > 0 && n_other > 0, "all packet kinds seen");
    $display("spike=%0d config=%0d topology=%0d unknown=%0d", n_spike, n_cfg, n_topo, n_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
