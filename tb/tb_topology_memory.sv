// tb_topology_memory - self-checking testbench for the dual-ported topology memory.
//
// Fills the 4 KByte memory through the write port, then mixes random writes
// and reads on both ports in the same cycles, comparing each read (available
// one cycle after the read enable) with a byte image kept here. A read of an
// address written in the same cycle returns the old byte. With the read
// enable low the read data must hold its last value.
module tb_topology_memory;
  logic        clk = 1'b0;
  logic        we, re;
  logic [11:0] waddr, raddr;
  logic [7:0]  wdata, rdata;

  int checks = 0, failures = 0;
  logic [7:0] image [4096];

  topology_memory dut (.*);

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
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [7:0] expect_q, last;
    bit pending;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      we = 1; waddr = 12'(a); wdata = 8'($urandom); image[a] = wdata;
    end
    @(negedge clk); we = 0;
    pending = 0; last = rdata;
    repeat (40000) begin
      @(negedge clk);
      if (pending) begin
        check(rdata == expect_q, $sformatf("read %h expected %h", rdata, expect_q));
        last = rdata;
      end else begin
        check(rdata == last, "read data held");
      end
      re = $urandom_range(0, 3) != 0;
      raddr = 12'($urandom);
      we = $urandom_range(0, 1);
      waddr = ($urandom_range(0, 3) == 0) ? raddr : 12'($urandom);
      wdata = 8'($urandom);
      pending = re;
      expect_q = image[raddr];        // old value on a same-cycle write
      if (we) image[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
