// tb_decay_strobe_gen - self-checking testbench for the decay strobe generator.
//
// For several periods, counts the cycles between strobes and checks that the
// strobe is a single-cycle pulse repeating every 'period' cycles; checks that
// period 0 stops the strobe and that reprogramming takes effect.
module tb_decay_strobe_gen;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] period;
  logic        strobe;

  int checks = 0, failures = 0;

  decay_strobe_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Measure the distance between consecutive strobes, n times.
  task automatic measure(int p, int n);
    int last, t;
    last = -1; t = 0;
    period = 16'(p);
    // let the counter settle on the new period
    repeat (2 * p + 2) @(posedge clk);
    while (n > 0) begin
      @(posedge clk); #1; t++;
      if (strobe) begin
        if (last >= 0) begin
          check(t - last == p, $sformatf("period %0d gave %0d", p, t - last));
          n--;
        end
        last = t;
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; period = 16'd0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Period 0: no strobe at all.
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      check(strobe == 1'b0, "strobe with period 0");
    end
    measure(1, 20);
    measure(2, 20);
    measure(7, 20);
    measure(100, 10);
    measure(3, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
