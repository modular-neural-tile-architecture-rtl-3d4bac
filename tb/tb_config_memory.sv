// tb_config_memory - self-checking testbench for the MNT configuration memory.
//
// Writes random bytes to random addresses across the whole 12-bit space
// (including addresses the memory does not use) while keeping a plain
// 4096-byte image of what was written. After every batch, each weight,
// threshold, lookup-table row and the decay period are rebuilt from that
// image using the documented byte map and compared with the outputs.
// Also checks the all-zero state after reset and that an idle write enable
// changes nothing.
module tb_config_memory;
  localparam int N = 16;
  logic                     clk = 1'b0;
  logic                     rst_n;
  logic                     we;
  logic [11:0]              waddr;
  logic [7:0]               wdata;
  logic [N-1:0][15:0]       th_in, th_out;
  logic [N-1:0][N-1:0][4:0] wt_out;
  logic [N-1:0][63:0]       lut;
  logic [15:0]              decay_period;

  int checks = 0, failures = 0;
  logic [7:0] image [4096];

  config_memory dut (.*);

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

  task automatic compare();
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        check(wt_out[j][i] == image[16*j + i][4:0], $sformatf("weight %0d,%0d", j, i));
    for (int k = 0; k < N; k++) begin
      check(th_in[k]  == {image['h101 + 2*k], image['h100 + 2*k]}, $sformatf("th_in %0d", k));
      check(th_out[k] == {image['h121 + 2*k], image['h120 + 2*k]}, $sformatf("th_out %0d", k));
    end
    for (int r = 0; r < N; r++) begin
      logic [63:0] row;
      for (int b = 0; b < 8; b++) row[8*b +: 8] = image['h140 + 8*r + b];
      check(lut[r] == row, $sformatf("lut row %0d", r));
    end
    check(decay_period == {image['h1C1], image['h1C0]}, "decay period");
  endtask

  initial begin
    foreach (image[i]) image[i] = 8'h00;
    rst_n = 1'b0; we = 1'b0; waddr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();
    for (int batch = 0; batch < 40; batch++) begin
      repeat (200) begin
        @(negedge clk);
        we    = $urandom_range(0, 4) != 0;
        waddr = ($urandom_range(0, 9) == 0) ? 12'($urandom) : 12'($urandom_range(0, 'h1C1));
        wdata = 8'($urandom);
        if (we) image[waddr] = wdata;
      end
      @(negedge clk); we = 1'b0;
      @(posedge clk); #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
