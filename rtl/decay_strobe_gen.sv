// decay_strobe_gen - membrane potential decay strobe generator.
//
// Emits a one-cycle pulse every 'period' clock cycles; all neurons of the
// neural computing module shift their membrane potential right on this pulse,
// so the period programs the leakage coefficient. period = 0 stops the
// strobe (no leak). The counter restarts when the period is rewritten to a
// value below the current count. A programmable decay strobe generator is
// part of the published neural computing module; the counter form, the 16-bit
// period width and the meaning of 0 are this design's own choices.
module decay_strobe_gen #(
  parameter int unsigned PERIOD_W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PERIOD_W-1:0] period,
  output logic                strobe
);

  logic [PERIOD_W-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count  <= '0;
      strobe <= 1'b0;
    end else if (period == '0) begin
      count  <= '0;
      strobe <= 1'b0;
    end else if (count >= period - 1'b1) begin
      count  <= '0;
      strobe <= 1'b1;
    end else begin
      count  <= count + 1'b1;
      strobe <= 1'b0;
    end
  end

endmodule
