`timescale 1ns/1ps
// pll: behavioural model of the clock generator that feeds the TRNG.
// This is a simulation model of an analog part, not synthesizable logic.
//
// It produces two free-running clocks, clk0 and clk1, with the periods
// CLK0_PERIOD_PS and CLK1_PERIOD_PS, and raises 'locked' after LOCK_CYCLES
// rising edges of ref_clk following reset. The clocks run only while
// rst_n is high and are held low in reset. The model does not derive its frequencies from ref_clk;
// all values are this model's choices.
module pll #(
  parameter int unsigned CLK0_PERIOD_PS = 4000,
  parameter int unsigned CLK1_PERIOD_PS = 3300,
  parameter int unsigned LOCK_CYCLES    = 8
) (
  input  logic ref_clk,
  input  logic rst_n,
  output logic clk0,
  output logic clk1,
  output logic locked
);

  int unsigned lock_cnt;

  always @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_cnt <= 0;
      locked   <= 1'b0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt <= lock_cnt + 1;
      locked   <= (lock_cnt + 1 >= LOCK_CYCLES);
    end
  end

  always begin
    #((CLK0_PERIOD_PS / 2) * 1ps);
    clk0 = rst_n ? ~clk0 : 1'b0;
  end

  always begin
    #((CLK1_PERIOD_PS / 2) * 1ps);
    clk1 = rst_n ? ~clk1 : 1'b0;
  end

endmodule
