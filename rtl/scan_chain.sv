`timescale 1ns/1ps
// scan_chain: LEN scan flip-flops connected back to back.
//
// Cell 0 takes scan_in, cell LEN-1 drives scan_out. When the chain's clock
// is enabled (ce = 1) it shifts one position if te = 1, or captures the
// circuit-under-test values capture_d in parallel if te = 0. With ce = 0 the
// chain holds: this is the clock-disabling that keeps switching low, written
// as a synchronous enable (a clock gate in a real netlist). Cells reset to 0.
module scan_chain #(
  parameter int unsigned LEN = lpbist_pkg::CHAIN_LEN_D
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ce,
  input  logic           te,
  input  logic           scan_in,
  input  logic [LEN-1:0] capture_d,
  output logic [LEN-1:0] q,
  output logic           scan_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (ce) begin
      if (te) q <= {q[LEN-2:0], scan_in};
      else    q <= capture_d;
    end
  end

  assign scan_out = q[LEN-1];

endmodule
