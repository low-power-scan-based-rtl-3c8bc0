`timescale 1ns/1ps
// seed_store: on-chip memory of the LFSR seeds that encode the
// deterministic test patterns.
//
// DEPTH words of W bits, one synchronous write port and one asynchronous
// read port. Written from outside before the BIST runs; read by the test
// controller when it reseeds the LFSR. Contents are not reset.
module seed_store #(
  parameter int unsigned DEPTH = lpbist_pkg::NUM_SEEDS_D,
  parameter int unsigned W     = lpbist_pkg::LFSR_W_D,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
