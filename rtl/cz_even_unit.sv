// cz_even_unit: even-number processing unit of the Collatz ring.
//
// Halving an even number is a one-bit shift towards the LSB, which in AQFP
// is only wiring. The shifted value then passes a chain of balancing buffers
// so that it leaves this unit in the same phase as the result of the odd
// unit, whose adder needs LATENCY logic levels.
//
// Interface: n is captured on the clk edge where ex[PHASE0] is high; res =
// n >> 1 is valid LATENCY phases later. A zero input gives a zero output.
// The shift follows the described unit; the balancing depth equals the
// adder latency by this design's choice of adder.
module cz_even_unit #(
  parameter int unsigned WIDTH   = 16,
  parameter int unsigned NPHASE  = aqfp_pkg::NPHASE_DEFAULT,
  parameter int unsigned PHASE0  = 2,
  parameter int unsigned LATENCY = aqfp_pkg::ks_latency(WIDTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic [WIDTH-1:0]  n,
  output logic [WIDTH-1:0]  res
);
  aqfp_buf_chain #(.NPHASE(NPHASE), .PHASE0(PHASE0), .DEPTH(LATENCY), .WIDTH(WIDTH)) u_bal (
    .clk, .rst_n, .ex, .d(n >> 1), .q(res));
endmodule
