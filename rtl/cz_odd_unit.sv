// cz_odd_unit: odd-number processing unit of the Collatz ring (3n+1).
//
// 3n+1 is formed without a multiplier: the number shifted one bit towards
// the MSB (2n, wiring only) is added to the number itself on a Kogge-Stone
// carry-look-ahead adder, and the "+1" enters as the adder's carry-in. The
// carry-in is the path-select signal, so a unit that was not selected (zero
// operand, no carry-in) returns zero. The result overflows WIDTH bits when
// the top bit of n is lost by the shift or when the adder carries out; the
// top bit travels beside the adder in balancing buffers to meet the sum.
//
// Interface: n and go are captured on the clk edge where ex[PHASE0] is high;
// res = 3n+1 (mod 2^WIDTH) and ovf are valid LATENCY = log2(WIDTH)+2 phases
// later. With go low and n zero, res is zero.
// The shift-and-add scheme on a carry-look-ahead adder follows the described
// unit; the overflow flag is this design's addition.
module cz_odd_unit
  import aqfp_pkg::*;
#(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned NPHASE = NPHASE_DEFAULT,
  parameter int unsigned PHASE0 = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic [WIDTH-1:0]  n,
  input  logic              go,
  output logic [WIDTH-1:0]  res,
  output logic              ovf
);
  localparam int unsigned LATENCY = ks_latency(WIDTH);

  logic [WIDTH:0] sum;
  logic           msb_d;

  ks_adder #(.WIDTH(WIDTH), .NPHASE(NPHASE), .PHASE0(PHASE0)) u_add (
    .clk, .rst_n, .ex, .a(n), .b({n[WIDTH-2:0], 1'b0}), .cin(go), .sum(sum));

  aqfp_buf_chain #(.NPHASE(NPHASE), .PHASE0(PHASE0), .DEPTH(LATENCY), .WIDTH(1)) u_msb (
    .clk, .rst_n, .ex, .d(n[WIDTH-1]), .q(msb_d));

  assign res = sum[WIDTH-1:0];
  assign ovf = sum[WIDTH] | msb_d;
endmodule
