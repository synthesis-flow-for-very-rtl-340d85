// ks_adder: Kogge-Stone prefix carry-look-ahead adder, pipelined per logic
// level as an AQFP circuit is.
//
// Each logic level of an AQFP circuit is a row of clocked gates excited in
// its own phase, so the adder is a pipeline with one register stage per
// level:
//   level 0          generate/propagate: g[i] = a[i]&b[i], p[i] = a[i]^b[i];
//                    bit 0 absorbs the carry-in as g[0] = MAJ(a0, b0, cin),
//                    a single AQFP majority gate.
//   levels 1..log2W  prefix combine at distance 2^(l-1):
//                    G = G_hi | P_hi & G_lo, P = P_hi & P_lo.
//   last level       sum[i] = p[i] ^ G[i-1], sum[0] = p[0] ^ cin,
//                    sum[WIDTH] = G[WIDTH-1] (carry out).
// The raw propagate bits and the carry-in travel beside the prefix tree in
// balancing stages so that every gate sees inputs of the same phase.
//
// Interface: a, b, cin are captured on the clk edge where ex[PHASE0] is high;
// sum (WIDTH+1 bits, carry out on top) is valid LATENCY = log2(WIDTH)+2 phases
// later and holds for one ac cycle. A new operand pair may be applied every
// ac cycle (NPHASE ticks). rst_n clears the pipeline.
// The Kogge-Stone structure and the 8-bit default follow the described test
// circuit; the carry-in and its folding into a majority gate are this design's
// choice (it lets the same adder compute 3n+1).
module ks_adder
  import aqfp_pkg::*;
#(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned NPHASE = NPHASE_DEFAULT,
  parameter int unsigned PHASE0 = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic [WIDTH-1:0]  a,
  input  logic [WIDTH-1:0]  b,
  input  logic              cin,
  output logic [WIDTH:0]    sum
);
  localparam int unsigned LOG     = $clog2(WIDTH);
  localparam int unsigned LATENCY = ks_latency(WIDTH);

  // Stage s holds the prefix state after level s (s = 0 .. LOG).
  logic [WIDTH-1:0] gs [LOG+1];
  logic [WIDTH-1:0] ps [LOG+1];
  logic [WIDTH-1:0] pr [LOG+1];   // raw propagate, carried for the sum level
  logic             cs [LOG+1];   // carry-in, carried for sum bit 0

  // Level 0: generate / propagate.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gs[0] <= '0; ps[0] <= '0; pr[0] <= '0; cs[0] <= 1'b0;
    end else if (ex[PHASE0 % NPHASE]) begin
      gs[0]    <= a & b;
      gs[0][0] <= (a[0] & b[0]) | (a[0] & cin) | (b[0] & cin);
      ps[0]    <= a ^ b;
      ps[0][0] <= 1'b0;            // bit 0 already resolved by the majority
      pr[0]    <= a ^ b;
      cs[0]    <= cin;
    end
  end

  // Prefix levels.
  for (genvar l = 1; l <= LOG; l++) begin : g_level
    localparam int unsigned DIST = 1 << (l - 1);
    logic [WIDTH-1:0] g_n, p_n;
    always_comb begin
      for (int i = 0; i < WIDTH; i++) begin
        if (i >= DIST) begin
          g_n[i] = gs[l-1][i] | (ps[l-1][i] & gs[l-1][i-DIST]);
          p_n[i] = ps[l-1][i] & ps[l-1][i-DIST];
        end else begin
          g_n[i] = gs[l-1][i];
          p_n[i] = ps[l-1][i];
        end
      end
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        gs[l] <= '0; ps[l] <= '0; pr[l] <= '0; cs[l] <= 1'b0;
      end else if (ex[(PHASE0 + l) % NPHASE]) begin
        gs[l] <= g_n;
        ps[l] <= p_n;
        pr[l] <= pr[l-1];
        cs[l] <= cs[l-1];
      end
    end
  end

  // Sum level.
  logic [WIDTH:0] sum_n;
  always_comb begin
    sum_n[0] = pr[LOG][0] ^ cs[LOG];
    for (int i = 1; i < WIDTH; i++) sum_n[i] = pr[LOG][i] ^ gs[LOG][i-1];
    sum_n[WIDTH] = gs[LOG][WIDTH-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                                   sum <= '0;
    else if (ex[(PHASE0 + LATENCY - 1) % NPHASE]) sum <= sum_n;
  end

  initial begin
    assert (WIDTH >= 2) else $error("ks_adder: WIDTH must be at least 2");
  end
endmodule
