// aqfp_buf_chain: chain of inserted AQFP buffers for path balancing.
//
// All inputs of an AQFP gate must arrive in the same excitation phase, so a
// signal that reaches a gate through fewer logic levels than its partner is
// delayed by inserted buffers, one per missing level. This module is such a
// chain for a WIDTH-bit bundle: DEPTH register stages, stage k loading on the
// clk edge where ex[(PHASE0 + k) mod NPHASE] is high. The bundle appears at q
// DEPTH phases after it was presented at d in phase PHASE0. DEPTH = 0 is a
// plain wire. rst_n clears all stages.
// The buffer-insertion rule follows the described balancing method; the
// bundling of many signals in one chain is this design's choice.
module aqfp_buf_chain #(
  parameter int unsigned NPHASE = aqfp_pkg::NPHASE_DEFAULT,
  parameter int unsigned PHASE0 = 0,
  parameter int unsigned DEPTH  = 3,
  parameter int unsigned WIDTH  = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic [WIDTH-1:0]  d,
  output logic [WIDTH-1:0]  q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_chain
    logic [WIDTH-1:0] stg [DEPTH];
    for (genvar k = 0; k < DEPTH; k++) begin : g_stage
      always_ff @(posedge clk) begin
        if (!rst_n)                             stg[k] <= '0;
        else if (ex[(PHASE0 + k) % NPHASE])     stg[k] <= (k == 0) ? d : stg[(k == 0) ? 0 : k - 1];
      end
    end
    assign q = stg[DEPTH-1];
  end
endmodule
