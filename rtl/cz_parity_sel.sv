// cz_parity_sel: odd-even check and path selector of the Collatz ring.
//
// The least-significant bit of the number decides its path: an odd number is
// switched to the odd processing unit, an even one to the even unit. The
// switch is a pair of AND rows, so the unit that is not selected receives
// all zeros (and, for the odd unit, no carry-in) and produces zero; the two
// results are later merged with an OR. An empty slot sends zeros to both.
//
// Interface: s_* is the slot from the feedback control stage. On the clk
// edge where ex[PHASE] is high the stage registers odd_n/odd_go (odd path:
// operand and "add one" request), even_n (even path operand) and the slot
// tags t_valid, t_n0, t_steps. Latency: one phase.
// The parity test on the LSB and the multiplexed paths follow the described
// processor; gating with AND rows is this design's choice.
module cz_parity_sel #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned STEP_W = 10,
  parameter int unsigned NPHASE = aqfp_pkg::NPHASE_DEFAULT,
  parameter int unsigned PHASE  = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic              s_valid,
  input  logic [WIDTH-1:0]  s_n,
  input  logic [WIDTH-1:0]  s_n0,
  input  logic [STEP_W-1:0] s_steps,
  output logic [WIDTH-1:0]  odd_n,
  output logic              odd_go,
  output logic [WIDTH-1:0]  even_n,
  output logic              t_valid,
  output logic [WIDTH-1:0]  t_n0,
  output logic [STEP_W-1:0] t_steps
);
  logic is_odd;
  assign is_odd = s_valid && s_n[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      odd_n   <= '0;
      odd_go  <= 1'b0;
      even_n  <= '0;
      t_valid <= 1'b0;
      t_n0    <= '0;
      t_steps <= '0;
    end else if (ex[PHASE % NPHASE]) begin
      odd_n   <= s_n & {WIDTH{is_odd}};
      odd_go  <= is_odd;
      even_n  <= s_n & {WIDTH{s_valid && !s_n[0]}};
      t_valid <= s_valid;
      t_n0    <= s_n0;
      t_steps <= s_steps;
    end
  end
endmodule
