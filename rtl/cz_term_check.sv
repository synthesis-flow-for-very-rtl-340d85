// cz_term_check: termination check of the Collatz ring.
//
// The results of the two processing units are merged (only the selected one
// is non-zero), the iteration count of the slot is incremented, and the slot
// is tested: a number that has reached 1 leaves the ring on the output with
// an end signal, together with its start value and iteration count. A number
// that overflowed, became zero (zero start value) or whose count would wrap
// also leaves, with out_err set. Every other number is forwarded to the
// feedback loop.
//
// Interface: inputs are sampled on the clk edge where ex[PHASE] is high.
// f_* is the registered slot for the feedback loop. out_valid is high for
// exactly the one tick after that edge when a number finished; out_n0,
// out_steps and out_err hold until the next finished number.
// The test for 1 and the output-or-feedback decision follow the described
// stage; the error exits and the carried start value are this design's
// choice.
module cz_term_check #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned STEP_W = 10,
  parameter int unsigned NPHASE = aqfp_pkg::NPHASE_DEFAULT,
  parameter int unsigned PHASE  = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic [WIDTH-1:0]  odd_res,
  input  logic              odd_ovf,
  input  logic [WIDTH-1:0]  even_res,
  input  logic              t_valid,
  input  logic [WIDTH-1:0]  t_n0,
  input  logic [STEP_W-1:0] t_steps,
  output logic              f_valid,
  output logic [WIDTH-1:0]  f_n,
  output logic [WIDTH-1:0]  f_n0,
  output logic [STEP_W-1:0] f_steps,
  output logic              out_valid,
  output logic [WIDTH-1:0]  out_n0,
  output logic [STEP_W-1:0] out_steps,
  output logic              out_err
);
  logic [WIDTH-1:0]  merged;
  logic [STEP_W-1:0] steps1;
  logic              is_one, bad, done;

  assign merged = odd_res | even_res;
  assign steps1 = t_steps + 1'b1;
  assign is_one = (merged == WIDTH'(1));
  assign bad    = odd_ovf || (merged == '0) || (steps1 == '1);
  assign done   = t_valid && (is_one || bad);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_valid   <= 1'b0;
      f_n       <= '0;
      f_n0      <= '0;
      f_steps   <= '0;
      out_valid <= 1'b0;
      out_n0    <= '0;
      out_steps <= '0;
      out_err   <= 1'b0;
    end else if (ex[PHASE % NPHASE]) begin
      f_valid   <= t_valid && !done;
      f_n       <= merged;
      f_n0      <= t_n0;
      f_steps   <= steps1;
      out_valid <= done;
      if (done) begin
        out_n0    <= t_n0;
        out_steps <= steps1;
        out_err   <= bad && !is_one;
      end
    end else begin
      out_valid <= 1'b0;
    end
  end
endmodule
