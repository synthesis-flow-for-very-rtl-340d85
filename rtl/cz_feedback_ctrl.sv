// cz_feedback_ctrl: first stage of the Collatz ring, choosing between the
// number returning on the feedback loop and a new external number.
//
// The ring carries one number per slot; a slot passes this stage once per
// ac cycle, in phase PHASE. A number coming back from the feedback loop has
// priority. Only when the returning slot is empty is a new start value taken
// from the external input, with its iteration count set to zero.
//
// Interface: in_valid/in_n form a valid/ready handshake with in_ready, which
// is high only in the tick where ex[PHASE] is high and the returning slot is
// empty; a start value is taken on a clk edge with in_valid && in_ready.
// fb_* is the slot arriving from the feedback loop; s_* is the registered
// slot (n: current value, n0: start value, steps: iterations done).
// Feedback-over-input priority and the handshake are this design's choice;
// the description only says this stage routes between loop and input.
module cz_feedback_ctrl #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned STEP_W = 10,
  parameter int unsigned NPHASE = aqfp_pkg::NPHASE_DEFAULT,
  parameter int unsigned PHASE  = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic              fb_valid,
  input  logic [WIDTH-1:0]  fb_n,
  input  logic [WIDTH-1:0]  fb_n0,
  input  logic [STEP_W-1:0] fb_steps,
  input  logic              in_valid,
  input  logic [WIDTH-1:0]  in_n,
  output logic              in_ready,
  output logic              s_valid,
  output logic [WIDTH-1:0]  s_n,
  output logic [WIDTH-1:0]  s_n0,
  output logic [STEP_W-1:0] s_steps
);
  assign in_ready = ex[PHASE % NPHASE] && !fb_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_n     <= '0;
      s_n0    <= '0;
      s_steps <= '0;
    end else if (ex[PHASE % NPHASE]) begin
      if (fb_valid) begin
        s_valid <= 1'b1;
        s_n     <= fb_n;
        s_n0    <= fb_n0;
        s_steps <= fb_steps;
      end else begin
        s_valid <= in_valid;
        s_n     <= in_valid ? in_n : '0;
        s_n0    <= in_valid ? in_n : '0;
        s_steps <= '0;
      end
    end
  end
endmodule
