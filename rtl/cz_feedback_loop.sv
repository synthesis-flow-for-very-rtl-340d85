// cz_feedback_loop: buffered return path of the Collatz ring.
//
// AQFP output current falls along long wires, so the path back from the
// termination check to the first stage is driven through a chain of buffers
// (three by default). The loop is switched by an external control signal:
// while loop_en is low, slots entering the loop are emptied, which drains the
// ring. DEPTH may exceed three when the ring length has to be padded to a
// whole number of ac cycles.
//
// Interface: f_* enters on the clk edge where ex[PHASE0] is high and leaves
// as fb_* DEPTH phases later. loop_en is sampled at the loop entrance.
// The three-stage buffering and the external control follow the described
// loop; the meaning of the control (emptying slots) is this design's choice.
module cz_feedback_loop #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned STEP_W = 10,
  parameter int unsigned NPHASE = aqfp_pkg::NPHASE_DEFAULT,
  parameter int unsigned PHASE0 = 0,
  parameter int unsigned DEPTH  = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic              loop_en,
  input  logic              f_valid,
  input  logic [WIDTH-1:0]  f_n,
  input  logic [WIDTH-1:0]  f_n0,
  input  logic [STEP_W-1:0] f_steps,
  output logic              fb_valid,
  output logic [WIDTH-1:0]  fb_n,
  output logic [WIDTH-1:0]  fb_n0,
  output logic [STEP_W-1:0] fb_steps
);
  localparam int unsigned BW = 1 + 2 * WIDTH + STEP_W;

  aqfp_buf_chain #(.NPHASE(NPHASE), .PHASE0(PHASE0), .DEPTH(DEPTH), .WIDTH(BW)) u_loop (
    .clk, .rst_n, .ex,
    .d({f_valid && loop_en, f_n, f_n0, f_steps}),
    .q({fb_valid, fb_n, fb_n0, fb_steps}));

  initial begin
    assert (DEPTH >= 1) else $error("cz_feedback_loop: DEPTH must be at least 1");
  end
endmodule
