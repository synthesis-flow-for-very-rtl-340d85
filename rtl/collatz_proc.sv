// collatz_proc: pipelined AQFP processor for Collatz (3n+1) sequences.
//
// The processor is a ring of AQFP stages through which numbers circulate:
//   feedback control -> odd/even check and path selector
//     -> odd unit (3n+1 on a Kogge-Stone adder) | even unit (n/2, buffered)
//     -> termination check -> feedback loop (buffers) -> feedback control.
// Every stage is excited in its own phase, one phase after the one before it,
// and the feedback loop is padded so that the ring is a whole number of ac
// cycles long. The ring thus holds RING/NPHASE slots, each carrying one
// number (current value, start value, iteration count), and all of them
// advance together: one iteration of every number in flight per trip around
// the ring, with no number waiting for another.
//
// Stage phases (WIDTH=16, NPHASE=4): control 0, select 1, units 2..7,
// termination 8, feedback 9..11; RING = 12 phases = 3 ac cycles, 3 slots.
//
// Interface: in_valid/in_n/in_ready load start values (see
// cz_feedback_ctrl); a value is accepted only into an empty slot. out_valid
// is the end signal, a one-tick pulse with the start value, the number of
// iterations needed to reach 1, and out_err for overflow past WIDTH bits, a
// zero start value or a full iteration counter. loop_en is the external
// control of the feedback loop; holding it low empties the ring.
// Latency for a start value needing k iterations: (k-1)*RING + LAT + 3
// phases from the accepting clk edge to the tick in which out_valid is
// high, LAT = log2(WIDTH)+2 (k=16 for the start value 7: 189 phases).
// The stage list, the shift-and-add odd unit, the three-stage feedback
// buffers and the 16-bit size follow the described processor; the slot
// format, the handshake and the error exits are this design's choices.
module collatz_proc
  import aqfp_pkg::*;
#(
  parameter int unsigned WIDTH     = 16,
  parameter int unsigned STEP_W    = 10,
  parameter int unsigned NPHASE    = NPHASE_DEFAULT,
  parameter int unsigned FB_STAGES = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPHASE-1:0] ex,
  input  logic              loop_en,
  input  logic              in_valid,
  input  logic [WIDTH-1:0]  in_n,
  output logic              in_ready,
  output logic              out_valid,
  output logic [WIDTH-1:0]  out_n0,
  output logic [STEP_W-1:0] out_steps,
  output logic              out_err
);
  localparam int unsigned LAT     = ks_latency(WIDTH);
  localparam int unsigned FB_D    = cz_fb_depth(WIDTH, NPHASE, FB_STAGES);
  localparam int unsigned P_CTRL  = 0;
  localparam int unsigned P_SEL   = 1;
  localparam int unsigned P_UNIT  = 2;
  localparam int unsigned P_TERM  = P_UNIT + LAT;
  localparam int unsigned P_FB    = P_TERM + 1;
  localparam int unsigned RING    = P_FB + FB_D;
  localparam int unsigned SLOTS   = RING / NPHASE;

  // Slot after feedback control.
  logic              s_valid;
  logic [WIDTH-1:0]  s_n, s_n0;
  logic [STEP_W-1:0] s_steps;
  // After path select.
  logic [WIDTH-1:0]  odd_n, even_n;
  logic              odd_go;
  logic              t_valid;
  logic [WIDTH-1:0]  t_n0;
  logic [STEP_W-1:0] t_steps;
  // After the processing units.
  logic [WIDTH-1:0]  odd_res, even_res;
  logic              odd_ovf;
  logic              u_valid;
  logic [WIDTH-1:0]  u_n0;
  logic [STEP_W-1:0] u_steps;
  // After the termination check.
  logic              f_valid;
  logic [WIDTH-1:0]  f_n, f_n0;
  logic [STEP_W-1:0] f_steps;
  // Returning from the feedback loop.
  logic              fb_valid;
  logic [WIDTH-1:0]  fb_n, fb_n0;
  logic [STEP_W-1:0] fb_steps;

  cz_feedback_ctrl #(.WIDTH(WIDTH), .STEP_W(STEP_W), .NPHASE(NPHASE), .PHASE(P_CTRL)) u_ctrl (
    .clk, .rst_n, .ex,
    .fb_valid, .fb_n, .fb_n0, .fb_steps,
    .in_valid, .in_n, .in_ready,
    .s_valid, .s_n, .s_n0, .s_steps);

  cz_parity_sel #(.WIDTH(WIDTH), .STEP_W(STEP_W), .NPHASE(NPHASE), .PHASE(P_SEL)) u_sel (
    .clk, .rst_n, .ex,
    .s_valid, .s_n, .s_n0, .s_steps,
    .odd_n, .odd_go, .even_n, .t_valid, .t_n0, .t_steps);

  cz_odd_unit #(.WIDTH(WIDTH), .NPHASE(NPHASE), .PHASE0(P_UNIT)) u_odd (
    .clk, .rst_n, .ex, .n(odd_n), .go(odd_go), .res(odd_res), .ovf(odd_ovf));

  cz_even_unit #(.WIDTH(WIDTH), .NPHASE(NPHASE), .PHASE0(P_UNIT), .LATENCY(LAT)) u_even (
    .clk, .rst_n, .ex, .n(even_n), .res(even_res));

  // Slot tags travel beside the processing units in balancing buffers.
  aqfp_buf_chain #(.NPHASE(NPHASE), .PHASE0(P_UNIT), .DEPTH(LAT), .WIDTH(1 + WIDTH + STEP_W)) u_tags (
    .clk, .rst_n, .ex,
    .d({t_valid, t_n0, t_steps}),
    .q({u_valid, u_n0, u_steps}));

  cz_term_check #(.WIDTH(WIDTH), .STEP_W(STEP_W), .NPHASE(NPHASE), .PHASE(P_TERM)) u_term (
    .clk, .rst_n, .ex,
    .odd_res, .odd_ovf, .even_res,
    .t_valid(u_valid), .t_n0(u_n0), .t_steps(u_steps),
    .f_valid, .f_n, .f_n0, .f_steps,
    .out_valid, .out_n0, .out_steps, .out_err);

  cz_feedback_loop #(.WIDTH(WIDTH), .STEP_W(STEP_W), .NPHASE(NPHASE), .PHASE0(P_FB), .DEPTH(FB_D)) u_loop (
    .clk, .rst_n, .ex, .loop_en,
    .f_valid, .f_n, .f_n0, .f_steps,
    .fb_valid, .fb_n, .fb_n0, .fb_steps);

  initial begin
    assert (RING % NPHASE == 0) else $error("collatz_proc: ring is not a whole number of ac cycles");
    assert (WIDTH >= 3) else $error("collatz_proc: WIDTH must be at least 3");
    assert (SLOTS >= 1);
  end

  // A start value is only ever accepted into an empty slot.
  a_no_clobber: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready) |-> !fb_valid);
endmodule
