// aqfp_maj_timing: timing-window model of one AQFP majority gate, sampled on
// a fine time base.
//
// The phase-level RTL elsewhere assumes every gate meets its timing. This
// model checks what makes that true: an AQFP gate switches correctly only if
// its input currents are present and settled when the excitation current
// arrives, inside a window [T_MINUS, T_PLUS] after the data. Signals use the
// two-state form of the multi-value encoding (aqfp_sig_t): on=0 is "no
// current", on=1 carries logic val. All times are counted in periods of the
// time-base clock tclk (for example 1 ps per tick; one phase at 5 GHz with
// 4-phase clocking is then 50 ticks). In a chain of gates excited one phase
// apart, data reach the next gate T_DELAY after its neighbour's excitation,
// so the nominal distance is one phase minus T_DELAY (45 ticks with the
// defaults), and the default window 15..70 ticks allows about -30..+25
// ticks of clock skew between neighbours.
//
// Input-order state machine (one step per tclk edge):
//   IDLE  no input current present
//   PART  some, not all, inputs present
//   DATA  all three present; dt counts ticks since the last arrival or
//         change of an input
// On the tclk edge that first sees xin high (the excitation) the gate checks
//   T_MINUS <= dt <= T_PLUS   output = majority(a, b, c)     (TV_NONE)
//   dt < T_MINUS              excitation too early            (TV_EARLY)
//   dt > T_PLUS               excitation too late             (TV_LATE)
//   state is not DATA         no data when excited            (TV_NODATA)
// On a violation the output value is random (the physical gate is then
// decided by noise; here a 16-bit LFSR) and err is raised; viol names the
// case. err/viol change on the excitation edge. The output current turns on
// with its value T_DELAY edges after the excitation is seen (that edge
// counted as the first) and turns off T_DELAY edges after xin is seen low.
// xout repeats xin T_WIRE ticks later: the excitation line runs on to the
// next gate with a transport delay. rst_n clears everything.
// The window check, the input-order state machine, the random output on a
// violation and the ports (a, b, c, d, xin, xout) follow the described cell
// model; the sampled time base and the default window numbers are this
// design's choices and must be set from characterisation.
module aqfp_maj_timing
  import aqfp_pkg::*;
#(
  parameter int unsigned T_MINUS = 15,
  parameter int unsigned T_PLUS  = 70,
  parameter int unsigned T_DELAY = 5,
  parameter int unsigned T_WIRE  = 2
) (
  input  logic         tclk,
  input  logic         rst_n,
  input  aqfp_sig_t    a,
  input  aqfp_sig_t    b,
  input  aqfp_sig_t    c,
  input  logic         xin,
  output aqfp_sig_t    d,
  output logic         xout,
  output logic         err,
  output timing_viol_e viol
);
  typedef enum logic [1:0] {S_IDLE, S_PART, S_DATA} in_state_e;

  localparam int unsigned CW = 16;

  in_state_e        state;
  logic [CW-1:0]    dt;
  logic [5:0]       in_q;
  logic             xin_q;
  logic [15:0]      lfsr;
  logic             changed, rise, fall;
  logic             all_on, any_on, maj;
  timing_viol_e     v_n;
  aqfp_sig_t        d_pipe [T_DELAY];
  logic [T_WIRE:0]  x_pipe;

  assign changed = ({a, b, c} != in_q);
  assign rise    = xin && !xin_q;
  assign fall    = !xin && xin_q;
  assign all_on  = a.on && b.on && c.on;
  assign any_on  = a.on || b.on || c.on;
  assign maj     = (a.val & b.val) | (b.val & c.val) | (a.val & c.val);

  // Window check on the current edge (a change on this very edge is dt=0).
  always_comb begin
    logic [CW-1:0] dt_now;
    dt_now = changed ? '0 : dt;
    if (!all_on || (state != S_DATA && !changed)) v_n = TV_NODATA;
    else if (dt_now < CW'(T_MINUS))               v_n = TV_EARLY;
    else if (dt_now > CW'(T_PLUS))                v_n = TV_LATE;
    else                                          v_n = TV_NONE;
  end

  always_ff @(posedge tclk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      dt    <= '0;
      in_q  <= '0;
      xin_q <= 1'b0;
      lfsr  <= 16'hACE1;
      err   <= 1'b0;
      viol  <= TV_NONE;
    end else begin
      in_q  <= {a, b, c};
      xin_q <= xin;
      lfsr  <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (changed) begin
        state <= all_on ? S_DATA : (any_on ? S_PART : S_IDLE);
        dt    <= CW'(1);
      end else if (dt != '1) begin
        dt    <= dt + 1'b1;
      end
      if (rise) begin
        viol <= v_n;
        err  <= (v_n != TV_NONE);
      end
    end
  end

  // Output current: set on the excitation, removed when it ends, delayed.
  for (genvar k = 0; k < T_DELAY; k++) begin : g_dly
    always_ff @(posedge tclk) begin
      if (!rst_n) d_pipe[k] <= '0;
      else if (k == 0) begin
        if (rise)      d_pipe[0] <= '{on: 1'b1, val: (v_n == TV_NONE) ? maj : lfsr[0]};
        else if (fall) d_pipe[0] <= '{on: 1'b0, val: 1'b0};
      end else         d_pipe[k] <= d_pipe[(k == 0) ? 0 : k - 1];
    end
  end
  assign d = d_pipe[T_DELAY-1];

  // Excitation line to the next gate.
  always_ff @(posedge tclk) begin
    if (!rst_n) x_pipe <= '0;
    else        x_pipe <= {x_pipe[T_WIRE-1:0], xin};
  end
  assign xout = x_pipe[T_WIRE-1];

  initial begin
    assert (T_DELAY >= 1 && T_WIRE >= 1 && T_MINUS <= T_PLUS)
      else $error("aqfp_maj_timing: bad timing parameters");
  end
endmodule
