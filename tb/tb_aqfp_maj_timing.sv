// tb_aqfp_maj_timing: drives the majority-gate timing model with input
// currents and excitations at chosen distances, counted in time-base ticks.
// The first part sets the window to 5..40 ticks. Inside it the output must
// be the majority of the inputs, appearing on the 5th edge after the
// excitation, with no error; an
// excitation 2 ticks after the data is "early", 60 after is "late", one
// with an input missing is "no data", each with err raised. The output
// current must vanish after the excitation ends, and xout must repeat xin
// 2 ticks later.
// A second part builds a chain of four buffers (majority gates with their
// three inputs tied together) with the model's default window (15..70
// ticks), excited one phase (50 ticks) apart for half an ac cycle (100
// ticks) each, as in a 5 GHz 4-phase circuit at 1 ps per tick. Clock skew is
// added to chosen gates: without skew and with 12 ticks of skew per stage the
// chain must pass its input through unharmed; 30 ticks per stage makes the
// second gate see its excitation late; pulling one gate 35 ticks early makes
// it fail early and the gate after it late.
module tb_aqfp_maj_timing;
  import aqfp_pkg::*;
  localparam int TD = 5;
  localparam int TW = 2;

  logic tclk = 1'b0;
  logic rst_n = 1'b0;
  aqfp_sig_t a, b, c, d;
  logic xin, xout, err;
  timing_viol_e viol;
  int checks = 0, failures = 0;
  int n_ok = 0, n_early = 0, n_late = 0, n_nodata = 0;

  always #1 tclk = ~tclk;

  // Buffer chain with default timing parameters.
  localparam int NCH = 4;
  localparam int PH = 50;
  localparam int HALF = 100;
  localparam int LEAD = 45;
  aqfp_sig_t ch_in;
  aqfp_sig_t ch_d [NCH];
  logic [NCH-1:0] ch_x, ch_err;
  timing_viol_e ch_viol [NCH];
  int n_chain = 0;

  for (genvar k = 0; k < NCH; k++) begin : chain
    aqfp_sig_t din;
    assign din = (k == 0) ? ch_in : ch_d[(k == 0) ? 0 : k - 1];
    aqfp_maj_timing u_buf (
      .tclk, .rst_n, .a(din), .b(din), .c(din), .xin(ch_x[k]), .d(ch_d[k]),
      .xout(), .err(ch_err[k]), .viol(ch_viol[k]));
  end

  aqfp_maj_timing #(.T_MINUS(5), .T_PLUS(40), .T_DELAY(TD), .T_WIRE(TW)) dut (
    .tclk, .rst_n, .a, .b, .c, .xin, .d, .xout, .err, .viol);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic ticks(int n);
    repeat (n) @(negedge tclk);
  endtask

  // One excitation cycle: inputs on, excitation dt ticks later, then both
  // removed. present: which inputs carry current.
  task automatic cycle(logic [2:0] v, logic [2:0] present, int dt, timing_viol_e expv);
    logic m;
    m = (v[0] & v[1]) | (v[1] & v[2]) | (v[0] & v[2]);
    a = '{on: present[0], val: v[0]};
    b = '{on: present[1], val: v[1]};
    c = '{on: present[2], val: v[2]};
    ticks(dt);
    xin = 1'b1;
    ticks(1);
    chk(viol == expv, $sformatf("violation %s expected %s (dt=%0d)", viol.name(), expv.name(), dt));
    chk(err == (expv != TV_NONE), "err flag");
    chk(xout == 1'b0, "xout not before T_WIRE");
    ticks(1);
    chk(xout == 1'b1, "xout follows xin");
    ticks(TD - 3);
    chk(d.on == 1'b0, "output not before T_DELAY");
    ticks(1);
    chk(d.on == 1'b1, "output current present");
    if (expv == TV_NONE) chk(d.val == m, "majority value");
    case (expv)
      TV_NONE:  n_ok++;
      TV_EARLY: n_early++;
      TV_LATE:  n_late++;
      default:  n_nodata++;
    endcase
    ticks(10);
    a = '0; b = '0; c = '0;
    xin = 1'b0;
    ticks(TD + 1);
    chk(d.on == 1'b0, "output current removed");
    chk(xout == 1'b0, "xout low");
    ticks(10);
  endtask

  // One data item through the chain. skew[k] shifts gate k's excitation
  // (in ticks) from its nominal time; expv[k] is the verdict expected of
  // gate k. The last gate's output is sampled while it is excited.
  task automatic chain_item(logic v, int skew [NCH], timing_viol_e expv [NCH]);
    int st [NCH];
    aqfp_sig_t last;
    bit all_ok;
    last = '0;
    all_ok = 1'b1;
    for (int k = 0; k < NCH; k++) st[k] = LEAD + k * PH + skew[k];
    for (int t = 0; t < LEAD + NCH * PH + HALF + 80; t++) begin
      ch_in = (t < LEAD + HALF + 10) ? '{on: 1'b1, val: v} : '0;
      for (int k = 0; k < NCH; k++) ch_x[k] = (t >= st[k] && t < st[k] + HALF);
      ticks(1);
      if (t == st[NCH-1] + 20) last = ch_d[NCH-1];
    end
    ch_in = '0;
    for (int k = 0; k < NCH; k++) begin
      chk(ch_viol[k] == expv[k], $sformatf("chain gate %0d verdict %s expected %s", k, ch_viol[k].name(), expv[k].name()));
      chk(ch_err[k] == (expv[k] != TV_NONE), $sformatf("chain gate %0d err", k));
      if (expv[k] != TV_NONE) all_ok = 1'b0;
    end
    chk(last.on == 1'b1, "chain output current present");
    if (all_ok) chk(last.val == v, "chain passes its input through");
    for (int k = 0; k < NCH; k++) chk(ch_d[k].on == 1'b0, "chain idle after the item");
    n_chain++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; c = '0; xin = 1'b0;
    ch_in = '0; ch_x = '0;
    ticks(4);
    rst_n = 1'b1;
    ticks(4);
    for (int i = 0; i < 8; i++) cycle(3'(i), 3'b111, 20, TV_NONE);
    for (int i = 0; i < 20; i++) cycle(3'($urandom), 3'b111, 5 + ($urandom % 36), TV_NONE);
    cycle(3'b011, 3'b111, 5, TV_NONE);
    cycle(3'b011, 3'b111, 40, TV_NONE);
    cycle(3'b011, 3'b111, 2, TV_EARLY);
    cycle(3'b101, 3'b111, 4, TV_EARLY);
    cycle(3'b110, 3'b111, 60, TV_LATE);
    cycle(3'b110, 3'b111, 41, TV_LATE);
    cycle(3'b111, 3'b101, 20, TV_NODATA);
    cycle(3'b000, 3'b000, 20, TV_NODATA);
    // A change of an input value while waiting restarts the window.
    a = '{on: 1, val: 1}; b = '{on: 1, val: 1}; c = '{on: 1, val: 0};
    ticks(30);
    b = '{on: 1, val: 0};
    ticks(2);
    xin = 1'b1;
    ticks(1);
    chk(viol == TV_EARLY && err, "late change of an input seen as early excitation");
    xin = 1'b0; a = '0; b = '0; c = '0;
    ticks(20);
    chk(n_ok == 30 && n_early == 2 && n_late == 2 && n_nodata == 2, "all cases covered");
    // Buffer chain.
    for (int i = 0; i < 6; i++)
      chain_item(1'(i), '{0, 0, 0, 0}, '{TV_NONE, TV_NONE, TV_NONE, TV_NONE});
    chain_item(1'b1, '{0, 12, 24, 36}, '{TV_NONE, TV_NONE, TV_NONE, TV_NONE});
    chain_item(1'b0, '{0, 12, 24, 36}, '{TV_NONE, TV_NONE, TV_NONE, TV_NONE});
    chain_item(1'b1, '{0, 30, 60, 90}, '{TV_NONE, TV_LATE, TV_LATE, TV_LATE});
    chain_item(1'b1, '{0, 0, -35, 0}, '{TV_NONE, TV_NONE, TV_EARLY, TV_LATE});
    chain_item(1'b0, '{-20, 0, 0, 0}, '{TV_NONE, TV_NONE, TV_NONE, TV_NONE});
    chk(n_chain == 11, "chain cases run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
