// tb_aqfp_top: end-to-end run of the whole design at its default size
// (4-phase clock, 16-bit Collatz processor, 4-16 decoder, 8-bit adder,
// majority timing model), all driven at once from the shared clock tree.
//   - Collatz: a stream of start values including 7 (16 iterations) and 27
//     (111), an overflowing one and zero; every result and its latency is
//     compared with a software model; then the ring is drained with loop_en.
//   - Decoder: all 32 (en, bin) inputs, result 5 phases later.
//   - Adder: 1500 random operand pairs with carry-in, result 5 phases later.
//   - Timing model: one excitation inside the window and one too late.
// Each mechanism is counted and must have happened at least once:
// back-pressure, recirculation, odd and even paths, normal end, overflow
// end, zero end, several numbers in flight, loop drain, decoder enabled and
// disabled, adder carry out, timing pass and violation, phase rotation.
module tb_aqfp_top;
  import aqfp_pkg::*;
  localparam int RING = 12;
  localparam int LAT = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] ex;
  logic [1:0] phase;
  logic ac1, ac2;
  logic loop_en, cz_in_valid, cz_in_ready, cz_out_valid, cz_out_err;
  logic [15:0] cz_in_n, cz_out_n0;
  logic [9:0] cz_out_steps;
  logic [3:0] dec_bin;
  logic dec_en;
  logic [15:0] dec_out;
  logic [7:0] ks_a, ks_b;
  logic ks_cin;
  logic [8:0] ks_sum;
  aqfp_sig_t tm_a, tm_b, tm_c, tm_d;
  logic tm_xin, tm_xout, tm_err;
  timing_viol_e tm_viol;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  aqfp_top dut (.*);

  function automatic void ref_cz(longint unsigned n0, output int steps, output bit err);
    longint unsigned n;
    n = n0; steps = 0; err = 1'b0;
    forever begin
      n = (n % 2 == 1) ? 3 * n + 1 : n / 2;
      steps++;
      if (n >= 64'd65536) begin err = 1'b1; break; end
      if (n == 1) break;
      if (n == 0 || steps == 1023) begin err = 1'b1; break; end
    end
  endfunction

  // Mechanism counters.
  int c_acc = 0, c_stall = 0, c_recirc = 0, c_odd = 0, c_even = 0, c_end = 0;
  int c_ovf = 0, c_zero = 0, c_busy = 0, c_drop = 0, c_den = 0, c_ddis = 0;
  int c_cout = 0, c_tok = 0, c_tviol = 0, c_rot = 0;
  int steps7 = -1;
  bit dec_done = 1'b0;

  int unsigned acc_cyc [int unsigned];
  int unsigned q [$];
  logic [1:0] last_phase;

  always @(posedge clk) if (rst_n) begin
    int busy;
    if (phase == last_phase + 2'd1 || (phase == 2'd0 && last_phase == 2'd3)) c_rot++;
    last_phase = phase;
    if (cz_in_valid && cz_in_ready) begin acc_cyc[cz_in_n] = cyc; c_acc++; void'(q.pop_front()); end
    if (cz_in_valid && ex[0] && !cz_in_ready) c_stall++;
    if (ex[0] && dut.u_collatz.fb_valid) c_recirc++;
    if (ex[1] && dut.u_collatz.s_valid && dut.u_collatz.s_n[0]) c_odd++;
    if (ex[1] && dut.u_collatz.s_valid && !dut.u_collatz.s_n[0]) c_even++;
    busy = int'(dut.u_collatz.s_valid) + int'(dut.u_collatz.u_valid) + int'(dut.u_collatz.f_valid);
    if (busy >= 2) c_busy++;
    if (cz_out_valid) begin
      int k; bit e;
      checks++;
      ref_cz(cz_out_n0, k, e);
      if (!acc_cyc.exists(cz_out_n0) || cz_out_steps != 10'(k) || cz_out_err != e
          || cyc - acc_cyc[cz_out_n0] != (k - 1) * RING + LAT + 3) begin
        failures++;
        $display("FAIL collatz n0=%0d steps=%0d err=%b exp %0d %b", cz_out_n0, cz_out_steps, cz_out_err, k, e);
      end
      if (cz_out_n0 == 7) steps7 = int'(cz_out_steps);
      if (!cz_out_err) c_end++;
      else if (cz_out_n0 == 0) c_zero++;
      else c_ovf++;
      acc_cyc.delete(cz_out_n0);
    end
  end

  always @(negedge clk) begin
    cz_in_valid = rst_n && q.size() > 0;
    cz_in_n = (q.size() > 0) ? 16'(q[0]) : '0;
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Collatz stream.
  initial begin : collatz
    loop_en = 1'b1;
    q = '{7, 27, 0, 65535, 1, 255, 1000, 9999, 31, 41, 54, 73};
    for (int i = 0; i < 20; i++) q.push_back(2000 + 131 * i);
  end

  // Decoder and adder, one input per ac cycle, in phase 0.
  initial begin : dec_ks
    dec_bin = '0; dec_en = 1'b0; ks_a = '0; ks_b = '0; ks_cin = 1'b0;
    wait (rst_n);
    for (int i = 0; i < 1500; i++) begin
      logic [15:0] dexp;
      logic [8:0] sexp;
      logic [3:0] bv; logic ev;
      @(negedge clk);
      while (!ex[0]) @(negedge clk);
      bv = 4'(i); ev = (i < 32) ? 1'(i >> 4) : 1'($urandom);
      dec_bin = bv; dec_en = ev;
      ks_a = 8'($urandom); ks_b = 8'($urandom); ks_cin = 1'($urandom);
      dexp = ev ? (16'd1 << bv) : 16'd0;
      sexp = {1'b0, ks_a} + {1'b0, ks_b} + {8'd0, ks_cin};
      repeat (5) @(negedge clk);
      checks++;
      if (dec_out != dexp) begin failures++; $display("FAIL decoder en=%b bin=%0d out=%h", ev, bv, dec_out); end
      checks++;
      if (ks_sum != sexp) begin failures++; $display("FAIL adder got %0d exp %0d", ks_sum, sexp); end
      if (ev) c_den++; else c_ddis++;
      if (sexp[8]) c_cout++;
    end
    dec_done = 1'b1;
  end

  // Timing model: one good excitation and one late one, on a time base
  // of 1 time unit per tick.
  logic tm_tclk = 1'b0;
  always #1 tm_tclk = ~tm_tclk;

  initial begin : timing
    tm_a = '0; tm_b = '0; tm_c = '0; tm_xin = 1'b0;
    wait (rst_n);
    repeat (10) @(negedge tm_tclk);
    tm_a = '{on: 1, val: 1}; tm_b = '{on: 1, val: 0}; tm_c = '{on: 1, val: 1};
    repeat (20) @(negedge tm_tclk);
    tm_xin = 1'b1;
    repeat (10) @(negedge tm_tclk);
    checks++;
    if (tm_err || !tm_d.on || tm_d.val != 1'b1 || !tm_xout) begin
      failures++; $display("FAIL timing model pass case");
    end else c_tok++;
    tm_xin = 1'b0; tm_a = '0; tm_b = '0; tm_c = '0;
    repeat (20) @(negedge tm_tclk);
    tm_a = '{on: 1, val: 0}; tm_b = '{on: 1, val: 0}; tm_c = '{on: 1, val: 1};
    repeat (80) @(negedge tm_tclk);
    tm_xin = 1'b1;
    repeat (10) @(negedge tm_tclk);
    checks++;
    if (!tm_err || tm_viol != TV_LATE) begin failures++; $display("FAIL timing model late case"); end
    else c_tviol++;
    tm_xin = 1'b0; tm_a = '0; tm_b = '0; tm_c = '0;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (q.size() == 0 && acc_cyc.size() == 0);
    // Drain: three long runs in flight, then cut the loop.
    q = '{27, 703, 871};
    wait (q.size() == 0);
    repeat (30) @(posedge clk);
    loop_en = 1'b0;
    repeat (2 * RING) @(posedge clk);
    c_drop = acc_cyc.size();
    checks++;
    if (c_drop != 3 || dut.u_collatz.fb_valid || dut.u_collatz.f_valid) begin
      failures++; $display("FAIL drain: %0d numbers dropped", c_drop);
    end
    acc_cyc.delete();
    loop_en = 1'b1;
    wait (dec_done);
    $display("collatz: accepted=%0d stalls=%0d recirc=%0d odd=%0d even=%0d end=%0d ovf=%0d zero=%0d multi=%0d drop=%0d steps(7)=%0d",
             c_acc, c_stall, c_recirc, c_odd, c_even, c_end, c_ovf, c_zero, c_busy, c_drop, steps7);
    $display("decoder: enabled=%0d disabled=%0d  adder: carry_out=%0d  timing: pass=%0d violation=%0d  phase steps=%0d",
             c_den, c_ddis, c_cout, c_tok, c_tviol, c_rot);
    checks++;
    if (c_acc == 0 || c_stall == 0 || c_recirc == 0 || c_odd == 0 || c_even == 0 || c_end == 0
        || c_ovf == 0 || c_zero == 0 || c_busy == 0 || c_drop == 0 || c_den == 0 || c_ddis == 0
        || c_cout == 0 || c_tok == 0 || c_tviol == 0 || c_rot == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    if (steps7 != 16) begin failures++; $display("FAIL 7 needs 16 iterations, got %0d", steps7); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
