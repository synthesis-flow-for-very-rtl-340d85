// tb_collatz_proc: end-to-end check of the pipelined Collatz processor.
// Start values are offered back to back; each must leave once, with the
// iteration count (and error flag) of an independent software model, after
// exactly (k-1)*RING + LAT + 3 phases for k iterations (RING = 12, LAT = 6
// at 16 bits). Covered: back-pressure while all slots are busy, feedback
// recirculation, both processing paths, overflow and zero start values,
// several numbers in flight, and draining the ring with loop_en low. A 4-bit
// processor (the size of the prototype; its ring is padded to 12 phases)
// runs the start values 1..15 beside it.
module tb_collatz_proc;
  localparam int NPHASE = 4;
  localparam int W = 16;
  localparam int SW = 10;
  localparam int LAT = 6;
  localparam int RING = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPHASE-1:0] ex;
  logic loop_en;
  logic in_valid, in_ready, out_valid, out_err;
  logic [W-1:0] in_n, out_n0;
  logic [SW-1:0] out_steps;
  logic in4_valid, in4_ready, out4_valid, out4_err;
  logic [3:0] in4_n, out4_n0;
  logic [SW-1:0] out4_steps;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;
  assign ex = NPHASE'(1) << (cyc % NPHASE);

  collatz_proc #(.WIDTH(W), .STEP_W(SW), .NPHASE(NPHASE)) dut (
    .clk, .rst_n, .ex, .loop_en, .in_valid, .in_n, .in_ready,
    .out_valid, .out_n0, .out_steps, .out_err);

  collatz_proc #(.WIDTH(4), .STEP_W(SW), .NPHASE(NPHASE)) dut4 (
    .clk, .rst_n, .ex, .loop_en, .in_valid(in4_valid), .in_n(in4_n), .in_ready(in4_ready),
    .out_valid(out4_valid), .out_n0(out4_n0), .out_steps(out4_steps), .out_err(out4_err));

  // Software model: iterations until 1, or the error exit.
  function automatic void ref_cz(longint unsigned n0, int w, output int steps, output bit err);
    longint unsigned n;
    n = n0; steps = 0; err = 1'b0;
    forever begin
      n = (n % 2 == 1) ? 3 * n + 1 : n / 2;
      steps++;
      if (n >= (64'd1 << w)) begin err = 1'b1; break; end
      if (n == 1) break;
      if (n == 0 || steps == (1 << SW) - 1) begin err = 1'b1; break; end
    end
  endfunction

  // Bookkeeping per start value.
  int unsigned acc_cyc [int unsigned];
  int unsigned acc4_cyc [int unsigned];
  int n_acc = 0, n_out = 0, n_stall = 0, n_recirc = 0, n_odd = 0, n_even = 0;
  int n_err = 0, max_busy = 0, n_out4 = 0, n_drop = 0;
  int unsigned q [$];
  int unsigned q4 [$];

  always @(posedge clk) if (rst_n) begin
    int busy;
    if (in_valid && in_ready) begin acc_cyc[in_n] = cyc; n_acc++; void'(q.pop_front()); end
    if (in4_valid && in4_ready) begin acc4_cyc[in4_n] = cyc; void'(q4.pop_front()); end
    if (in_valid && ex[0] && !in_ready) n_stall++;
    if (ex[0] && dut.fb_valid) n_recirc++;
    if (ex[1] && dut.s_valid && dut.s_n[0]) n_odd++;
    if (ex[1] && dut.s_valid && !dut.s_n[0]) n_even++;
    busy = int'(dut.s_valid) + int'(dut.u_valid) + int'(dut.f_valid);
    if (busy > max_busy) max_busy = busy;
    if (out_valid) begin
      int k; bit e; int exp_lat;
      n_out++;
      checks++;
      if (!acc_cyc.exists(out_n0)) begin
        failures++; $display("FAIL unexpected output n0=%0d", out_n0);
      end else begin
        ref_cz(out_n0, W, k, e);
        exp_lat = (k - 1) * RING + LAT + 3;
        if (out_steps != SW'(k) || out_err != e || cyc - acc_cyc[out_n0] != exp_lat) begin
          failures++;
          $display("FAIL n0=%0d steps=%0d err=%b lat=%0d exp %0d %b %0d", out_n0, out_steps,
                   out_err, cyc - acc_cyc[out_n0], k, e, exp_lat);
        end
        acc_cyc.delete(out_n0);
      end
      if (out_err) n_err++;
    end
    if (out4_valid) begin
      int k; bit e;
      n_out4++;
      checks++;
      ref_cz(out4_n0, 4, k, e);
      if (!acc4_cyc.exists(out4_n0) || out4_steps != SW'(k) || out4_err != e
          || cyc - acc4_cyc[out4_n0] != (k - 1) * RING + 4 + 3) begin
        failures++;
        $display("FAIL4 n0=%0d steps=%0d err=%b exp %0d %b", out4_n0, out4_steps, out4_err, k, e);
      end
      acc4_cyc.delete(out4_n0);
    end
  end

  always @(negedge clk) begin
    in_valid = rst_n && q.size() > 0;
    in_n = (q.size() > 0) ? W'(q[0]) : '0;
    in4_valid = rst_n && q4.size() > 0;
    in4_n = (q4.size() > 0) ? 4'(q4[0]) : '0;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    loop_en = 1'b1;
    q = '{7, 27, 1, 0, 65535, 43691, 6171, 97, 871, 2, 3, 4, 5, 6, 8, 9};
    for (int i = 0; i < 40; i++) q.push_back(100 + 37 * i);
    for (int i = 1; i < 16; i++) q4.push_back(i);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (q.size() == 0 && acc_cyc.size() == 0 && q4.size() == 0 && acc4_cyc.size() == 0);
    repeat (RING) @(posedge clk);
    // Drain test: load three long runs, then cut the loop.
    q = '{27, 703, 871};
    wait (q.size() == 0);
    repeat (20) @(posedge clk);
    loop_en = 1'b0;
    repeat (2 * RING) @(posedge clk);
    checks++;
    if (dut.fb_valid || dut.s_valid || dut.u_valid || dut.f_valid) begin
      failures++; $display("FAIL ring not drained with loop_en low");
    end
    n_drop = acc_cyc.size();
    acc_cyc.delete();
    loop_en = 1'b1;
    // The ring is usable again.
    q = '{7};
    wait (q.size() == 0);
    wait (acc_cyc.size() == 0);
    repeat (4) @(posedge clk);
    checks++;
    if (n_stall == 0 || n_recirc == 0 || n_odd == 0 || n_even == 0 || n_err < 3
        || max_busy < 3 || n_drop != 3 || n_out4 != 15) begin
      failures++;
      $display("FAIL coverage stall=%0d recirc=%0d odd=%0d even=%0d err=%0d busy=%0d drop=%0d out4=%0d",
               n_stall, n_recirc, n_odd, n_even, n_err, max_busy, n_drop, n_out4);
    end
    $display("accepted=%0d finished=%0d stalls=%0d recirculations=%0d odd=%0d even=%0d errors=%0d max_in_flight=%0d dropped=%0d",
             n_acc, n_out, n_stall, n_recirc, n_odd, n_even, n_err, max_busy, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
