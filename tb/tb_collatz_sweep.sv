// tb_collatz_sweep: the Collatz iteration-count workload over a whole
// range of start values, run on three processors side by side.
//   lane 0: the processor at its default parameters (16 bits), start values
//           1 .. 65535. Trajectories that leave 16 bits end with out_err.
//   lane 1: the same processor built 30 bits wide, start values 1 .. 65536.
//           30 bits hold every trajectory from a start value up to 2^16
//           (the highest value reached is 593279152, from 60975), so every
//           start value must reach 1.
//   lane 2: the 16-bit processor in 3-phase clocking (its own excitation
//           generator), start values 1 .. 65535, checked against the same model.
//           Its ring is again 12 phases long but now holds 4 numbers.
// Start values are offered back to back; every result (iteration count, or
// the error exit) is compared with a software model. At the end each lane
// prints how many start values completed, how many overflowed, the largest
// iteration count and the phase ticks used per start value.
module tb_collatz_sweep;
  localparam int SW = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int unsigned cyc = 0;
  int checks = 0, failures = 0;
  bit [2:0] lane_done = '0;

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

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

  for (genvar g = 0; g < 3; g++) begin : lane
    localparam int W = (g == 1) ? 30 : 16;
    localparam int unsigned LAST = (g == 1) ? 65536 : 65535;
    localparam int NPHASE = (g == 2) ? 3 : 4;
    logic [NPHASE-1:0] ex;
    logic in_valid, in_ready, out_valid, out_err;
    logic [W-1:0] in_n, out_n0;
    logic [SW-1:0] out_steps;
    int unsigned next_n = 1;
    int unsigned n_done = 0, n_ok = 0, n_ovf = 0, max_steps = 0, max_n = 0;

    aqfp_clkgen #(.NPHASE(NPHASE)) u_clk (.clk, .rst_n, .ex, .phase(), .ac1(), .ac2());

    collatz_proc #(.WIDTH(W), .STEP_W(SW), .NPHASE(NPHASE)) dut (
      .clk, .rst_n, .ex, .loop_en(1'b1), .in_valid, .in_n, .in_ready,
      .out_valid, .out_n0, .out_steps, .out_err);

    always @(posedge clk) if (rst_n) begin
      if (in_valid && in_ready) next_n++;
      if (out_valid) begin
        int k; bit e;
        ref_cz(64'(out_n0), W, k, e);
        checks++;
        if (out_steps != SW'(k) || out_err != e) begin
          failures++;
          if (failures < 10) $display("FAIL W=%0d n0=%0d steps=%0d err=%b exp %0d %b", W, out_n0, out_steps, out_err, k, e);
        end
        n_done++;
        if (e) n_ovf++;
        else begin
          n_ok++;
          if (k > max_steps) begin max_steps = k; max_n = 32'(out_n0); end
        end
        if (n_done == LAST) begin
          checks++;
          // lanes 0 and 2 must see both kinds of exit; lane 1 must finish every value
          if (g == 1 ? (n_ovf != 0) : (n_ok == 0 || n_ovf == 0)) failures++;
          $display("W=%0d NPHASE=%0d start values=%0d reached 1=%0d left %0d bits=%0d longest=%0d iterations (n=%0d) phase ticks=%0d (%0d per value)",
                   W, NPHASE, n_done, n_ok, W, n_ovf, max_steps, max_n, cyc, cyc / LAST);
          lane_done[g] = 1'b1;
        end
      end
    end

    always @(negedge clk) begin
      in_valid = rst_n && next_n <= LAST;
      in_n = W'(next_n);
    end
  end

  initial begin : watchdog
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (lane_done == 3'b111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
