// tb_ckpt_top: end-to-end testbench of the checkpointed design, at the
// design's default parameters.
//
// The chip runs inside the platform model ehd_platform: 3.3 uF capacitor,
// supply on at 5.0 V and off below 3.0 V, harvester at 1 % of the chip's
// 350 pJ per cycle, NAND-Flash-like NVM (write 4 cycles and 560 nJ per
// 32-bit word, read 1 cycle and 48 nJ). During the third power cycle the
// chip draws 60 % more than its estimator assumes, so the supply fails
// before a checkpoint and the work since the last one is redone.
//
// Jobs: greatest common divisors with a short and a long loop; results and
// step counts are compared with a reference computed here. Each mechanism
// (fresh start, checkpoint location passed with budget left, checkpoint
// taken with power-off, restore, supply failure with recomputation,
// checkpoint cleared on completion) must happen at least once.
module tb_ckpt_top;
  logic clk = 0;
  logic start;
  logic [31:0] op_a, op_b, result, steps;
  logic done, powered;
  int checks = 0, failures = 0;
  longint last_job_cycles = 0;

  ehd_platform #(.HEAVY(3), .WR_LAT(4), .RD_LAT(1),
                 .E_WR(32 * 17.5e-9), .E_RD(32 * 1.5e-9)) plat (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + plat.checks, failures + plat.failures);
    $finish;
  end

  task automatic run_job(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] ra, rb, n;
    longint t0;
    ra = a; rb = b; n = 0;
    while (ra != rb) begin
      if (ra > rb) ra = ra - rb; else rb = rb - ra;
      n++;
    end
    @(negedge clk);
    op_a = a; op_b = b; start = 1;
    t0 = plat.run_cycles;
    while (!done) @(negedge clk);
    checks++;
    if (result != ra || steps != n) begin
      failures++;
      $display("gcd(%0d,%0d): result %0d steps %0d, expected %0d and %0d", a, b, result, steps, ra, n);
    end else begin
      $display("gcd(%0d,%0d) = %0d after %0d steps: %0d powered cycles, %0d power cycles so far",
               a, b, result, steps, plat.run_cycles - t0, plat.power_cycles);
    end
    last_job_cycles = plat.run_cycles - t0;
    @(negedge clk); start = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    start = 0; op_a = '0; op_b = '0;
    run_job(32'd12, 32'd18);
    run_job(32'd1000003, 32'd3);
    $display("long job: %0d powered cycles for %0d cycles of computation",
             last_job_cycles, 2 * 333336 + 4);
    run_job(32'd200000, 32'd125);
    $display("fresh=%0d skipped=%0d taken=%0d restored=%0d failures_of_supply=%0d cleared=%0d on=%0d off=%0d",
             plat.n_fresh, plat.n_skip, plat.n_taken, plat.n_restore, plat.n_brownout,
             plat.n_clear, plat.run_cycles, plat.off_cycles);
    checks++; if (plat.n_fresh == 0)    begin failures++; $display("no fresh start"); end
    checks++; if (plat.n_skip == 0)     begin failures++; $display("no checkpoint location passed"); end
    checks++; if (plat.n_taken == 0)    begin failures++; $display("no checkpoint taken"); end
    checks++; if (plat.n_restore == 0)  begin failures++; $display("no restore"); end
    checks++; if (plat.n_brownout == 0) begin failures++; $display("no supply failure"); end
    checks++; if (plat.n_clear == 0)    begin failures++; $display("no checkpoint cleared"); end
    // every power-up after the first one resumes from a stored checkpoint
    checks++;
    if (plat.n_restore != plat.n_taken + plat.n_brownout) begin
      failures++; $display("restores %0d, expected %0d", plat.n_restore, plat.n_taken + plat.n_brownout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + plat.checks, failures + plat.failures);
    $finish;
  end
endmodule
