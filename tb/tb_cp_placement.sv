// tb_cp_placement: runs the same long computation with the checkpoint
// circuits placed in four different ways (the CP_MASK parameter) and shows
// why a circuit is needed inside every feedback loop.
//
// gcd(1000003, 3) loops 333 336 times through S2-S3, far more than one
// charge of the 3.3 uF capacitor can run. The four copies of the platform
// differ only in CP_MASK:
//   0: 5'b00100  after the loop-end S3 only (the chip's default);
//   1: 5'b01111  after every working state S1..S4;
//   2: 5'b00010  after S2, also inside the loop but not at its end;
//   3: 5'b01001  after S1 and S4, so there is no circuit inside the loop.
// The NVM is PCM-like. Copies 0..2 must finish with the right result, take
// checkpoints and never lose power before one (the 30 % energy reserve is
// enough). More circuits cost nothing at run time when only the first
// location after the budget runs out is used, so copies 0 and 1 must take
// the same number of checkpoints, within one, with energy overheads within
// one percentage point. Copy 3 passes its circuit after S1 while the budget
// is still high, then runs out of energy inside the loop every time: it must
// never take a checkpoint, fail at least three times, start afresh at every
// power-up and never finish.
module tb_cp_placement;
  localparam real E_RUN = 350.0e-12;
  localparam int  N = 4;
  localparam real E_WR = 32 * 6.0e-9, E_RD = 32 * 1.0e-9;   // PCM-like NVM
  logic clk = 0;
  logic start;
  logic [31:0] op_a, op_b;
  logic [N-1:0] done, powered;
  logic [31:0] result [N], steps [N];
  int checks = 0, failures = 0;

  ehd_platform #(.CP_MASK(5'b00100), .WR_LAT(1), .E_WR(E_WR), .E_RD(E_RD)) p0 (
    .clk, .start, .op_a, .op_b, .done(done[0]), .result(result[0]), .steps(steps[0]), .powered(powered[0]));
  ehd_platform #(.CP_MASK(5'b01111), .WR_LAT(1), .E_WR(E_WR), .E_RD(E_RD)) p1 (
    .clk, .start, .op_a, .op_b, .done(done[1]), .result(result[1]), .steps(steps[1]), .powered(powered[1]));
  ehd_platform #(.CP_MASK(5'b00010), .WR_LAT(1), .E_WR(E_WR), .E_RD(E_RD)) p2 (
    .clk, .start, .op_a, .op_b, .done(done[2]), .result(result[2]), .steps(steps[2]), .powered(powered[2]));
  ehd_platform #(.CP_MASK(5'b01001), .WR_LAT(1), .E_WR(E_WR), .E_RD(E_RD)) p3 (
    .clk, .start, .op_a, .op_b, .done(done[3]), .result(result[3]), .steps(steps[3]), .powered(powered[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // figures of each copy, taken when it first reports done
  logic   [N-1:0] fin = '0;
  real    drawn [N];
  longint cyc [N];
  int     taken [N], brown [N], skip [N];
  logic [31:0] res [N], stp [N];

  always @(negedge clk) begin
    if (done[0] && !fin[0]) begin
      fin[0] = 1; res[0] = result[0]; stp[0] = steps[0];
      drawn[0] = p0.drawn; cyc[0] = p0.run_cycles; taken[0] = p0.n_taken; brown[0] = p0.n_brownout; skip[0] = p0.n_skip;
    end
    if (done[1] && !fin[1]) begin
      fin[1] = 1; res[1] = result[1]; stp[1] = steps[1];
      drawn[1] = p1.drawn; cyc[1] = p1.run_cycles; taken[1] = p1.n_taken; brown[1] = p1.n_brownout; skip[1] = p1.n_skip;
    end
    if (done[2] && !fin[2]) begin
      fin[2] = 1; res[2] = result[2]; stp[2] = steps[2];
      drawn[2] = p2.drawn; cyc[2] = p2.run_cycles; taken[2] = p2.n_taken; brown[2] = p2.n_brownout; skip[2] = p2.n_skip;
    end
    if (done[3] && !fin[3]) fin[3] = 1;
  end

  initial begin
    logic [31:0] ra, rb, n;
    real ideal_cyc;
    real e_over [3];
    ra = 32'd1000003; rb = 32'd3; n = 0;
    while (ra != rb) begin
      if (ra > rb) ra = ra - rb; else rb = rb - ra;
      n++;
    end
    ideal_cyc = 2.0 * real'(n) + 4.0;
    start = 0; op_a = 32'd1000003; op_b = 32'd3;
    repeat (10) @(negedge clk);
    start = 1;
    while (fin[2:0] != 3'b111) @(negedge clk);

    for (int i = 0; i < 3; i++) begin
      e_over[i] = drawn[i] / (ideal_cyc * E_RUN) - 1.0;
      checks += 3;
      if (res[i] != ra || stp[i] != n) begin
        failures++; $display("copy %0d: result %0d steps %0d", i, res[i], stp[i]);
      end
      if (taken[i] == 0) begin failures++; $display("copy %0d took no checkpoint", i); end
      if (brown[i] != 0) begin failures++; $display("copy %0d lost power %0d times", i, brown[i]); end
      $display("copy %0d: %0d checkpoints, %0d locations passed, time overhead %.3f %%, energy overhead %.3f %%",
               i, taken[i], skip[i], 100.0 * (real'(cyc[i]) / ideal_cyc - 1.0), 100.0 * e_over[i]);
    end
    checks++;
    if (taken[1] > taken[0] + 1 || taken[0] > taken[1] + 1) begin
      failures++; $display("more circuits changed the checkpoint count: %0d against %0d", taken[1], taken[0]);
    end
    checks++;
    if (e_over[1] - e_over[0] > 0.01 || e_over[0] - e_over[1] > 0.01) begin
      failures++; $display("more circuits changed the energy overhead");
    end

    $display("copy 3 (no circuit in the loop): %0d power cycles, %0d supply failures, %0d fresh starts, %0d checkpoints, %0d locations passed",
             p3.power_cycles, p3.n_brownout, p3.n_fresh, p3.n_taken, p3.n_skip);
    checks += 5;
    if (fin[3])                            begin failures++; $display("copy 3 finished"); end
    if (p3.n_taken != 0)                   begin failures++; $display("copy 3 took a checkpoint"); end
    if (p3.n_brownout < 3)                 begin failures++; $display("copy 3 lost power only %0d times", p3.n_brownout); end
    if (p3.n_fresh != p3.power_cycles)     begin failures++; $display("copy 3 did not start afresh every time"); end
    if (p3.n_skip == 0)                    begin failures++; $display("copy 3 never passed its circuit after S1"); end

    for (int i = 0; i < N; i++) begin
      checks   += (i == 0) ? p0.checks   : (i == 1) ? p1.checks   : (i == 2) ? p2.checks   : p3.checks;
      failures += (i == 0) ? p0.failures : (i == 1) ? p1.failures : (i == 2) ? p2.failures : p3.failures;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
