// tb_power_traces: runs the same long computation under five different
// synthetic harvesting traces of equal average power and compares the
// checkpointing overheads.
//
// Each trace is a train of energy impulses: Poisson arrivals (mean gap 20 000
// cycles) with normally distributed amplitudes (standard deviation 30 % of
// the mean), averaging 1 % of the chip's power. A sixth copy runs on a
// constant harvest of the same average. Because the harvested power is far
// below the chip's consumption, the capacitor's discharge, and so the number
// of checkpoints and the overheads, should hardly depend on the trace.
//
// Checks: every copy computes the right result and step count and takes at
// least one checkpoint; the energy overheads of all six lie within 5
// percentage points of each other.
module tb_power_traces;
  localparam real E_RUN = 350.0e-12;
  localparam int  N = 6;
  localparam real E_WR = 32 * 17.5e-9, E_RD = 32 * 1.5e-9;   // Flash-like NVM
  logic clk = 0;
  logic start;
  logic [31:0] op_a, op_b;
  logic [N-1:0] done, powered;
  logic [31:0] result [N], steps [N];
  int checks = 0, failures = 0;

  ehd_platform #(.TRACE(0), .E_WR(E_WR), .E_RD(E_RD)) p0 (
    .clk, .start, .op_a, .op_b, .done(done[0]), .result(result[0]), .steps(steps[0]), .powered(powered[0]));
  ehd_platform #(.TRACE(1), .SEED(11), .E_WR(E_WR), .E_RD(E_RD)) p1 (
    .clk, .start, .op_a, .op_b, .done(done[1]), .result(result[1]), .steps(steps[1]), .powered(powered[1]));
  ehd_platform #(.TRACE(1), .SEED(222), .E_WR(E_WR), .E_RD(E_RD)) p2 (
    .clk, .start, .op_a, .op_b, .done(done[2]), .result(result[2]), .steps(steps[2]), .powered(powered[2]));
  ehd_platform #(.TRACE(1), .SEED(3333), .E_WR(E_WR), .E_RD(E_RD)) p3 (
    .clk, .start, .op_a, .op_b, .done(done[3]), .result(result[3]), .steps(steps[3]), .powered(powered[3]));
  ehd_platform #(.TRACE(1), .SEED(44444), .E_WR(E_WR), .E_RD(E_RD)) p4 (
    .clk, .start, .op_a, .op_b, .done(done[4]), .result(result[4]), .steps(steps[4]), .powered(powered[4]));
  ehd_platform #(.TRACE(1), .SEED(555555), .E_WR(E_WR), .E_RD(E_RD)) p5 (
    .clk, .start, .op_a, .op_b, .done(done[5]), .result(result[5]), .steps(steps[5]), .powered(powered[5]));

  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real    drawn [N], e_over [N], lo, hi;
  longint cyc [N], off [N];
  int     taken [N], pchk [N], pfail [N];

  initial begin
    logic [31:0] ra, rb, n;
    real ideal_cyc;
    ra = 32'd1000003; rb = 32'd3; n = 0;
    while (ra != rb) begin
      if (ra > rb) ra = ra - rb; else rb = rb - ra;
      n++;
    end
    ideal_cyc = 2.0 * real'(n) + 4.0;
    start = 0; op_a = 32'd1000003; op_b = 32'd3;
    repeat (10) @(negedge clk);
    start = 1;
    while (done != {N{1'b1}}) @(negedge clk);
    drawn[0] = p0.drawn; cyc[0] = p0.run_cycles; taken[0] = p0.n_taken; pchk[0] = p0.checks; pfail[0] = p0.failures; off[0] = p0.off_cycles;
    drawn[1] = p1.drawn; cyc[1] = p1.run_cycles; taken[1] = p1.n_taken; pchk[1] = p1.checks; pfail[1] = p1.failures; off[1] = p1.off_cycles;
    drawn[2] = p2.drawn; cyc[2] = p2.run_cycles; taken[2] = p2.n_taken; pchk[2] = p2.checks; pfail[2] = p2.failures; off[2] = p2.off_cycles;
    drawn[3] = p3.drawn; cyc[3] = p3.run_cycles; taken[3] = p3.n_taken; pchk[3] = p3.checks; pfail[3] = p3.failures; off[3] = p3.off_cycles;
    drawn[4] = p4.drawn; cyc[4] = p4.run_cycles; taken[4] = p4.n_taken; pchk[4] = p4.checks; pfail[4] = p4.failures; off[4] = p4.off_cycles;
    drawn[5] = p5.drawn; cyc[5] = p5.run_cycles; taken[5] = p5.n_taken; pchk[5] = p5.checks; pfail[5] = p5.failures; off[5] = p5.off_cycles;
    lo = 1.0e9; hi = -1.0e9;
    for (int i = 0; i < N; i++) begin
      e_over[i] = drawn[i] / (ideal_cyc * E_RUN) - 1.0;
      if (e_over[i] < lo) lo = e_over[i];
      if (e_over[i] > hi) hi = e_over[i];
      checks += pchk[i] + 2;
      failures += pfail[i];
      if (result[i] != ra || steps[i] != n) begin
        failures++; $display("trace %0d: result %0d steps %0d", i, result[i], steps[i]);
      end
      if (taken[i] == 0) begin failures++; $display("trace %0d took no checkpoint", i); end
      $display("trace %0d: %0d checkpoints, time overhead %.3f %%, energy overhead %.3f %%, %0d cycles off",
               i, taken[i], 100.0 * (real'(cyc[i]) / ideal_cyc - 1.0), 100.0 * e_over[i], off[i]);
    end
    checks++;
    if (hi - lo > 0.05) begin
      failures++; $display("energy overheads spread over %.2f percentage points", 100.0 * (hi - lo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
