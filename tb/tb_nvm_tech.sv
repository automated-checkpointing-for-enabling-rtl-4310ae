// tb_nvm_tech: runs the same long computation on three copies of the
// platform that differ only in the non-volatile memory technology, NAND
// Flash, phase-change memory (PCM) and spin-transfer-torque memory (STTM),
// and reports the time and energy overheads of checkpointing for each.
//
// Per-cell figures (Flash / PCM / STTM): write energy 17.5 / 6 / 1.6 nJ,
// read energy 1.5 / 1 / 0.2 nJ, write latency 125 / 15 / 7 ns, read latency
// 6.2 / 0.8 / 0.4 ns. A 32-bit word is taken as 32 cells accessed one after
// the other, at a 1 MHz clock, so the per-word write latency is 4 / 1 / 1
// cycles and every read takes 1 cycle.
//
// Checks: every copy computes the right result and step count and takes at
// least one checkpoint; the energy overhead falls from Flash to PCM to STTM.
module tb_nvm_tech;
  localparam real E_RUN = 350.0e-12;
  logic clk = 0;
  logic start;
  logic [31:0] op_a, op_b;
  logic [2:0] done, powered;
  logic [31:0] result [3], steps [3];
  int checks = 0, failures = 0;

  ehd_platform #(.WR_LAT(4), .RD_LAT(1), .E_WR(32 * 17.5e-9), .E_RD(32 * 1.5e-9)) p_flash (
    .clk, .start, .op_a, .op_b, .done(done[0]), .result(result[0]), .steps(steps[0]), .powered(powered[0]));
  ehd_platform #(.WR_LAT(1), .RD_LAT(1), .E_WR(32 * 6.0e-9), .E_RD(32 * 1.0e-9)) p_pcm (
    .clk, .start, .op_a, .op_b, .done(done[1]), .result(result[1]), .steps(steps[1]), .powered(powered[1]));
  ehd_platform #(.WR_LAT(1), .RD_LAT(1), .E_WR(32 * 1.6e-9), .E_RD(32 * 0.2e-9)) p_sttm (
    .clk, .start, .op_a, .op_b, .done(done[2]), .result(result[2]), .steps(steps[2]), .powered(powered[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real e_over [3], t_over [3];
  int  taken [3];

  initial begin
    logic [31:0] ra, rb, n;
    real ideal_cyc;
    ra = 32'd1000003; rb = 32'd3; n = 0;
    while (ra != rb) begin
      if (ra > rb) ra = ra - rb; else rb = rb - ra;
      n++;
    end
    // S1, then S2/S3 per step, a final S2/S3, S4
    ideal_cyc = 2.0 * real'(n) + 4.0;
    start = 0; op_a = 32'd1000003; op_b = 32'd3;
    repeat (10) @(negedge clk);
    start = 1;
    while (done != 3'b111) @(negedge clk);
    e_over[0] = p_flash.drawn; e_over[1] = p_pcm.drawn; e_over[2] = p_sttm.drawn;
    t_over[0] = real'(p_flash.run_cycles); t_over[1] = real'(p_pcm.run_cycles);
    t_over[2] = real'(p_sttm.run_cycles);
    taken[0] = p_flash.n_taken; taken[1] = p_pcm.n_taken; taken[2] = p_sttm.n_taken;
    for (int i = 0; i < 3; i++) begin
      e_over[i] = e_over[i] / (ideal_cyc * E_RUN) - 1.0;
      t_over[i] = t_over[i] / ideal_cyc - 1.0;
      checks++;
      if (result[i] != ra || steps[i] != n) begin
        failures++; $display("copy %0d: result %0d steps %0d", i, result[i], steps[i]);
      end
      checks++;
      if (taken[i] == 0) begin failures++; $display("copy %0d took no checkpoint", i); end
    end
    checks += p_flash.checks + p_pcm.checks + p_sttm.checks;
    failures += p_flash.failures + p_pcm.failures + p_sttm.failures;
    $display("Flash: %0d checkpoints, time overhead %.3f %%, energy overhead %.3f %%", taken[0], 100.0 * t_over[0], 100.0 * e_over[0]);
    $display("PCM  : %0d checkpoints, time overhead %.3f %%, energy overhead %.3f %%", taken[1], 100.0 * t_over[1], 100.0 * e_over[1]);
    $display("STTM : %0d checkpoints, time overhead %.3f %%, energy overhead %.3f %%", taken[2], 100.0 * t_over[2], 100.0 * e_over[2]);
    checks++;
    if (!(e_over[0] > e_over[1] && e_over[1] > e_over[2])) begin
      failures++; $display("energy overheads not ordered Flash > PCM > STTM");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
