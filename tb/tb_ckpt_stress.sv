// tb_ckpt_stress: checkpointing under random supply failures, with a
// checkpoint circuit after every working state.
//
// ckpt_top is built with CP_MASK = S1..S4, so checkpoints can fall after the
// operand load, after the compare (then the compare flags and difference in
// app_alu are live and must come back correctly) and after the loop-end. The
// energy per cycle is raised so that each power-up gives a budget of a few
// hundred cycles; the ADC returns a random voltage between 3.6 V and 5.9 V.
// On top of the orderly power-offs after each checkpoint, the supply fails
// at random cycles (about one in 1500), which hits runs, saves, restores and
// clears. The NVM latencies are random per power cycle.
//
// Checks: every job ends with the right result and step count; at every
// restore the complete application state (FSM state, at_cp and all data
// registers in every module) equals the state at the last checkpoint whose
// header write completed; a save cut short is never restored.
module tb_ckpt_stress;
  import ckpt_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic start;
  cp_word_t op_a, op_b, result, steps;
  logic done;
  logic adc_start, adc_valid;
  logic [9:0] adc_data, v_code;
  logic nvm_req, nvm_we, nvm_ack;
  logic [15:0] nvm_addr;
  cp_word_t nvm_wdata, nvm_rdata;
  logic pwr_off, app_en;
  logic [31:0] budget;
  logic cp_taken, cp_skipped, restored, fresh_start, cleared;

  ckpt_top #(.CP_MASK(5'b01111), .E_CYC(350.0e-12 * 600.0)) dut (.*);

  always #5 clk = ~clk;

  // NVM with a latency that changes from one power cycle to the next
  logic [31:0] mem [256];
  int wait_n, wr_lat = 3, rd_lat = 1;
  initial begin
    foreach (mem[i]) mem[i] = '0;
    nvm_ack = 0; nvm_rdata = '0; wait_n = 0;
  end
  always @(posedge clk) begin
    nvm_ack <= 1'b0;
    if (nvm_req && !nvm_ack && rst_n) begin
      if (wait_n + 1 >= (nvm_we ? wr_lat : rd_lat)) begin
        wait_n  <= 0;
        nvm_ack <= 1'b1;
        if (nvm_we) mem[nvm_addr[7:0]] <= nvm_wdata;
        else        nvm_rdata <= mem[nvm_addr[7:0]];
      end else begin
        wait_n <= wait_n + 1;
      end
    end else if (!nvm_req || !rst_n) begin
      wait_n <= 0;
    end
  end

  // ADC with a random voltage between 3.6 V and 5.9 V
  initial begin
    adc_valid = 0; adc_data = '0;
    forever begin
      @(negedge clk);
      if (adc_start && rst_n) begin
        repeat ($urandom_range(1, 3)) @(negedge clk);
        adc_valid = 1; adc_data = 10'($urandom_range(614, 1006));
        @(negedge clk);
        adc_valid = 0;
      end
    end
  end

  // snapshot of the whole application state
  typedef struct packed {
    logic [2:0] state;
    logic       at_cp;
    cp_word_t   result, steps, a, b, diff, iter;
    logic       eq, gt;
  } snap_t;

  function automatic snap_t take();
    snap_t s;
    s.state = dut.state;   s.at_cp = dut.at_cp;
    s.result = dut.result; s.steps = dut.steps;
    s.a = dut.u_dp.a;      s.b = dut.u_dp.b;
    s.diff = dut.u_dp.diff; s.iter = dut.u_dp.iter;
    s.eq = dut.u_dp.eq;    s.gt = dut.u_dp.gt;
    return s;
  endfunction

  snap_t pending, committed;
  logic  have_pending = 0;
  int n_taken = 0, n_restore = 0, n_fresh = 0, n_fail = 0, n_fail_in_save = 0, n_skip = 0, n_clear = 0;
  int power_cycles = 0;
  bit in_save = 0;

  task automatic cycle_power();
    rst_n = 0;
    repeat ($urandom_range(2, 6)) @(negedge clk);
    wr_lat = $urandom_range(1, 6);
    rd_lat = $urandom_range(1, 3);
    power_cycles++;
    rst_n = 1;
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      if (cp_skipped) n_skip++;
      if (cleared)    n_clear++;
      if (fresh_start) n_fresh++;
      if (cp_taken) begin
        n_taken++;
        pending = take();
        have_pending = 1;
        in_save = 1;
        checks++;
        if (!dut.at_cp || budget != 0) begin failures++; $display("checkpoint without at_cp or budget"); end
      end
      if (restored) begin
        snap_t now;
        n_restore++;
        now = take();
        checks++;
        if (now != committed) begin
          failures++;
          $display("restore %0d: state differs from the committed checkpoint", n_restore);
          $display("  now       st=%0d cp=%0b a=%0d b=%0d eq=%0b gt=%0b diff=%0d iter=%0d res=%0d steps=%0d", now.state, now.at_cp, now.a, now.b, now.eq, now.gt, now.diff, now.iter, now.result, now.steps);
          $display("  committed st=%0d cp=%0b a=%0d b=%0d eq=%0b gt=%0b diff=%0d iter=%0d res=%0d steps=%0d", committed.state, committed.at_cp, committed.a, committed.b, committed.eq, committed.gt, committed.diff, committed.iter, committed.result, committed.steps);
        end
      end
      if (nvm_ack && nvm_we && nvm_addr == '0 && nvm_wdata != '0) begin
        // the valid header is in the NVM: this snapshot is the stored checkpoint
        if (have_pending) committed = pending;
        have_pending = 0;
        in_save = 0;
      end
      if (pwr_off) begin
        cycle_power();
      end else if ($urandom_range(0, 1499) == 0) begin
        n_fail++;
        if (in_save) n_fail_in_save++;
        have_pending = 0;
        in_save = 0;
        cycle_power();
      end
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_job(input cp_word_t a, input cp_word_t b);
    cp_word_t ra, rb, n;
    ra = a; rb = b; n = 0;
    while (ra != rb) begin
      if (ra > rb) ra = ra - rb; else rb = rb - ra;
      n++;
    end
    @(negedge clk);
    op_a = a; op_b = b; start = 1;
    while (!done) @(negedge clk);
    checks++;
    if (result != ra || steps != n) begin
      failures++;
      $display("gcd(%0d,%0d): result %0d steps %0d, expected %0d and %0d", a, b, result, steps, ra, n);
    end
    @(negedge clk); start = 0;
    while (dut.state != S1) @(negedge clk);
  endtask

  initial begin
    start = 0; op_a = '0; op_b = '0;
    cycle_power();
    for (int j = 0; j < 40; j++)
      run_job($urandom_range(1, 60000), $urandom_range(16, 400));
    $display("power cycles=%0d checkpoints=%0d restores=%0d fresh=%0d skipped=%0d cleared=%0d supply failures=%0d (during a save: %0d)",
             power_cycles, n_taken, n_restore, n_fresh, n_skip, n_clear, n_fail, n_fail_in_save);
    checks++; if (n_taken == 0)        begin failures++; $display("no checkpoint"); end
    checks++; if (n_restore == 0)      begin failures++; $display("no restore"); end
    checks++; if (n_fail == 0)         begin failures++; $display("no supply failure"); end
    checks++; if (n_fail_in_save == 0) begin failures++; $display("no supply failure during a save"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
