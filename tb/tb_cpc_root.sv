// tb_cpc_root: self-checking testbench of the root checkpointing circuit.
// The root drives one leaf checkpointing circuit holding four register words
// (the testbench plays the module around it and the application), the
// behavioural NVM and an ADC model. The energy per cycle is raised so that
// the cycle budget is about a hundred cycles. Checked, against values worked
// out in the testbench:
//   - power-up with an empty NVM: fresh start, budget = alpha*Nc from the
//     capacitor energy, counter falls by one per running cycle;
//   - a checkpoint location with budget left is passed (cp_skipped) without
//     stopping the application;
//   - with the counter at 0 the application is stopped in the same cycle, the
//     NVM receives the header {magic, 4} and the four words, pwr_off rises;
//   - the next power-up restores the four words into the leaf;
//   - completion clears the header and raises nvm_clean; the next power-up
//     starts fresh;
//   - a save cut short by a power loss leaves no valid checkpoint.
module tb_cpc_root;
  import ckpt_pkg::*;
  localparam int unsigned AW = 8, ADC_W = 10, CNT_W = 32;
  localparam real C_F = 3.3e-6, VFS = 6.0, VOFF = 3.0, ALPHA = 0.7;
  localparam real E_CYC = 350.0e-12 * 528.0;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic adc_start, adc_valid;
  logic [ADC_W-1:0] adc_data;
  int   adc_code = 853;
  logic nvm_req, nvm_we, nvm_ack;
  logic [AW-1:0] nvm_addr;
  cp_word_t nvm_wdata, nvm_rdata;
  cpc_down_t tree_dn;
  cpc_up_t   tree_up;
  logic cp_req, app_done, app_en, pwr_off, nvm_clean;
  logic [CNT_W-1:0] count;
  logic [ADC_W-1:0] v_code;
  logic cp_taken, cp_skipped, restored, fresh_start, cleared;

  cpc_down_t [0:0] l_dn;
  cpc_up_t   [0:0] l_up;
  logic [3:0][31:0] regs_q, regs_d;
  logic regs_load, leaf_busy;
  int n_taken, n_skipped, n_restored, n_fresh, n_cleared, n_load;

  assign l_up = '0;

  cpc_root #(.AW(AW), .CNT_W(CNT_W), .ADC_W(ADC_W), .C_F(C_F), .VFS(VFS),
             .VOFF(VOFF), .ALPHA(ALPHA), .E_CYC(E_CYC)) dut (.*);

  cpc_node #(.NLOCAL(4), .NCHILD(0)) u_leaf (
    .clk, .rst_n, .parent_dn(tree_dn), .parent_up(tree_up),
    .child_dn(l_dn), .child_up(l_up),
    .regs_q, .regs_d, .regs_load, .busy(leaf_busy));

  nvm_model #(.AW(AW), .DEPTH(256), .WR_LAT(3), .RD_LAT(1)) u_nvm (
    .clk, .req(nvm_req), .we(nvm_we), .addr(nvm_addr), .wdata(nvm_wdata),
    .ack(nvm_ack), .rdata(nvm_rdata));

  always #5 clk = ~clk;

  // ADC model: answers two cycles after the request
  initial begin
    adc_valid = 0; adc_data = '0;
    forever begin
      @(negedge clk);
      if (adc_start) begin
        repeat (2) @(negedge clk);
        adc_valid = 1; adc_data = ADC_W'(adc_code);
        @(negedge clk);
        adc_valid = 0;
      end
    end
  end

  always @(posedge clk) begin
    if (cp_taken)    n_taken++;
    if (cp_skipped)  n_skipped++;
    if (restored)    n_restored++;
    if (fresh_start) n_fresh++;
    if (cleared)     n_cleared++;
    if (regs_load)   n_load++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  function automatic real budget_of(input int code);
    real v;
    v = code * VFS / (2.0 ** ADC_W);
    return (v > VOFF) ? ALPHA * C_F / 2.0 * (v * v - VOFF * VOFF) / E_CYC : 0.0;
  endfunction

  task automatic power_up();
    @(negedge clk); rst_n = 0;
    n_taken = 0; n_skipped = 0; n_restored = 0; n_fresh = 0; n_cleared = 0; n_load = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
  endtask

  // wait at most LIMIT cycles for SIG, then check that it came
  `define WAIT_FOR(SIG, LIMIT, WHAT) \
    begin \
      int n_ = 0; \
      while (!(SIG) && n_ < (LIMIT)) begin @(negedge clk); n_++; end \
      check(SIG, WHAT); \
    end

  logic [31:0] saved [4];
  real exp_b;
  int  c0;

  initial begin
    cp_req = 0; app_done = 0;
    for (int i = 0; i < 4; i++) regs_q[i] = $urandom;

    // A: fresh power-up
    power_up();
    `WAIT_FOR(fresh_start, 200, "fresh start after empty NVM")
    exp_b = budget_of(adc_code);
    check(real'(count) > exp_b * 0.999 - 2.0 && real'(count) < exp_b * 1.001 + 2.0,
          $sformatf("budget %0d expected about %f", count, exp_b));
    check(v_code == ADC_W'(adc_code), "sensed code");
    check(app_en, "application runs after fresh start");
    check(nvm_clean, "nvm_clean with an empty NVM");
    c0 = int'(count);
    repeat (10) @(negedge clk);
    check(int'(count) == c0 - 10, "counter falls one per cycle");
    // checkpoint location with budget left
    cp_req = 1; #1;
    check(app_en, "not stopped while budget left");
    @(negedge clk); cp_req = 0; #1;
    check(cp_skipped, "cp_skipped reported");
    // wait until the budget is used up
    while (count != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    check(count == 0, "counter stops at zero");
    for (int i = 0; i < 4; i++) begin regs_q[i] = $urandom; saved[i] = regs_q[i]; end
    cp_req = 1; #1;
    check(!app_en, "stopped in the cycle of the activated checkpoint");
    `WAIT_FOR(pwr_off, 300, "power-off request after save")
    check(n_taken == 1, "one checkpoint taken");
    check(!app_en, "application held during save");
    check(u_nvm.mem[0] == {CP_MAGIC, 16'd4}, $sformatf("header %h", u_nvm.mem[0]));
    for (int i = 0; i < 4; i++)
      check(u_nvm.mem[1 + i] == saved[i], $sformatf("NVM word %0d", i));

    // B: power returns, checkpoint restored
    cp_req = 0;
    for (int i = 0; i < 4; i++) regs_q[i] = '0;
    adc_code = 900;
    power_up();
    `WAIT_FOR(restored, 300, "restore after power-up")
    repeat (2) @(negedge clk);
    check(n_fresh == 0, "no fresh start when a checkpoint exists");
    check(n_load == 1, "leaf loaded once");
    for (int i = 0; i < 4; i++) check(regs_d[i] == saved[i], $sformatf("restored word %0d", i));
    check(app_en, "application runs after restore");
    check(!nvm_clean, "no nvm_clean while a checkpoint is stored");
    exp_b = budget_of(900);
    check(real'(count) < exp_b * 1.001 + 2.0 && real'(count) > exp_b * 0.999 - 40.0,
          "budget reloaded at power-up");
    // completion clears the checkpoint
    app_done = 1; #1;
    check(!app_en, "held while the checkpoint is cleared");
    `WAIT_FOR(cleared, 100, "checkpoint cleared on completion")
    @(negedge clk);
    check(app_en, "runs again after clearing");
    check(nvm_clean, "nvm_clean after clearing");
    check(u_nvm.mem[0] == 32'h0, "header invalid after completion");
    app_done = 0;

    // C: next power-up starts fresh
    power_up();
    `WAIT_FOR(fresh_start, 200, "fresh start after completion")

    // D: power lost in the middle of a save
    while (count != 0) @(negedge clk);
    cp_req = 1;
    // cut the supply while the second checkpoint word is being written
    while (!(nvm_req && nvm_we && nvm_addr == AW'(2))) @(negedge clk);
    cp_req = 0;
    power_up();
    `WAIT_FOR(fresh_start, 200, "interrupted save leaves no valid checkpoint")
    check(n_restored == 0, "nothing restored from an interrupted save");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
