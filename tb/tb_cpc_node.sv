// tb_cpc_node: self-checking testbench of the checkpointing circuit.
// Builds a two-level tree of cpc_node instances: a parent with three local
// words and two children (two words and one word). The testbench plays the
// parent of the tree. A save must deliver the six words depth-first (parent
// words, child 0 words, child 1 words) with up_last only on the last one,
// whatever the stalls on up_ready. A restore with gaps on dn_valid must load
// every node's registers (regs_load pulse, regs_d) and raise dn_last with the
// last word only. Words move one per cycle when nothing stalls, plus one
// cycle to open each child.
module tb_cpc_node;
  import ckpt_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  cpc_down_t top_dn;
  cpc_up_t   top_up;
  cpc_down_t [1:0] ch_dn;
  cpc_up_t   [1:0] ch_up;
  cpc_down_t [0:0] l0_dn, l1_dn;
  cpc_up_t   [0:0] l0_up, l1_up;

  logic [2:0][31:0] p_q, p_d;
  logic [1:0][31:0] c0_q, c0_d;
  logic [0:0][31:0] c1_q, c1_d;
  logic p_ld, c0_ld, c1_ld, p_busy, c0_busy, c1_busy;
  int   p_ld_n, c0_ld_n, c1_ld_n;

  assign l0_up = '0;
  assign l1_up = '0;

  cpc_node #(.NLOCAL(3), .NCHILD(2)) dut (
    .clk, .rst_n, .parent_dn(top_dn), .parent_up(top_up),
    .child_dn(ch_dn), .child_up(ch_up),
    .regs_q(p_q), .regs_d(p_d), .regs_load(p_ld), .busy(p_busy));
  cpc_node #(.NLOCAL(2), .NCHILD(0)) u_c0 (
    .clk, .rst_n, .parent_dn(ch_dn[0]), .parent_up(ch_up[0]),
    .child_dn(l0_dn), .child_up(l0_up),
    .regs_q(c0_q), .regs_d(c0_d), .regs_load(c0_ld), .busy(c0_busy));
  cpc_node #(.NLOCAL(1), .NCHILD(0)) u_c1 (
    .clk, .rst_n, .parent_dn(ch_dn[1]), .parent_up(ch_up[1]),
    .child_dn(l1_dn), .child_up(l1_up),
    .regs_q(c1_q), .regs_d(c1_d), .regs_load(c1_ld), .busy(c1_busy));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (p_ld)  p_ld_n++;
    if (c0_ld) c0_ld_n++;
    if (c1_ld) c1_ld_n++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] expect_w [6];

  task automatic do_save(input int stall_pct);
    int got, cyc;
    @(negedge clk);
    top_dn = '0; top_dn.start = 1; top_dn.op_restore = 0;
    @(negedge clk);
    top_dn = '0;
    got = 0; cyc = 0;
    while (got < 6 && cyc < 1000) begin
      top_dn.up_ready = ($urandom_range(0, 99) >= stall_pct);
      #1;
      if (top_up.up_valid && top_dn.up_ready) begin
        checks++;
        if (top_up.up_data != expect_w[got]) begin
          failures++; $display("save word %0d: %h expected %h", got, top_up.up_data, expect_w[got]);
        end
        checks++;
        if (top_up.up_last != (got == 5)) begin
          failures++; $display("save word %0d: up_last=%0b", got, top_up.up_last);
        end
        got++;
      end
      @(negedge clk); cyc++;
    end
    top_dn = '0;
    checks++;
    if (got != 6) begin failures++; $display("save delivered %0d words", got); end
    // without stalls: 6 words + 2 child openings
    if (stall_pct == 0) begin
      checks++;
      if (cyc != 8) begin failures++; $display("save took %0d cycles, expected 8", cyc); end
    end
    @(negedge clk);
    checks++; if (p_busy || c0_busy || c1_busy) begin failures++; $display("tree still busy after save"); end
  endtask

  task automatic do_restore(input int gap_pct);
    int sent, cyc;
    p_ld_n = 0; c0_ld_n = 0; c1_ld_n = 0;
    @(negedge clk);
    top_dn = '0; top_dn.start = 1; top_dn.op_restore = 1;
    @(negedge clk);
    top_dn = '0;
    sent = 0; cyc = 0;
    while (sent < 6 && cyc < 1000) begin
      top_dn.dn_valid = ($urandom_range(0, 99) >= gap_pct);
      top_dn.dn_data  = expect_w[sent];
      #1;
      if (top_dn.dn_valid && top_up.dn_ready) begin
        checks++;
        if (top_up.dn_last != (sent == 5)) begin
          failures++; $display("restore word %0d: dn_last=%0b", sent, top_up.dn_last);
        end
        sent++;
      end
      @(negedge clk); cyc++;
    end
    top_dn = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (p_ld_n != 1 || c0_ld_n != 1 || c1_ld_n != 1) begin
      failures++; $display("load pulses %0d %0d %0d", p_ld_n, c0_ld_n, c1_ld_n);
    end
    checks++;
    if (p_d[0] != expect_w[0] || p_d[1] != expect_w[1] || p_d[2] != expect_w[2] ||
        c0_d[0] != expect_w[3] || c0_d[1] != expect_w[4] || c1_d[0] != expect_w[5]) begin
      failures++; $display("restored registers differ");
    end
    checks++; if (p_busy || c0_busy || c1_busy) begin failures++; $display("tree still busy after restore"); end
  endtask

  initial begin
    top_dn = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 60; round++) begin
      for (int i = 0; i < 3; i++) p_q[i] = $urandom;
      for (int i = 0; i < 2; i++) c0_q[i] = $urandom;
      c1_q[0] = $urandom;
      expect_w[0] = p_q[0]; expect_w[1] = p_q[1]; expect_w[2] = p_q[2];
      expect_w[3] = c0_q[0]; expect_w[4] = c0_q[1]; expect_w[5] = c1_q[0];
      do_save((round % 3 == 0) ? 0 : 40);
      for (int i = 0; i < 6; i++) expect_w[i] = $urandom;
      do_restore((round % 3 == 0) ? 0 : 40);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
