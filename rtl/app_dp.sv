// app_dp: datapath module of the example application ("Module2").
//
// Holds the two operand registers a and b and instantiates the
// compare-and-subtract unit (app_alu) and the iteration counter (app_iter).
// In S1 (ctl.load) it takes the operands; in S3 (ctl.step) it replaces the
// larger operand by the difference computed in S2. When the operands are
// equal, a holds the greatest common divisor.
//
// Like every module of the checkpointed design it embeds a checkpointing
// circuit (cpc_node, NLOCAL = 2: word 0 = a, word 1 = b) whose children are
// the circuits of app_alu (child 0) and app_iter (child 1), so a save sends
// a, b, then the words of app_alu, then that of app_iter. The module
// function is a choice of this implementation; the tree of embedded
// checkpointing circuits follows the published structure.
//
// Timing: registers update at the clock edge when en; a restore overrides.
module app_dp
  import ckpt_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  app_ctl_t  ctl,
  input  cp_word_t  op_a,
  input  cp_word_t  op_b,
  output cp_word_t  a,
  output logic      eq,      // operands equal (from the last compare)
  output cp_word_t  iter,
  // checkpointing tree
  input  cpc_down_t cpc_dn,
  output cpc_up_t   cpc_up
);

  cp_word_t b;
  logic     gt;
  cp_word_t diff;

  logic [1:0][CP_DW-1:0] regs_q, regs_d;
  logic                  regs_load;
  cpc_down_t [1:0]       ch_dn;
  cpc_up_t   [1:0]       ch_up;

  assign regs_q[0] = a;
  assign regs_q[1] = b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '0;
      b <= '0;
    end else if (regs_load) begin
      a <= regs_d[0];
      b <= regs_d[1];
    end else if (en && ctl.load) begin
      a <= op_a;
      b <= op_b;
    end else if (en && ctl.step) begin
      if (gt) a <= diff;
      else    b <= diff;
    end
  end

  app_alu u_alu (
    .clk, .rst_n, .en, .ctl, .a, .b, .eq, .gt, .diff,
    .cpc_dn (ch_dn[0]),
    .cpc_up (ch_up[0])
  );

  app_iter u_iter (
    .clk, .rst_n, .en, .ctl, .iter,
    .cpc_dn (ch_dn[1]),
    .cpc_up (ch_up[1])
  );

  cpc_node #(.NLOCAL(2), .NCHILD(2)) u_cpc (
    .clk, .rst_n,
    .parent_dn (cpc_dn),
    .parent_up (cpc_up),
    .child_dn  (ch_dn),
    .child_up  (ch_up),
    .regs_q, .regs_d, .regs_load,
    .busy      ()
  );

endmodule
