// app_iter: iteration counter of the example application ("Module4").
//
// Counts the passes through the application's S2 -> S3 loop; it is cleared
// when the operands are loaded (ctl.load) and incremented on every
// subtraction step (ctl.step). The count is part of the checkpoint through
// the embedded checkpointing circuit (cpc_node, one word, no children). The
// function of this module is a choice of this implementation; embedding a
// checkpointing circuit in every module follows the published structure.
//
// Timing: updates at the clock edge when en; a restore overrides it.
module app_iter
  import ckpt_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  app_ctl_t  ctl,
  output cp_word_t  iter,
  // checkpointing tree
  input  cpc_down_t cpc_dn,
  output cpc_up_t   cpc_up
);

  logic [0:0][CP_DW-1:0] regs_q, regs_d;
  logic                  regs_load;
  cpc_down_t [0:0]       nc_dn;
  cpc_up_t   [0:0]       nc_up;

  assign regs_q[0] = iter;
  assign nc_up     = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                iter <= '0;
    else if (regs_load)        iter <= regs_d[0];
    else if (en && ctl.load)   iter <= '0;
    else if (en && ctl.step)   iter <= iter + 1'b1;
  end

  cpc_node #(.NLOCAL(1), .NCHILD(0)) u_cpc (
    .clk, .rst_n,
    .parent_dn (cpc_dn),
    .parent_up (cpc_up),
    .child_dn  (nc_dn),
    .child_up  (nc_up),
    .regs_q, .regs_d, .regs_load,
    .busy      ()
  );

endmodule
