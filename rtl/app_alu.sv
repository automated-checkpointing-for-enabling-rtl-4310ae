// app_alu: compare-and-subtract unit of the example application ("Module3").
//
// The example application computes the greatest common divisor of two
// operands by repeated subtraction, so the number of passes through its loop
// depends on the input data. In state S2 this unit compares the operands and
// registers the flags (a == b, a > b) and the difference of the larger minus
// the smaller; in S3 the datapath writes that difference back. Its three
// registers are part of the checkpoint: they are held in an embedded
// checkpointing circuit (cpc_node, NLOCAL = 2, no children), word 0 =
// {30'b0, gt, eq}, word 1 = diff. The application itself is an example of an
// input-dependent design with the published five-state loop structure; its
// function is a choice of this implementation.
//
// Timing: registers update at the clock edge when en && ctl.cmp; a restore
// (regs_load from the CPC) overrides them.
module app_alu
  import ckpt_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  app_ctl_t  ctl,
  input  cp_word_t  a,
  input  cp_word_t  b,
  output logic      eq,
  output logic      gt,
  output cp_word_t  diff,
  // checkpointing tree
  input  cpc_down_t cpc_dn,
  output cpc_up_t   cpc_up
);

  logic [1:0][CP_DW-1:0] regs_q, regs_d;
  logic                  regs_load;
  cpc_down_t [0:0]       nc_dn;
  cpc_up_t   [0:0]       nc_up;

  assign regs_q[0] = {30'b0, gt, eq};
  assign regs_q[1] = diff;
  assign nc_up     = '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eq   <= 1'b0;
      gt   <= 1'b0;
      diff <= '0;
    end else if (regs_load) begin
      eq   <= regs_d[0][0];
      gt   <= regs_d[0][1];
      diff <= regs_d[1];
    end else if (en && ctl.cmp) begin
      eq   <= (a == b);
      gt   <= (a > b);
      diff <= (a > b) ? (a - b) : (b - a);
    end
  end

  cpc_node #(.NLOCAL(2), .NCHILD(0)) u_cpc (
    .clk, .rst_n,
    .parent_dn (cpc_dn),
    .parent_up (cpc_up),
    .child_dn  (nc_dn),
    .child_up  (nc_up),
    .regs_q, .regs_d, .regs_load,
    .busy      ()
  );

endmodule
