// ckpt_top: checkpointed design for an intermittently powered device
// ("Top Module1").
//
// A battery-less device runs from a small capacitor charged by an energy
// harvester. A long computation does not fit in one charge, so its progress is
// saved to non-volatile memory (NVM) at checkpoints and resumed after the next
// power-up. Checkpointing circuits exist only at locations chosen at design
// time (at least the end of every loop, "loop-end"); at run time a checkpoint
// is activated only once the sensed energy budget has run out, and the device
// then switches itself off until the capacitor has recharged.
//
// This module is the top of the hierarchy. It holds:
//   - the application controller, the five-state FSM S1..S5 with the loop
//     S2 -> S3 -> S2 of the published example; S3 is the loop-end. The
//     application is an example with an input-dependent number of loop
//     passes: the greatest common divisor of op_a and op_b by repeated
//     subtraction, with the number of subtraction steps;
//   - the datapath module app_dp with its own submodules;
//   - its own checkpointing circuit (cpc_node, NLOCAL = 3: word 0 =
//     {28'b0, at_cp, state}, word 1 = result, word 2 = steps; one child, the
//     circuit of app_dp);
//   - the root checkpointing circuit (cpc_root) with the activation counter,
//     the energy estimator and the NVM memory controller.
// CP_MASK marks the FSM states that end with a checkpointing circuit (bit i
// for the state encoded i; default: S3 only). When the FSM leaves a marked
// state it sets at_cp; in the next cycle, before the following state runs,
// the root either lets it go on (counter above 0) or stops it and saves, so
// the saved state is the one right after the marked state completed.
//
// The published parts are the FSM shape (S1..S5, loop S2-S3, checkpoint at
// the loop-end S3), the module tree with a checkpointing circuit in every
// module and the root next to the counter, and the run-time activation rule.
// The application function, word layout and all port protocols are choices
// of this implementation.
//
// Interface: rst_n is the power-on reset (the supply coming up). start must
// stay high until done; result and steps are valid while done is high, and
// the FSM returns to S1 when start falls. done rises only once the NVM holds
// no checkpoint, so a job seen as done can no longer be rolled back by a
// supply loss (own choice). pwr_off asks the supply switch to
// turn the device off. The ADC and NVM ports connect to parts outside the
// design.
module ckpt_top
  import ckpt_pkg::*;
#(
  parameter int unsigned AW      = 16,
  parameter int unsigned CNT_W   = 32,
  parameter int unsigned ADC_W   = 10,
  parameter logic [4:0]  CP_MASK = 5'b00100,
  parameter real         C_F     = 3.3e-6,
  parameter real         VFS     = 6.0,
  parameter real         VOFF    = 3.0,
  parameter real         ALPHA   = 0.7,
  parameter real         E_CYC   = 350.0e-12
) (
  input  logic             clk,
  input  logic             rst_n,
  // application
  input  logic             start,
  input  cp_word_t         op_a,
  input  cp_word_t         op_b,
  output logic             done,
  output cp_word_t         result,
  output cp_word_t         steps,
  // analog-to-digital converter of the capacitor voltage
  output logic             adc_start,
  input  logic             adc_valid,
  input  logic [ADC_W-1:0] adc_data,
  // non-volatile memory
  output logic             nvm_req,
  output logic             nvm_we,
  output logic [AW-1:0]    nvm_addr,
  output cp_word_t         nvm_wdata,
  input  logic             nvm_ack,
  input  cp_word_t         nvm_rdata,
  // power switch and status
  output logic             pwr_off,
  output logic             app_en,
  output logic [CNT_W-1:0] budget,
  output logic [ADC_W-1:0] v_code,
  output logic             cp_taken,
  output logic             cp_skipped,
  output logic             restored,
  output logic             fresh_start,
  output logic             cleared
);

  app_state_t state, state_nx;
  logic       at_cp;
  logic       app_end;    // FSM in S5
  logic       nvm_clean;  // no stored checkpoint left
  app_ctl_t   ctl;
  cp_word_t   a, iter;
  logic       eq;

  // checkpointing tree
  cpc_down_t       root_dn;
  cpc_up_t         root_up;
  cpc_down_t [0:0] ch_dn;
  cpc_up_t   [0:0] ch_up;
  logic [2:0][CP_DW-1:0] regs_q, regs_d;
  logic                  regs_load;

  // FSM of Fig. 2: S1 -> S2 -> S3 -> (S2 | S4) -> S5
  always_comb begin
    state_nx = state;
    ctl      = '0;
    unique case (state)
      S1: if (start) begin
        ctl.load = 1'b1;
        state_nx = S2;
      end
      S2: begin
        ctl.cmp  = 1'b1;
        state_nx = S3;
      end
      S3: if (eq) begin
        state_nx = S4;
      end else begin
        ctl.step = 1'b1;
        state_nx = S2;
      end
      S4: state_nx = S5;
      S5: if (!start) state_nx = S1;
      default: state_nx = S1;
    endcase
  end

  // done waits until the root has invalidated the stored checkpoint: before
  // that a supply loss would roll the finished job back
  assign app_end = (state == S5);
  assign done    = app_end && nvm_clean;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S1;
      at_cp  <= 1'b0;
      result <= '0;
      steps  <= '0;
    end else if (regs_load) begin
      state  <= app_state_t'(regs_d[0][2:0]);
      at_cp  <= regs_d[0][3];
      result <= regs_d[1];
      steps  <= regs_d[2];
    end else if (app_en) begin
      state <= state_nx;
      at_cp <= (state_nx != state) && CP_MASK[state];
      if (state == S4) begin
        result <= a;
        steps  <= iter;
      end
    end
  end

  assign regs_q[0] = {28'b0, at_cp, state};
  assign regs_q[1] = result;
  assign regs_q[2] = steps;

  app_dp u_dp (
    .clk, .rst_n,
    .en     (app_en),
    .ctl,
    .op_a, .op_b,
    .a, .eq, .iter,
    .cpc_dn (ch_dn[0]),
    .cpc_up (ch_up[0])
  );

  cpc_node #(.NLOCAL(3), .NCHILD(1)) u_cpc (
    .clk, .rst_n,
    .parent_dn (root_dn),
    .parent_up (root_up),
    .child_dn  (ch_dn),
    .child_up  (ch_up),
    .regs_q, .regs_d, .regs_load,
    .busy      ()
  );

  cpc_root #(
    .AW(AW), .CNT_W(CNT_W), .ADC_W(ADC_W), .C_F(C_F), .VFS(VFS),
    .VOFF(VOFF), .ALPHA(ALPHA), .E_CYC(E_CYC)
  ) u_root (
    .clk, .rst_n,
    .adc_start, .adc_valid, .adc_data,
    .nvm_req, .nvm_we, .nvm_addr, .nvm_wdata, .nvm_ack, .nvm_rdata,
    .tree_dn  (root_dn),
    .tree_up  (root_up),
    .cp_req   (at_cp),
    .app_done (app_end),
    .app_en,
    .pwr_off,
    .nvm_clean,
    .count    (budget),
    .v_code,
    .cp_taken, .cp_skipped, .restored, .fresh_start, .cleared
  );

endmodule
