// cpc_root: root checkpointing circuit (top CPC) of the checkpointed design.
//
// The root is the only checkpointing circuit with a memory controller and the
// only one that holds the activation counter. It sequences one power cycle of
// the device:
//   1. power-up: sense the stored energy (energy_est) and load the backward
//      counter with alpha*Nc (cp_counter);
//   2. read the header word at NVM address 0; if it marks a valid checkpoint,
//      stream the checkpoint words from address 1 on down the CPC tree, which
//      loads them into the registers of every module; one more cycle lets
//      the last module take its words before the application runs;
//   3. run the application (app_en high) while the counter counts down;
//   4. when the application reaches a checkpoint location (cp_req) with the
//      counter at 0, hold the application, invalidate the header, stream the
//      words of the whole tree into the NVM, write the header back with the
//      word count, and raise pwr_off so that the supply is switched off
//      until the capacitor has recharged. At a checkpoint location with the
//      counter above 0 the application simply goes on;
//   5. when the application reports completion, invalidate the stored
//      checkpoint so that the next run starts from the beginning. A
//      finished application is never checkpointed, and nvm_clean tells the
//      application when no stored checkpoint can roll it back any more.
// Power-up sensing, the counter, activation only at counter 0 and switching
// the device off after a checkpoint follow the published mechanism. The
// header word, the invalidate-then-write order (a save cut short by a power
// loss leaves no half-written checkpoint that looks valid) and invalidation
// on completion, no checkpoint of a finished application and nvm_clean
// are choices of this implementation.
//
// Interface: rst_n is the power-on reset; everything but the NVM is volatile.
// cp_req is registered in the application and app_en depends on it
// combinationally (app_en = 0 in the same cycle a checkpoint is activated).
// The status pulses (cp_taken, cp_skipped, restored, fresh_start, cleared)
// last one cycle each.
module cpc_root
  import ckpt_pkg::*;
#(
  parameter int unsigned AW    = 16,
  parameter int unsigned CNT_W = 32,
  parameter int unsigned ADC_W = 10,
  parameter real         C_F   = 3.3e-6,
  parameter real         VFS   = 6.0,
  parameter real         VOFF  = 3.0,
  parameter real         ALPHA = 0.7,
  parameter real         E_CYC = 350.0e-12
) (
  input  logic             clk,
  input  logic             rst_n,
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
  // CPC tree (this circuit is the parent of the top module's CPC)
  output cpc_down_t        tree_dn,
  input  cpc_up_t          tree_up,
  // application
  input  logic             cp_req,     // application is at a checkpoint location
  input  logic             app_done,   // application has finished
  output logic             app_en,     // application may advance this cycle
  // power switch
  output logic             pwr_off,    // checkpoint stored: switch the supply off
  output logic             nvm_clean,  // running, and the NVM holds no checkpoint
  // status
  output logic [CNT_W-1:0] count,      // cycles left before checkpoints activate
  output logic [ADC_W-1:0] v_code,     // capacitor voltage sensed at power-up
  output logic             cp_taken,
  output logic             cp_skipped,
  output logic             restored,
  output logic             fresh_start,
  output logic             cleared
);

  typedef enum logic [4:0] {
    R_SENSE, R_SENSE_W, R_HDR, R_HDR_W,
    R_RST_K, R_RST_RD, R_RST_W, R_RST_PUSH, R_RST_END,
    R_RUN,
    R_INVAL, R_INVAL_W, R_SAVE_K, R_SAVE, R_COMMIT, R_COMMIT_W,
    R_OFF, R_CLR, R_CLR_W
  } root_state_t;

  root_state_t st;
  logic        sense_sent;
  logic [AW-1:0] widx;        // checkpoint words moved so far
  cp_word_t    buf_q;         // word read from the NVM, waiting for the tree
  logic        ckpt_valid;    // the NVM holds a valid checkpoint
  logic [15:0] hdr_words;     // word count read from the header

  // energy sensing and counter
  logic             est_valid;
  logic [CNT_W-1:0] est_cycles;
  logic             cnt_zero;

  energy_est #(
    .ADC_W(ADC_W), .CNT_W(CNT_W), .C_F(C_F), .VFS(VFS), .VOFF(VOFF),
    .ALPHA(ALPHA), .E_CYC(E_CYC)
  ) u_est (
    .clk, .rst_n,
    .start     (st == R_SENSE && !sense_sent),
    .adc_start, .adc_valid, .adc_data,
    .est_valid, .est_cycles, .est_code (v_code)
  );

  cp_counter #(.W(CNT_W)) u_cnt (
    .clk, .rst_n,
    .load     (est_valid),
    .load_val (est_cycles),
    .en       (st == R_RUN),
    .count,
    .zero     (cnt_zero)
  );

  // memory controller
  logic          req_valid, req_we, req_ready, rsp_valid;
  logic [AW-1:0] req_addr;
  cp_word_t      req_wdata, rsp_rdata;

  nvm_ctrl #(.AW(AW)) u_mc (
    .clk, .rst_n,
    .req_valid, .req_we, .req_addr, .req_wdata, .req_ready,
    .rsp_valid, .rsp_rdata,
    .nvm_req, .nvm_we, .nvm_addr, .nvm_wdata, .nvm_ack, .nvm_rdata
  );

  logic activate;
  logic finish;
  logic hdr_ok;

  assign activate = (st == R_RUN) && cp_req && cnt_zero && !app_done;
  assign finish   = (st == R_RUN) && app_done && ckpt_valid;
  assign app_en   = (st == R_RUN) && !activate && !finish;
  assign pwr_off  = (st == R_OFF);
  assign nvm_clean = (st == R_RUN) && !ckpt_valid;
  assign hdr_ok   = (rsp_rdata[CP_DW-1:16] == CP_MAGIC) && (rsp_rdata[15:0] != '0);

  // requests to the memory controller and tree steering
  always_comb begin
    req_valid = 1'b0;
    req_we    = 1'b0;
    req_addr  = '0;
    req_wdata = '0;
    tree_dn   = '0;
    unique case (st)
      R_HDR:    req_valid = 1'b1;
      R_RST_K: begin
        tree_dn.start      = 1'b1;
        tree_dn.op_restore = 1'b1;
      end
      R_RST_RD: begin
        req_valid = 1'b1;
        req_addr  = widx + 1'b1;
      end
      R_RST_PUSH: begin
        tree_dn.dn_valid = 1'b1;
        tree_dn.dn_data  = buf_q;
      end
      R_INVAL, R_CLR: begin
        req_valid = 1'b1;
        req_we    = 1'b1;
      end
      R_SAVE_K: tree_dn.start = 1'b1;
      R_SAVE: begin
        tree_dn.up_ready = req_ready;
        req_valid        = tree_up.up_valid;
        req_we           = 1'b1;
        req_addr         = widx + 1'b1;
        req_wdata        = tree_up.up_data;
      end
      R_COMMIT: begin
        req_valid = 1'b1;
        req_we    = 1'b1;
        req_wdata = {CP_MAGIC, 16'(widx)};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= R_SENSE;
      sense_sent  <= 1'b0;
      widx        <= '0;
      buf_q       <= '0;
      ckpt_valid  <= 1'b0;
      cp_taken    <= 1'b0;
      cp_skipped  <= 1'b0;
      restored    <= 1'b0;
      fresh_start <= 1'b0;
      cleared     <= 1'b0;
    end else begin
      cp_taken    <= activate;
      cp_skipped  <= (st == R_RUN) && cp_req && !cnt_zero && !app_done;
      restored    <= 1'b0;
      fresh_start <= 1'b0;
      cleared     <= 1'b0;
      unique case (st)
        R_SENSE: begin
          sense_sent <= 1'b1;
          st         <= R_SENSE_W;
        end
        R_SENSE_W: if (est_valid) st <= R_HDR;
        R_HDR:     if (req_ready) st <= R_HDR_W;
        R_HDR_W: if (rsp_valid) begin
          if (hdr_ok) begin
            st <= R_RST_K;
          end else begin
            st          <= R_RUN;
            fresh_start <= 1'b1;
          end
        end
        R_RST_K: begin
          widx <= '0;
          st   <= R_RST_RD;
        end
        R_RST_RD: if (req_ready) st <= R_RST_W;
        R_RST_W: if (rsp_valid) begin
          buf_q <= rsp_rdata;
          st    <= R_RST_PUSH;
        end
        R_RST_PUSH: if (tree_up.dn_ready) begin
          widx <= widx + 1'b1;
          if (tree_up.dn_last) begin
            st         <= R_RST_END;
            ckpt_valid <= 1'b1;
          end else begin
            st <= R_RST_RD;
          end
        end
        R_RST_END: begin  // last module loads its registers in this cycle
          st       <= R_RUN;
          restored <= 1'b1;
        end
        R_RUN: begin
          if (activate)    st <= R_INVAL;
          else if (finish) st <= R_CLR;
        end
        R_INVAL:   if (req_ready) st <= R_INVAL_W;
        R_INVAL_W: if (rsp_valid) begin
          ckpt_valid <= 1'b0;
          widx       <= '0;
          st         <= R_SAVE_K;
        end
        R_SAVE_K: st <= R_SAVE;
        R_SAVE: if (tree_up.up_valid && req_ready) begin
          widx <= widx + 1'b1;
          if (tree_up.up_last) st <= R_COMMIT;
        end
        R_COMMIT:   if (req_ready) st <= R_COMMIT_W;
        R_COMMIT_W: if (rsp_valid) begin
          ckpt_valid <= 1'b1;
          st         <= R_OFF;
        end
        R_OFF: ;  // wait for the supply to be removed
        R_CLR:   if (req_ready) st <= R_CLR_W;
        R_CLR_W: if (rsp_valid) begin
          ckpt_valid <= 1'b0;
          cleared    <= 1'b1;
          st         <= R_RUN;
        end
        default: st <= R_SENSE;
      endcase
    end
  end

  // The restored checkpoint must be exactly as long as the header says.
  restore_length: assert property (@(posedge clk) disable iff (!rst_n)
    (st == R_RST_PUSH && tree_up.dn_ready && tree_up.dn_last)
      |-> (widx + 1'b1 == AW'(hdr_words)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            hdr_words <= '0;
    else if (st == R_HDR_W && rsp_valid)   hdr_words <= rsp_rdata[15:0];
  end

endmodule
