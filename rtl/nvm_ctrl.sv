// nvm_ctrl: memory controller between the root checkpointing circuit and the
// non-volatile memory (NVM) that keeps the checkpoint across power losses.
//
// Only the root of the checkpointing tree has a memory controller; every
// other checkpointing circuit reaches the NVM through its parent. The
// controller takes one word request at a time from the root (read or write,
// with an address) and runs it on the NVM port, holding nvm_req and the
// request fields stable until the memory answers with nvm_ack. Because the
// write and read latencies differ widely between Flash, PCM and STT memory,
// the NVM port is fully handshaken and no latency is assumed. The NVM port
// signals and the single-outstanding-request rule are choices of this
// implementation.
//
// Root side: req_valid/req_ready handshake (req_ready is high only while no
// request is in flight); rsp_valid pulses for one cycle after the NVM ack,
// for writes as well as reads, with the read word on rsp_rdata.
module nvm_ctrl
  import ckpt_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  // request from the root CPC
  input  logic          req_valid,
  input  logic          req_we,
  input  logic [AW-1:0] req_addr,
  input  cp_word_t      req_wdata,
  output logic          req_ready,
  output logic          rsp_valid,
  output cp_word_t      rsp_rdata,
  // NVM port
  output logic          nvm_req,
  output logic          nvm_we,
  output logic [AW-1:0] nvm_addr,
  output cp_word_t      nvm_wdata,
  input  logic          nvm_ack,
  input  cp_word_t      nvm_rdata
);

  logic busy;

  assign req_ready = !busy;
  assign nvm_req   = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      nvm_we    <= 1'b0;
      nvm_addr  <= '0;
      nvm_wdata <= '0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (!busy) begin
        if (req_valid) begin
          busy      <= 1'b1;
          nvm_we    <= req_we;
          nvm_addr  <= req_addr;
          nvm_wdata <= req_wdata;
        end
      end else if (nvm_ack) begin
        busy      <= 1'b0;
        rsp_valid <= 1'b1;
        rsp_rdata <= nvm_we ? '0 : nvm_rdata;
      end
    end
  end

  // The memory answers only a pending request.
  ack_only_when_requested: assert property (@(posedge clk) disable iff (!rst_n)
    nvm_ack |-> nvm_req);

  // A request and its fields stay unchanged until the memory acknowledges it.
  request_held: assert property (@(posedge clk) disable iff (!rst_n)
    nvm_req && !nvm_ack |=> nvm_req && $stable(nvm_we) && $stable(nvm_addr) && $stable(nvm_wdata));

endmodule
