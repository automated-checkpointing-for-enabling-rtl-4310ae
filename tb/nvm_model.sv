// nvm_model: behavioural model of the non-volatile checkpoint memory, for
// simulation only.
//
// A word-addressed memory that answers a request (req held high with we,
// addr and wdata) after a fixed number of cycles with a one-cycle ack; read
// data come with the ack. Write and read latencies are parameters so that
// the slow writes of NAND Flash and the faster ones of PCM or STT memory can
// be modelled. The contents are never reset: they survive when the rest of
// the design loses power. Counters of reads and writes are kept for the
// testbenches.
module nvm_model #(
  parameter int unsigned AW     = 16,
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned WR_LAT = 4,
  parameter int unsigned RD_LAT = 1
) (
  input  logic          clk,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic          ack,
  output logic [31:0]   rdata
);

  logic [31:0] mem [DEPTH];
  int unsigned wait_cnt;
  int unsigned n_wr;
  int unsigned n_rd;

  initial begin
    foreach (mem[i]) mem[i] = '0;
    wait_cnt = 0;
    n_wr     = 0;
    n_rd     = 0;
    ack      = 1'b0;
    rdata    = '0;
  end

  always @(posedge clk) begin
    ack <= 1'b0;
    if (req && !ack) begin
      if (wait_cnt + 1 >= (we ? WR_LAT : RD_LAT)) begin
        wait_cnt <= 0;
        ack      <= 1'b1;
        if (we) begin
          mem[addr % DEPTH] <= wdata;
          n_wr <= n_wr + 1;
        end else begin
          rdata <= mem[addr % DEPTH];
          n_rd  <= n_rd + 1;
        end
      end else begin
        wait_cnt <= wait_cnt + 1;
      end
    end else if (!req) begin
      wait_cnt <= 0;
    end
  end

endmodule
