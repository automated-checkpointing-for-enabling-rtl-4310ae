// tb_nvm_ctrl: self-checking testbench of the NVM memory controller.
// Random writes and reads go through the controller to the behavioural NVM
// model; read data are compared with a reference copy, and the time from the
// accepted request to rsp_valid is checked to be latency + 2 cycles (one
// cycle to raise the request, the memory latency, one cycle for the
// response register). req_ready must be low while a request is in flight.
module tb_nvm_ctrl;
  import ckpt_pkg::*;
  localparam int unsigned AW = 8;
  localparam int unsigned WR_LAT = 5, RD_LAT = 2;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_we, req_ready, rsp_valid;
  logic [AW-1:0] req_addr;
  cp_word_t req_wdata, rsp_rdata;
  logic nvm_req, nvm_we, nvm_ack;
  logic [AW-1:0] nvm_addr;
  cp_word_t nvm_wdata, nvm_rdata;
  int checks = 0, failures = 0;
  cp_word_t ref_mem [256];

  nvm_ctrl #(.AW(AW)) dut (.*);
  nvm_model #(.AW(AW), .DEPTH(256), .WR_LAT(WR_LAT), .RD_LAT(RD_LAT)) u_nvm (
    .clk, .req(nvm_req), .we(nvm_we), .addr(nvm_addr), .wdata(nvm_wdata),
    .ack(nvm_ack), .rdata(nvm_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic we, input logic [AW-1:0] addr, input cp_word_t d);
    int lat;
    @(negedge clk);
    checks++; if (!req_ready) begin failures++; $display("not ready when idle"); end
    req_valid = 1; req_we = we; req_addr = addr; req_wdata = d;
    @(negedge clk);
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    lat = 1;
    while (!rsp_valid && lat < 50) begin
      checks++; if (req_ready) begin failures++; $display("ready while busy"); end
      @(negedge clk); lat++;
    end
    checks++;
    if (lat != (we ? WR_LAT : RD_LAT) + 2) begin
      failures++; $display("latency %0d for we=%0b", lat, we);
    end
    if (we) ref_mem[addr] = d;
    else begin
      checks++;
      if (rsp_rdata != ref_mem[addr]) begin
        failures++; $display("read %0h: %h expected %h", addr, rsp_rdata, ref_mem[addr]);
      end
    end
  endtask

  initial begin
    foreach (ref_mem[i]) ref_mem[i] = '0;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) access(1'b1, AW'(i), $urandom);
    for (int i = 0; i < 16; i++) access(1'b0, AW'(i), '0);
    for (int i = 0; i < 300; i++)
      access($urandom_range(0, 1) == 1, AW'($urandom_range(0, 31)), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
