// tb_cp_counter: self-checking testbench of the checkpoint activation counter.
// Drives random loads and enables and compares count/zero every cycle with a
// reference model: load wins, otherwise count down by one when enabled,
// never below zero.
module tb_cp_counter;
  localparam int unsigned W = 12;
  logic clk = 0, rst_n = 0;
  logic load, en;
  logic [W-1:0] load_val, count;
  logic zero;
  int checks = 0, failures = 0;
  int unsigned ref_cnt;
  int zero_hits = 0;

  cp_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; en = 0; load_val = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_cnt = 0;
    @(negedge clk);
    checks++; if (count != 0 || !zero) begin failures++; $display("reset value wrong"); end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      load     = ($urandom_range(0, 60) == 0);
      load_val = W'($urandom_range(0, 80));
      en       = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (load)                    ref_cnt = load_val;
      else if (en && ref_cnt != 0) ref_cnt = ref_cnt - 1;
      #1;
      checks++;
      if (count != W'(ref_cnt) || zero != (ref_cnt == 0)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count=%0d zero=%0b expected %0d", i, count, zero, ref_cnt);
      end
      if (zero && en && !load) zero_hits++;
    end
    checks++; if (zero_hits == 0) begin failures++; $display("counter never held at zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
