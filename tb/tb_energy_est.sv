// tb_energy_est: self-checking testbench of the energy estimator.
// For a sweep of ADC codes the expected budget alpha*Nc is worked out with
// real arithmetic from the capacitor energy C/2*(V^2 - Voff^2) and the
// energy per cycle, and compared with the block's fixed-point result
// (allowed error: 0.1 % + 2 cycles). The latency from adc_valid to est_valid
// is checked to be 4 cycles, and codes below Voff must give 0.
module tb_energy_est;
  localparam int unsigned ADC_W = 10;
  localparam int unsigned CNT_W = 32;
  localparam real C_F = 3.3e-6, VFS = 6.0, VOFF = 3.0, ALPHA = 0.7, E_CYC = 350.0e-12;

  logic clk = 0, rst_n = 0;
  logic start, adc_start, adc_valid;
  logic [ADC_W-1:0] adc_data, est_code;
  logic est_valid;
  logic [CNT_W-1:0] est_cycles;
  int checks = 0, failures = 0;

  energy_est dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sense(input int code);
    real v, e, expect_r;
    int  lat;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++; if (!adc_start) begin failures++; $display("no adc_start"); end
    @(negedge clk);
    checks++; if (adc_start) begin failures++; $display("adc_start longer than one cycle"); end
    repeat ($urandom_range(1, 4)) @(negedge clk);
    adc_valid = 1; adc_data = ADC_W'(code);
    @(negedge clk); adc_valid = 0;
    lat = 1;
    while (!est_valid && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 4) begin failures++; $display("code %0d: latency %0d, expected 4", code, lat); end
    v = code * VFS / (2.0 ** ADC_W);
    e = (v > VOFF) ? C_F / 2.0 * (v * v - VOFF * VOFF) : 0.0;
    expect_r = ALPHA * e / E_CYC;
    checks++;
    if ((real'(est_cycles) - expect_r) > expect_r * 0.001 + 2.0 ||
        (expect_r - real'(est_cycles)) > expect_r * 0.001 + 2.0) begin
      failures++;
      $display("code %0d: est %0d expected %f", code, est_cycles, expect_r);
    end
    checks++; if (est_code != ADC_W'(code)) begin failures++; $display("est_code wrong"); end
  endtask

  initial begin
    start = 0; adc_valid = 0; adc_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    sense(0);
    sense(300);
    sense(512);   // exactly Voff
    sense(513);
    sense(853);   // about 5 V
    sense(1023);
    for (int i = 0; i < 40; i++) sense($urandom_range(0, 1023));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
