// ehd_platform: simulation model of a battery-less energy-harvesting device
// built around ckpt_top, for testbenches only.
//
// Around the chip it models a storage capacitor (C_F) that a harvester
// charges by P_H joules per clock cycle, a supply switch that turns the chip
// on at VON and off below VOFF or when the chip raises pwr_off, an ADC of the
// capacitor voltage (10 bits, 6 V full scale, two-cycle conversion) and a
// non-volatile memory with per-word latencies (WR_LAT, RD_LAT cycles) and
// per-word access energies (E_WR, E_RD joules). The chip draws E_RUN per
// powered cycle, multiplied by HEAVY_X during power cycle number HEAVY (0:
// never), which makes the supply fail before the budget runs out. While the
// chip is off the recharge is accounted for without clocking it.
//
// The harvester delivers either a constant P_H per cycle (TRACE = 0) or
// impulses of energy (TRACE = 1): arrivals form a Poisson process with a
// mean gap of MEAN_GAP cycles and amplitudes are normally distributed with
// mean P_H*MEAN_GAP and standard deviation SD_FRAC times that (negative
// draws count as zero), so the average power is the same. SEED selects the
// trace. The capacitor is clamped at the ADC full scale VFS.
//
// CP_MASK is handed to the chip only when it differs from the chip's own
// default, so that with the default the chip is built exactly as it ships.
//
// The model checks, at every checkpoint, that the budget is used up and the
// state follows a state with a checkpoint circuit (with the default mask:
// the state right after the loop-end S3), and after every restore that the
// FSM state and the iteration count are the ones saved. It counts the
// mechanisms (fresh starts, checkpoint locations passed, checkpoints taken,
// restores, supply failures, checkpoints cleared), the powered cycles, the
// cycles spent off and the energy drawn.
module ehd_platform #(
  parameter real C_F     = 3.3e-6,
  parameter real VOFF    = 3.0,
  parameter real VON     = 5.0,
  parameter real VFS     = 6.0,
  parameter real E_RUN   = 350.0e-12,
  parameter real P_H     = 3.5e-12,
  parameter int  HEAVY   = 0,
  parameter real HEAVY_X = 1.6,
  parameter int  WR_LAT  = 4,
  parameter int  RD_LAT  = 1,
  parameter real E_WR    = 0.0,
  parameter real E_RD    = 0.0,
  parameter int  TRACE   = 0,
  parameter int  MEAN_GAP = 20000,
  parameter real SD_FRAC = 0.3,
  parameter int unsigned SEED = 1,
  parameter logic [4:0] CP_MASK = 5'b00100
) (
  input  logic        clk,
  input  logic        start,
  input  logic [31:0] op_a,
  input  logic [31:0] op_b,
  output logic        done,
  output logic [31:0] result,
  output logic [31:0] steps,
  output logic        powered
);
  import ckpt_pkg::*;

  logic rst_n = 0;
  logic adc_start, adc_valid;
  logic [9:0] adc_data, v_code;
  logic nvm_req, nvm_we, nvm_ack;
  logic [15:0] nvm_addr;
  cp_word_t nvm_wdata, nvm_rdata;
  logic pwr_off, app_en;
  logic [31:0] budget;
  logic cp_taken, cp_skipped, restored, fresh_start, cleared;

  assign powered = rst_n;

  app_state_t dut_state;
  logic       dut_at_cp;
  cp_word_t   dut_iter;

  if (CP_MASK == 5'b00100) begin : g_chip
    ckpt_top dut (.*);
    assign dut_state = dut.state;
    assign dut_at_cp = dut.at_cp;
    assign dut_iter  = dut.u_dp.iter;
  end else begin : g_chip
    ckpt_top #(.CP_MASK(CP_MASK)) dut (.*);
    assign dut_state = dut.state;
    assign dut_at_cp = dut.at_cp;
    assign dut_iter  = dut.u_dp.iter;
  end

  nvm_model #(.AW(16), .DEPTH(256), .WR_LAT(WR_LAT), .RD_LAT(RD_LAT)) u_nvm (
    .clk, .req(nvm_req), .we(nvm_we), .addr(nvm_addr), .wdata(nvm_wdata),
    .ack(nvm_ack), .rdata(nvm_rdata));

  real    energy = 0.0;     // joules in the capacitor
  real    drawn  = 0.0;     // joules drawn by the chip and the NVM
  real    draw   = E_RUN;   // chip energy per powered cycle now
  int     power_cycles = 0;
  longint run_cycles = 0, off_cycles = 0;
  int     n_fresh = 0, n_skip = 0, n_taken = 0, n_restore = 0, n_brownout = 0, n_clear = 0;
  int     checks = 0, failures = 0;
  cp_word_t   saved_iter = '0;
  app_state_t saved_state = S1;

  // a checkpoint is taken in the state entered from a marked state
  function automatic logic after_marked(input app_state_t s);
    case (s)
      S2:      return CP_MASK[S1] || CP_MASK[S3];
      S3:      return CP_MASK[S2];
      S4:      return CP_MASK[S3];
      S5:      return CP_MASK[S4];
      default: return CP_MASK[S5];
    endcase
  endfunction

  // trace generator: xorshift32 per instance, exponential gaps, normal amplitudes
  int unsigned rng = SEED;
  longint      gap_left = 0;

  function automatic real uniform01();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return (real'(rng) + 1.0) / 4294967297.0;
  endfunction

  function automatic longint next_gap();
    longint g;
    g = longint'(-real'(MEAN_GAP) * $ln(uniform01()));
    return (g < 1) ? 1 : g;
  endfunction

  function automatic real next_amp();
    real z, a;
    z = $sqrt(-2.0 * $ln(uniform01())) * $cos(6.283185307179586 * uniform01());
    a = P_H * real'(MEAN_GAP) * (1.0 + SD_FRAC * z);
    return (a > 0.0) ? a : 0.0;
  endfunction

  function automatic void clamp();
    if (energy > C_F / 2.0 * VFS * VFS) energy = C_F / 2.0 * VFS * VFS;
  endfunction

  initial gap_left = (TRACE == 1) ? next_gap() : 0;

  function automatic real volts(input real e);
    return (e > 0.0) ? $sqrt(2.0 * e / C_F) : 0.0;
  endfunction

  function automatic int adc_of(input real v);
    int c;
    c = int'($floor(v / VFS * 1024.0));
    return (c > 1023) ? 1023 : c;
  endfunction

  task automatic power_down_and_up();
    real e_on;
    rst_n = 0;
    e_on = C_F / 2.0 * VON * VON;
    if (TRACE == 1) begin
      while (energy < e_on) begin
        off_cycles += gap_left;
        energy += next_amp();
        gap_left = next_gap();
      end
      clamp();
    end else if (energy < e_on) begin
      off_cycles += longint'((e_on - energy) / P_H);
      energy = e_on;
    end
    repeat (3) @(negedge clk);
    power_cycles++;
    draw  = (power_cycles == HEAVY) ? E_RUN * HEAVY_X : E_RUN;
    rst_n = 1;
  endtask

  initial power_down_and_up();   // first charge of the empty capacitor

  // capacitor and supply switch, once per cycle
  always @(negedge clk) begin
    if (rst_n) begin
      energy -= draw;
      drawn  += draw;
      if (nvm_ack) begin
        energy -= nvm_we ? E_WR : E_RD;
        drawn  += nvm_we ? E_WR : E_RD;
      end
      if (TRACE == 1) begin
        gap_left--;
        if (gap_left <= 0) begin
          energy += next_amp();
          gap_left = next_gap();
          clamp();
        end
      end else begin
        energy += P_H;
      end
      run_cycles++;
      if (pwr_off) begin
        power_down_and_up();
      end else if (volts(energy) < VOFF) begin
        n_brownout++;
        power_down_and_up();
      end
    end
  end

  // ADC
  initial begin
    adc_valid = 0; adc_data = '0;
    forever begin
      @(negedge clk);
      if (adc_start && rst_n) begin
        repeat (2) @(negedge clk);
        adc_valid = 1; adc_data = 10'(adc_of(volts(energy)));
        @(negedge clk);
        adc_valid = 0;
      end
    end
  end

  // mechanisms and checkpoint checks
  always @(negedge clk) if (rst_n) begin
    if (fresh_start) n_fresh++;
    if (cp_skipped)  n_skip++;
    if (cleared)     n_clear++;
    if (cp_taken) begin
      n_taken++;
      checks++;
      if (!after_marked(dut_state) || !dut_at_cp || budget != 0) begin
        failures++;
        $display("checkpoint at state %0d at_cp=%0b budget=%0d", dut_state, dut_at_cp, budget);
      end
      saved_iter  = dut_iter;
      saved_state = dut_state;
    end
    if (restored) begin
      n_restore++;
      checks++;
      if (dut_iter != saved_iter || dut_state != saved_state) begin
        failures++;
        $display("restore: iter %0d expected %0d, state %0d expected %0d", dut_iter, saved_iter, dut_state, saved_state);
      end
    end
  end
endmodule
