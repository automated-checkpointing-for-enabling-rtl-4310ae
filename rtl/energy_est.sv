// energy_est: turns the sensed capacitor voltage into a cycle budget.
//
// On `start` the block asks the analog-to-digital converter for one sample of
// the storage-capacitor voltage (adc_start pulse, then waits for adc_valid).
// The energy still usable before the supply switches off is
//     E = C/2 * (V^2 - Voff^2)
// and dividing it by the application's average energy per clock cycle gives
// Nc, the number of cycles the device can run. The block returns alpha*Nc,
// the value the checkpoint counter is loaded with. Both the division and the
// scaling by alpha, C and the ADC step are folded into one constant K,
// computed at elaboration from the real-valued parameters, so the hardware is
// one squarer, one subtractor and one constant multiplier:
//     est_cycles = floor( (code^2 - voff_code^2) * K_Q / 2^FRAC )
//     K          = ALPHA * C_F * VFS^2 / (2 * E_CYC * 2^(2*ADC_W))
// with code the ADC output, VFS its full-scale voltage and K_Q = K * 2^FRAC.
// Below Voff the budget is 0. The result saturates at 2^CNT_W - 1.
// C_F (3.3 uF), VOFF (3.0 V) and ALPHA (0.7) are the published values. The
// ADC width and full scale, the energy per cycle and the fixed-point format
// are choices of this implementation (the source gives none).
//
// Timing: adc_start is a registered one-cycle pulse in the cycle after
// start (so it stays low during reset). est_valid
// pulses for one cycle, four cycles after the cycle in which adc_valid is high
// (capture, square, multiply, output register).
module energy_est #(
  parameter int unsigned ADC_W = 10,
  parameter int unsigned CNT_W = 32,
  parameter int unsigned FRAC  = 24,
  parameter real         C_F   = 3.3e-6,    // storage capacitor [F]
  parameter real         VFS   = 6.0,       // ADC full-scale voltage [V]
  parameter real         VOFF  = 3.0,       // supply switch-off voltage [V]
  parameter real         ALPHA = 0.7,       // safety coefficient
  parameter real         E_CYC = 350.0e-12  // average energy per cycle [J]
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,       // sense the stored energy now
  output logic             adc_start,   // one-cycle conversion request
  input  logic             adc_valid,   // conversion result on adc_data
  input  logic [ADC_W-1:0] adc_data,
  output logic             est_valid,   // one-cycle pulse with est_cycles
  output logic [CNT_W-1:0] est_cycles,  // alpha * Nc
  output logic [ADC_W-1:0] est_code     // last sampled voltage code
);

  localparam real K = ALPHA * C_F * VFS * VFS
                      / (2.0 * E_CYC * (2.0 ** (2 * ADC_W)));
  localparam longint unsigned K_Q  = longint'(K * (2.0 ** FRAC));
  localparam longint unsigned VOFF_CODE = longint'(VOFF / VFS * (2.0 ** ADC_W));
  localparam longint unsigned VOFF_SQ   = VOFF_CODE * VOFF_CODE;
  localparam longint unsigned CNT_MAX   = (64'd1 << CNT_W) - 64'd1;

  typedef enum logic [2:0] {E_IDLE, E_WAIT, E_SQ, E_MUL, E_OUT} est_state_t;
  est_state_t st;

  logic [2*ADC_W-1:0] sq;
  logic [63:0]        prod;
  logic [63:0]        scaled;

  assign scaled    = prod >> FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= E_IDLE;
      est_code   <= '0;
      sq         <= '0;
      prod       <= '0;
      est_valid  <= 1'b0;
      est_cycles <= '0;
      adc_start  <= 1'b0;
    end else begin
      est_valid <= 1'b0;
      adc_start <= 1'b0;
      unique case (st)
        E_IDLE: if (start) begin
          adc_start <= 1'b1;
          st        <= E_WAIT;
        end
        E_WAIT: if (adc_valid) begin
          est_code <= adc_data;
          st       <= E_SQ;
        end
        E_SQ: begin
          sq <= est_code * est_code;
          st <= E_MUL;
        end
        E_MUL: begin
          if (64'(sq) > VOFF_SQ) prod <= (64'(sq) - VOFF_SQ) * K_Q;
          else                   prod <= '0;
          st <= E_OUT;
        end
        E_OUT: begin
          est_cycles <= (scaled > CNT_MAX) ? CNT_W'(CNT_MAX) : CNT_W'(scaled);
          est_valid  <= 1'b1;
          st         <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
    end
  end

endmodule
