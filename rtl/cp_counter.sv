// cp_counter: backward counter that decides whether a checkpoint is taken.
//
// After the stored energy is sensed the counter is loaded with alpha*Nc, the
// number of clock cycles the application may run before a checkpoint has to
// be taken. It then counts down by one in every enabled cycle and stops at 0.
// A checkpoint location in the application activates a checkpoint only while
// `zero` is high. Loading, counting down and stopping at zero follow the
// published mechanism; the counter width and the priority of `load` over
// `en` are choices of this implementation.
//
// Timing: `load` takes effect at the next clock edge; `zero` is combinational
// from the count register. Reset (power-on) clears the count.
module cp_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,      // load load_val (has priority)
  input  logic [W-1:0] load_val,  // alpha*Nc
  input  logic         en,        // count down this cycle
  output logic [W-1:0] count,
  output logic         zero       // count == 0: checkpoints may be activated
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   count <= '0;
    else if (load)                count <= load_val;
    else if (en && count != '0)   count <= count - 1'b1;
  end

  assign zero = (count == '0);

endmodule
