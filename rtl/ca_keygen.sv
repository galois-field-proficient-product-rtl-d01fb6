// ca_keygen: 8-cell hybrid cellular automaton used as the pseudorandom key
// generator of the variable-key mode.
//
// Each cell takes the XOR of its two neighbours (rule 90); a rule-150 cell
// also XORs in its own value. The cells beyond both ends read as 0 (null
// boundary). With the default rule sequence 90-90-150-90-150-90-150-90,
// listed from bit 7 down to bit 0, the automaton is linear and runs through
// all 255 non-zero states before repeating, so any non-zero seed gives a new
// key on each of 255 steps. The rule sequence follows the design
// description; the null boundary, the bit order and the seed load are this
// implementation's choices.
//
// Interface: load copies seed into the state; step advances the automaton by
// one generation; load wins if both are high. key is the registered state.
// Timing: a new key appears one clock after step.
module ca_keygen #(
  parameter logic [7:0] RULE150_MASK = gf_enc_pkg::CA_RULE150_MASK
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [7:0] seed,
  input  logic       step,
  output logic [7:0] key
);

  logic [7:0] state_q, next_state;

  always_comb begin
    logic [7:0] left, right;
    left  = {1'b0, state_q[7:1]};   // neighbour on the higher bit
    right = {state_q[6:0], 1'b0};   // neighbour on the lower bit
    next_state = left ^ right ^ (state_q & RULE150_MASK);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state_q <= 8'h01;
    else if (load) state_q <= seed;
    else if (step) state_q <= next_state;
  end

  assign key = state_q;

endmodule
