// enc_ctrl: sequencer of the image encryptor.
//
// On start it loads the key generator with the key input, latches the mode
// and walks the pixel addresses 0 .. NPIX-1. Each pixel takes one cycle per
// phase:
//   variable-key mode: KEYGEN (step the automaton), READ (read pixel and mix
//                      it with the key), MULT (GF product), WRITE (store)
//                      -> 4 cycles per pixel
//   fixed-key mode:    READ, MULT, WRITE -> 3 cycles per pixel
// so a 128 x 128 image takes 65536 or 49152 cycles, the budgets of the
// design. xnor_sel is the low address bit: XOR on even pixels, XNOR on odd.
// After the last write the controller waits in DONE (done = 1) until the
// next start. start is ignored while busy. The phase encoding, the handling
// of start and the done flag are this implementation's choices.
//
// Timing: the cycle after start is accepted is the first phase cycle; done
// rises 4*NPIX (or 3*NPIX) cycles after that edge.
module enc_ctrl
  import gf_enc_pkg::*;
#(
  parameter int unsigned NPIX_P = gf_enc_pkg::NPIX,
  parameter int unsigned AW     = $clog2(NPIX_P)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          variable_key,
  output logic          ca_load,
  output logic          ca_step,
  output logic          rd_en,
  output logic          mult_en,
  output logic          wr_en,
  output logic          xnor_sel,
  output logic [AW-1:0] addr,
  output logic          busy,
  output logic          done,
  output logic          mode_variable
);

  ctrl_state_e state_q, state_d;
  logic [AW-1:0] addr_q;
  logic          var_q;
  logic          accept, last;

  assign accept = start && (state_q == ST_IDLE || state_q == ST_DONE);
  assign last   = (addr_q == AW'(NPIX_P - 1));

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE, ST_DONE: if (start) state_d = variable_key ? ST_KEYGEN : ST_READ;
      ST_KEYGEN:        state_d = ST_READ;
      ST_READ:          state_d = ST_MULT;
      ST_MULT:          state_d = ST_WRITE;
      ST_WRITE:         state_d = last ? ST_DONE : (var_q ? ST_KEYGEN : ST_READ);
      default:          state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      addr_q  <= '0;
      var_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      if (accept) begin
        addr_q <= '0;
        var_q  <= variable_key;
      end else if (state_q == ST_WRITE && !last) begin
        addr_q <= addr_q + 1'b1;
      end
    end
  end

  assign ca_load       = accept;
  assign ca_step       = (state_q == ST_KEYGEN);
  assign rd_en         = (state_q == ST_READ);
  assign mult_en       = (state_q == ST_MULT);
  assign wr_en         = (state_q == ST_WRITE);
  assign xnor_sel      = addr_q[0];
  assign addr          = addr_q;
  assign busy          = (state_q != ST_IDLE) && (state_q != ST_DONE);
  assign done          = (state_q == ST_DONE);
  assign mode_variable = var_q;

  // KEYGEN only ever happens in variable-key mode.
  a_keygen_mode: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == ST_KEYGEN |-> var_q);
  // Every pixel phase is followed by the next one in order.
  a_read_mult: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == ST_READ |=> state_q == ST_MULT);
  a_mult_write: assert property (@(posedge clk) disable iff (!rst_n)
    state_q == ST_MULT |=> state_q == ST_WRITE);

endmodule
