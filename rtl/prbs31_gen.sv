// prbs31_gen: PRBS-31 (x^31 + x^28 + 1) pattern generator, two bits per clock.
//
// Used by the serializer test mode: at 160 MHz with DDR outputs the two bits
// per cycle make a 320 Mb/s stream. out[1] is the bit sent first. While en is
// high the sequence advances by two bits each cycle; init reloads the seed
// (all ones). Reset also loads the seed, so the all-zero lock-up state is
// never reached.
module prbs31_gen
  import prbs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  logic       en,
  output logic [1:0] out
);

  logic [PRBS_W-1:0] state;

  assign out = prbs31_next2(state);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= PRBS_SEED;
    else if (init)  state <= PRBS_SEED;
    else if (en)    state <= prbs31_shift2(state, out);
  end

endmodule
