// scrambler: 802.11 data scrambler, generator x^7 + x^4 + 1, with a state that
// can be read out and loaded so that one physical scrambler can serve many users.
//
// Each cycle with `en` high the input bit is XORed with the feedback bit
// s[6]^s[3] and the feedback bit is shifted into the 7-bit state.  `out_bit`
// is combinational from `in_bit` and the present state.  `zero_out` forces the
// output to 0 while still advancing the state (used for the BCC tail bits,
// which are sent unscrambled as zeros).  `load` (priority over `en`) writes
// `state_i`; `state_o` is the live state, which the context-switch FSM saves.
// The scrambler and its context save/restore follow the transmitter's
// architecture; the polynomial is the 802.11 one.
module scrambler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       in_bit,
  input  logic       zero_out,
  output logic       out_bit,
  input  logic       load,
  input  logic [6:0] state_i,
  output logic [6:0] state_o
);
  logic [6:0] s;
  logic       fb;

  assign fb      = s[6] ^ s[3];
  assign out_bit = zero_out ? 1'b0 : (in_bit ^ fb);
  assign state_o = s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s <= 7'h7F;
    else if (load) s <= state_i;
    else if (en)   s <= {s[5:0], fb};
  end
endmodule
