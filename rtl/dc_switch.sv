// dc_switch: one static switch on a data path.
//
// When the switch is ON (on = 1) the input is passed to the output, when it
// is OFF the output stays 0. In the superconducting original it is a
// dc-current-controlled gate that lets single-flux-quantum pulses through or
// blocks them; with pulses read as logic 1 per clock this is an AND with the
// control level. The control is meant to be held steady while data flows;
// it is not registered. The ALU uses twelve, three per bit.
module dc_switch (
  input  logic on,
  input  logic d,
  output logic q
);

  always_comb q = on & d;

endmodule
