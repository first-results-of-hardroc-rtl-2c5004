// oc_driver: behavioural model of the open-collector output pad.
//
// The pad is an NMOS transistor stack: when enabled (EN_OC) and its input
// (in_OC) is high it pulls the line low; otherwise it lets go and a pull-up
// resistor at the end of the line holds it high. The line is therefore an
// active-low copy of the input (Dout*, TransmitOn*, RamFull*). This model
// gives the level seen on a line with one driver; several chips on one line
// combine as the AND of their outputs. The transistor-level circuit and the
// analog bias input are not modelled.
module oc_driver (
  input  logic en,
  input  logic in,
  output logic out_n
);

  assign out_n = ~(en & in);

endmodule
