// mlpha_board_top: the multi-layer perceptron hybrid adder as it is placed
// on an FPGA evaluation board.
//
// Three user slide switches drive the adder inputs and two user LEDs show
// its outputs; a switch that is on reads as logic 1 and a lit LED means
// logic 1. On the Zybo Z7 (XC7Z020-CLG400) board the pins are:
//   sw_cin  -> G15      sw_b -> P15      sw_a -> W13
//   led_sum -> M14      led_cout -> M15
// For example switches (cin, b, a) = 0, 1, 0 light only the sum LED, and
// 0, 1, 1 light only the carry LED.
//
// Interface: the five board signals above. Purely combinational: there is no
// clock, and the LEDs follow the switches after the adder's delay. The pin
// assignment belongs in the board constraint file; it is repeated here only
// as documentation. The switch and LED assignment follows the source design.
module mlpha_board_top (
  input  logic sw_a,
  input  logic sw_b,
  input  logic sw_cin,
  output logic led_sum,
  output logic led_cout
);

  mlpha u_adder (
    .a  (sw_a),
    .b  (sw_b),
    .ci (sw_cin),
    .s  (led_sum),
    .co (led_cout)
  );

endmodule
