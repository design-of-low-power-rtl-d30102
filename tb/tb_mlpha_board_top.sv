// tb_mlpha_board_top: end-to-end test of the board-level adder.
//
// The testbench acts as the user at the board: it sets the three switches,
// waits, and reads the two LEDs. It first replays the two demonstration
// inputs (switches cin, b, a = 0,1,0 must light the sum LED only; 0,1,1 must
// light the carry LED only), then walks all eight switch settings, then
// applies 200 random settings. Every result is compared with the integer sum
// a + b + cin.
//
// It also counts how often each way the carry is formed is exercised and
// fails if any never happens:
//   generate  : a = b = 1, the carry comes from the inputs (multiplexer
//               select p = 0, data input a = 1);
//   kill      : a = b = 0, no carry whatever cin is (select p = 0, a = 0);
//   propagate : a != b and cin = 1, the carry in passes to the carry out
//               through the multiplexer's select-1 input;
//   absorb    : a != b and cin = 0, no carry (select 1, cin = 0).
// The top runs at its default parameters.
module tb_mlpha_board_top;

  int checks   = 0;
  int failures = 0;
  int n_generate  = 0;
  int n_kill      = 0;
  int n_propagate = 0;
  int n_absorb    = 0;

  logic sw_a, sw_b, sw_cin;
  logic led_sum, led_cout;

  mlpha_board_top dut (
    .sw_a     (sw_a),
    .sw_b     (sw_b),
    .sw_cin   (sw_cin),
    .led_sum  (led_sum),
    .led_cout (led_cout)
  );

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic cin, logic b, logic a);
    int total;
    sw_cin = cin;
    sw_b   = b;
    sw_a   = a;
    #1;
    total = int'(a) + int'(b) + int'(cin);
    checks++;
    if ({led_cout, led_sum} !== 2'(total)) begin
      failures++;
      $display("FAIL switches cin,b,a=%0b%0b%0b: leds cout,sum=%0b%0b expected %0d",
               cin, b, a, led_cout, led_sum, total);
    end
    if (a & b)                n_generate++;
    else if (!a && !b)        n_kill++;
    else if (cin)             n_propagate++;
    else                      n_absorb++;
  endtask

  function automatic void need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL carry case '%s' never exercised", what);
    end
  endfunction

  initial begin
    // Demonstration inputs: (cin, b, a) = 010 -> sum LED on, carry LED off.
    apply(1'b0, 1'b1, 1'b0);
    checks++;
    if (!(led_sum == 1'b1 && led_cout == 1'b0)) failures++;
    // (cin, b, a) = 011 -> carry LED on, sum LED off.
    apply(1'b0, 1'b1, 1'b1);
    checks++;
    if (!(led_sum == 1'b0 && led_cout == 1'b1)) failures++;

    // Every switch setting.
    for (int v = 0; v < 8; v++) apply(v[2], v[1], v[0]);

    // Random settings.
    for (int k = 0; k < 200; k++) begin
      logic [2:0] r;
      r = 3'($urandom);
      apply(r[2], r[1], r[0]);
    end

    need("generate",  n_generate);
    need("kill",      n_kill);
    need("propagate", n_propagate);
    need("absorb",    n_absorb);
    $display("carry cases: generate=%0d kill=%0d propagate=%0d absorb=%0d",
             n_generate, n_kill, n_propagate, n_absorb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
