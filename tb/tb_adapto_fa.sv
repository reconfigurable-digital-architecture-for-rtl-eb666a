// tb_adapto_fa: exhaustive check of the full adder. For all eight input
// combinations the 2-bit value {cout, r} must equal the integer sum
// x + y + cin.
module tb_adapto_fa;
  logic x, y, cin, r, cout;
  int checks = 0, failures = 0;

  adapto_fa dut (.x(x), .y(y), .cin(cin), .r(r), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, r} != 2'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL x=%0b y=%0b cin=%0b -> cout=%0b r=%0b", x, y, cin, cout, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
