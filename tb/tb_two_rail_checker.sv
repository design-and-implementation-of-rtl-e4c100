// tb_two_rail_checker: exhaustive self-checking testbench for the
// two-rail checker, at 3 pairs (the Berger symbol of a 4-bit word) and at
// 2 and 4 pairs.
//
// For every combination of the x and y rails the expected answer is worked
// out from the definition: (f,g) must be complementary when every pair
// (x[i],y[i]) is complementary, and equal (00 or 11) as soon as one pair is
// not. For code inputs it also checks that both answers 01 and 10 occur,
// since a checker that only ever gave one of them could hide a stuck-at
// fault on its output. Combinational; a watchdog guards against a hang.
module tb_two_rail_checker;
  logic [2:0] x3, y3;
  logic [1:0] x2, y2;
  logic [3:0] x4, y4;
  logic f3, g3, f2, g2, f4, g4;
  int checks = 0, failures = 0;
  int seen01 = 0, seen10 = 0;

  two_rail_checker #(.NPAIRS(3)) dut3 (.x(x3), .y(y3), .f(f3), .g(g3));
  two_rail_checker #(.NPAIRS(2)) dut2 (.x(x2), .y(y2), .f(f2), .g(g2));
  two_rail_checker #(.NPAIRS(4)) dut4 (.x(x4), .y(y4), .f(f4), .g(g4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic judge(logic code, logic f, logic g, string what);
    checks++;
    if ((f != g) != code) begin
      failures++;
      $display("FAIL %s: code=%b f=%b g=%b", what, code, f, g);
    end
  endtask

  initial begin
    for (int v = 0; v < 64; v++) begin
      {x3, y3} = 6'(v);
      #1;
      judge((x3 ^ y3) == 3'b111, f3, g3, $sformatf("3 pairs x=%b y=%b", x3, y3));
      if ((x3 ^ y3) == 3'b111) begin
        if ({f3, g3} == 2'b01) seen01++;
        if ({f3, g3} == 2'b10) seen10++;
      end
    end
    for (int v = 0; v < 16; v++) begin
      {x2, y2} = 4'(v);
      #1;
      judge((x2 ^ y2) == 2'b11, f2, g2, $sformatf("2 pairs x=%b y=%b", x2, y2));
    end
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      #1;
      judge((x4 ^ y4) == 4'b1111, f4, g4, $sformatf("4 pairs x=%b y=%b", x4, y4));
    end
    checks++;
    if (seen01 == 0 || seen10 == 0) begin
      failures++;
      $display("FAIL code answers 01 seen %0d times, 10 seen %0d times", seen01, seen10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
