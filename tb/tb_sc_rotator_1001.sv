// tb_sc_rotator_1001: directed run of the self-checking rotator on the
// example word 1001.
//
// Follows the checking procedure step by step on the default 4-bit design:
// clear (RL=RR=0), shift 1001 in right-most bit first (RL=RR=1, din = 1, 0,
// 0, 1), check that the first bit reaches Q4 on the fourth clock, store the
// inverted check symbol (sel1 = sel2 = 1; the stored value must be ~2 =
// 101), then rotate right four times and left four times. After every
// rotation the word is compared with its expected value, the live symbol
// must stay 2 and the checker must answer 01 or 10 with no error. Finally
// one 1 is forced to 0 on the symbol generator's inputs and the error must
// show, and go away again one rotation after the fault is
// removed. A watchdog ends a hung run with a failure.
module tb_sc_rotator_1001;
  logic       clk = 1'b0;
  logic       rl = 0, rr = 0, din = 0, sel1 = 0, sel2 = 0;
  logic [3:0] q;
  logic [2:0] csb, ref_csb;
  logic       f, g, error;
  int checks = 0, failures = 0;

  sc_rotator dut (
    .clk(clk), .rl(rl), .rr(rr), .din(din), .sel1(sel1), .sel2(sel2),
    .q(q), .csb(csb), .ref_csb(ref_csb), .f(f), .g(g), .error(error)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(logic [1:0] op, logic d, logic s);
    @(negedge clk);
    {rl, rr} = op;
    din = d; sel1 = s; sel2 = s;
    @(posedge clk);
    #1;
  endtask

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Expected words, written as Q4 Q3 Q2 Q1 (the q vector's bit order).
  localparam logic [3:0] ROT_R [4] = '{4'b0011, 4'b0110, 4'b1100, 4'b1001};
  localparam logic [3:0] ROT_L [4] = '{4'b1100, 4'b0110, 4'b0011, 4'b1001};

  initial begin
    logic [3:0] seq;
    tick(2'b00, 1'b0, 1'b0);
    expect_eq(int'(q), 0, "clear");
    seq = 4'b1001;                       // entered from bit 0 upwards
    for (int n = 0; n < 4; n++) begin
      tick(2'b11, seq[n], 1'b0);
      expect_eq(int'(q[3]), (n == 3) ? 1 : 0, $sformatf("Q4 after load clock %0d", n + 1));
    end
    expect_eq(int'(q), int'(4'b1001), "loaded word");
    expect_eq(int'(csb), 2, "check symbol of 1001");

    // Store the reference in the first rotate-right cycle.
    tick(2'b01, 1'b0, 1'b1);
    expect_eq(int'(ref_csb), int'(3'b101), "stored inverted symbol");
    expect_eq(int'(q), int'(ROT_R[0]), "rotate right 1");
    expect_eq(int'(error), 0, "no error after rotate right 1");
    for (int n = 1; n < 4; n++) begin
      tick(2'b01, 1'b0, 1'b0);
      expect_eq(int'(q), int'(ROT_R[n]), $sformatf("rotate right %0d", n + 1));
      expect_eq(int'(csb), 2, "symbol kept");
      expect_eq(int'(f != g), 1, "checker answer 01/10");
      expect_eq(int'(error), 0, "no error");
    end
    for (int n = 0; n < 4; n++) begin
      tick(2'b10, 1'b0, 1'b0);
      expect_eq(int'(q), int'(ROT_L[n]), $sformatf("rotate left %0d", n + 1));
      expect_eq(int'(csb), 2, "symbol kept");
      expect_eq(int'(error), 0, "no error");
    end

    // One 1 of the word turns into 0 on the way to the check.
    @(negedge clk);
    force dut.u_csg.data = 4'b0001;
    #1;
    expect_eq(int'(csb), 1, "symbol of corrupted word");
    expect_eq(int'(error), 1, "error on 1->0 fault");
    release dut.u_csg.data;
    tick(2'b01, 1'b0, 1'b0);
    expect_eq(int'(error), 0, "no error once the fault is gone");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
