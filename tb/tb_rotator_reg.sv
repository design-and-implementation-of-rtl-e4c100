// tb_rotator_reg: self-checking testbench for rotator_reg (WIDTH = 4).
//
// Three parts: (1) the serial load example - the word 1001 entered right-most
// bit first - checking that the first bit reaches the right end after
// exactly WIDTH clocks and that the word then reads 1001 from Q1 to Q4;
// (2) one full turn each way, checking that WIDTH rotations give the word
// back; (3) 2000 random operations compared against a reference model
// written with shifts and concatenations, independent of the RTL's
// gate-level selector. Inputs change on the falling edge, outputs are
// compared after the rising edge. A watchdog ends the run with a failure if
// it does not finish in time.
module tb_rotator_reg;
  localparam int unsigned W = 4;

  logic         clk = 1'b0;
  logic         rl, rr, din;
  logic [W-1:0] q;
  logic [W-1:0] model;
  int           checks = 0, failures = 0;

  rotator_reg #(.WIDTH(W)) dut (.clk(clk), .rl(rl), .rr(rr), .din(din), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model; the vector is reversed into left-to-right order so
  // that Q1 is the most significant bit of 'lr'.
  function automatic logic [W-1:0] step(logic [W-1:0] cur, logic [1:0] op, logic d);
    logic [W-1:0] lr, nx;
    lr = {<<{cur}};  // lr[W-1] = Q1 ... lr[0] = right end
    case (op)
      2'b00: nx = '0;
      2'b01: nx = {lr[0], lr[W-1:1]};   // rotate right
      2'b10: nx = {lr[W-2:0], lr[W-1]}; // rotate left
      default: nx = {d, lr[W-1:1]};     // load: shift right, din enters at Q1
    endcase
    return {<<{nx}};
  endfunction

  task automatic apply(logic [1:0] op, logic d);
    @(negedge clk);
    {rl, rr} = op;
    din      = d;
    @(posedge clk);
    model = step(model, op, d);
    #1;
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL op=%b din=%b q=%b expected=%b", op, d, q, model);
    end
  endtask

  task automatic expect_q(logic [W-1:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected=%b", what, q, exp);
    end
  endtask

  logic [W-1:0] saved;
  logic [3:0]   seq;
  int           first_at;

  initial begin
    rl = 0; rr = 0; din = 0;
    model = '0;
    apply(2'b00, 1'b0);                 // clear
    expect_q('0, "clear");

    // Serial load of 1001, right-most bit first: din = 1,0,0,1.
    seq = 4'b1001;
    first_at = -1;
    for (int n = 0; n < W; n++) begin
      apply(2'b11, seq[n]);
      if (first_at < 0 && q[W-1] == 1'b1) first_at = n + 1;
    end
    checks++;
    if (first_at != W) begin
      failures++;
      $display("FAIL first din bit reached Q4 after %0d clocks, expected %0d", first_at, W);
    end
    // Q1..Q4 read 1,0,0,1 -> q[0]=1 q[1]=0 q[2]=0 q[3]=1
    expect_q(4'b1001, "loaded word 1001");

    // Load 1000 (Q1=1) to see single-step moves.
    apply(2'b00, 1'b0);
    for (int n = 0; n < W; n++) apply(2'b11, (n == W-1));
    expect_q(4'b0001, "single one at Q1");
    apply(2'b01, 1'b0);
    expect_q(4'b0010, "rotate right moves Q1 to Q2");
    apply(2'b10, 1'b0);
    apply(2'b10, 1'b0);
    expect_q(4'b1000, "rotate left wraps Q1 to Q4");

    // A full turn in each direction returns the word.
    saved = q;
    for (int n = 0; n < W; n++) apply(2'b01, 1'b0);
    expect_q(saved, "full right turn");
    for (int n = 0; n < W; n++) apply(2'b10, 1'b0);
    expect_q(saved, "full left turn");

    // Random operations, clear kept rare.
    for (int n = 0; n < 2000; n++) begin
      logic [1:0] op;
      op = 2'($urandom_range(0, 3));
      if (op == 2'b00 && ($urandom_range(0, 7) != 0)) op = 2'b11;
      apply(op, 1'($urandom));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
