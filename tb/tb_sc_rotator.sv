// tb_sc_rotator: end-to-end self-checking testbench for the self-checking
// rotator at its default size (4-bit word, 3-bit Berger symbol).
//
// Runs 300 sessions of the checking procedure: clear the register, shift a
// random word in serially (4 clocks), store the inverted check symbol as
// reference (one clock with sel1 = sel2 = 1 while the word rotates), then
// rotate it left and right at random. Every cycle the word is compared with
// a reference model, the live symbol with a bit count of the word, and the
// checker's answer with the expected verdict: no error while the word keeps
// the count it had when the reference was stored, an error otherwise.
//
// Errors are produced in two ways. Fault injection: the register's
// output lines into the check symbol generator are overridden with force - a single bit flipped,
// or several 1s turned into 0s (a unidirectional error) - and the error
// output must rise. Reload without a new reference: a new word with a
// different number of 1s is shifted in, which the checker must also flag.
//
// Counted mechanisms (each must occur at least once): clear, serial load,
// rotate right, rotate left, reference store, checker answer 01, checker
// answer 10, error on an injected fault, error after a reload. A watchdog
// ends a hung run with a failure.
module tb_sc_rotator;
  localparam int unsigned W  = 4;
  localparam int unsigned CW = 3;

  logic          clk = 1'b0;
  logic          rl, rr, din, sel1, sel2;
  logic [W-1:0]  q;
  logic [CW-1:0] csb, ref_csb;
  logic          f, g, error;

  sc_rotator dut (
    .clk(clk), .rl(rl), .rr(rr), .din(din), .sel1(sel1), .sel2(sel2),
    .q(q), .csb(csb), .ref_csb(ref_csb), .f(f), .g(g), .error(error)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clear = 0, n_load = 0, n_rotr = 0, n_rotl = 0, n_store = 0;
  int n_ans01 = 0, n_ans10 = 0, n_fault_err = 0, n_reload_err = 0;

  logic [W-1:0] model;       // expected register word
  int           ref_ones;    // number of ones when the reference was stored
  bit           ref_valid;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(logic [W-1:0] v);
    int c = 0;
    for (int i = 0; i < W; i++) if (v[i]) c++;
    return c;
  endfunction

  // Model of one register operation; index 0 is Q1, the din end.
  function automatic logic [W-1:0] step(logic [W-1:0] cur, logic [1:0] op, logic d);
    logic [W-1:0] nx;
    case (op)
      2'b00: nx = '0;
      2'b01: for (int i = 0; i < W; i++) nx[i] = cur[(i + W - 1) % W];
      2'b10: for (int i = 0; i < W; i++) nx[i] = cur[(i + 1) % W];
      default: begin
        nx[0] = d;
        for (int i = 1; i < W; i++) nx[i] = cur[i-1];
      end
    endcase
    return nx;
  endfunction

  task automatic check(bit exp_error, string what);
    checks++;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, model);
    end
    checks++;
    if (int'(csb) != ones(q)) begin
      failures++;
      $display("FAIL %s: csb=%0d for q=%b", what, csb, q);
    end
    checks++;
    if (error !== exp_error || error !== (f == g)) begin
      failures++;
      $display("FAIL %s: error=%b f=%b g=%b expected error=%b", what, error, f, g, exp_error);
    end
    if (!error && {f, g} == 2'b01) n_ans01++;
    if (!error && {f, g} == 2'b10) n_ans10++;
  endtask

  // One clock with the given operation and select lines.
  task automatic cycle(logic [1:0] op, logic d, logic s);
    @(negedge clk);
    {rl, rr} = op;
    din  = d;
    sel1 = s;
    sel2 = s;
    @(posedge clk);
    if (s) begin
      ref_ones  = ones(model);   // symbol sampled before the edge
      ref_valid = 1'b1;
      n_store++;
    end
    model = step(model, op, d);
    case (op)
      2'b00: n_clear++;
      2'b01: n_rotr++;
      2'b10: n_rotl++;
      default: n_load++;
    endcase
    #1;
    if (ref_valid) check(ones(model) != ref_ones, $sformatf("op %b", op));
  endtask

  task automatic load_word(logic [W-1:0] w);
    // w[0] ends at Q1, so it is entered last.
    for (int n = W - 1; n >= 0; n--) cycle(2'b11, w[n], 1'b0);
  endtask

  // Override the register's output lines, as the check symbol generator
  // sees them, with a corrupted word for part of one cycle.
  task automatic inject(logic [W-1:0] bad, string what);
    @(negedge clk);
    force dut.u_csg.data = bad;
    #1;
    checks++;
    if (error !== 1'b1) begin
      failures++;
      $display("FAIL %s not detected: good=%b bad=%b f=%b g=%b", what, model, bad, f, g);
    end else begin
      n_fault_err++;
    end
    release dut.u_csg.data;
    // Start the next session from a cleared register.
    @(negedge clk);
    {rl, rr} = 2'b00;
    sel1 = 1'b0;
    sel2 = 1'b0;
    @(posedge clk);
    model = '0;
    n_clear++;
    #1;
  endtask

  initial begin
    logic [W-1:0] word, bad, word2;
    int           j;
    rl = 0; rr = 0; din = 0; sel1 = 0; sel2 = 0;
    model     = '0;
    ref_valid = 1'b0;

    for (int s = 0; s < 300; s++) begin
      // Procedure: clear, load, store the inverted symbol, rotate.
      ref_valid = 1'b0;
      cycle(2'b00, 1'b0, 1'b0);
      word = W'($urandom);
      load_word(word);
      checks++;
      if (q !== word) begin
        failures++;
        $display("FAIL session %0d: loaded %b, read %b", s, word, q);
      end
      cycle(1'($urandom_range(0, 1)) ? 2'b01 : 2'b10, 1'b0, 1'b1);
      repeat ($urandom_range(4, 12)) cycle(1'($urandom_range(0, 1)) ? 2'b01 : 2'b10, 1'b0, 1'b0);

      case (s % 3)
        0: begin  // single bit flip
          j   = $urandom_range(0, W - 1);
          bad = model ^ (W'(1) << j);
          inject(bad, "single bit flip");
        end
        1: begin  // unidirectional error: some 1s turn into 0s (or 0s into 1s)
          logic [W-1:0] mask;
          if (model != '0) begin
            do j = $urandom_range(0, W - 1); while (!model[j]);
            mask = (model & W'($urandom)) | (W'(1) << j);  // at least one set bit
            bad  = model & ~mask;
          end else begin
            bad = W'($urandom_range(1, (1 << W) - 1));
          end
          inject(bad, "unidirectional error");
        end
        default: begin  // reload without storing a new reference
          do word2 = W'($urandom); while (ones(word2) == ones(model));
          load_word(word2);
          checks++;
          if (error !== 1'b1) begin
            failures++;
            $display("FAIL reload of %b after reference for %0d ones not flagged", word2, ref_ones);
          end else begin
            n_reload_err++;
          end
        end
      endcase
    end

    $display("mechanisms: clear=%0d load=%0d rotr=%0d rotl=%0d store=%0d ans01=%0d ans10=%0d fault_err=%0d reload_err=%0d",
             n_clear, n_load, n_rotr, n_rotl, n_store, n_ans01, n_ans10, n_fault_err, n_reload_err);
    checks++;
    if (n_clear == 0 || n_load == 0 || n_rotr == 0 || n_rotl == 0 || n_store == 0 ||
        n_ans01 == 0 || n_ans10 == 0 || n_fault_err == 0 || n_reload_err == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
