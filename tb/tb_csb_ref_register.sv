// tb_csb_ref_register: self-checking testbench for csb_ref_register.
//
// Drives random check symbols and random select lines for 500 clocks and
// checks that the register takes in the complement of k exactly when sel1
// and sel2 are both high at a rising edge, and keeps its value otherwise.
// The first cycle forces a load so that the expected value is known.
// Inputs change on the falling edge. A watchdog ends a hung run.
module tb_csb_ref_register;
  logic       clk = 1'b0;
  logic       sel1, sel2;
  logic [2:0] k, ref_csb, expected;
  int checks = 0, failures = 0;
  int loads = 0, holds = 0;

  csb_ref_register #(.CW(3)) dut (.clk(clk), .sel1(sel1), .sel2(sel2), .k(k), .ref_csb(ref_csb));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      k    = 3'($urandom);
      sel1 = (n == 0) ? 1'b1 : 1'($urandom);
      sel2 = (n == 0) ? 1'b1 : 1'($urandom);
      @(posedge clk);
      if (sel1 && sel2) begin
        expected = 3'b111 ^ k;
        loads++;
      end else begin
        holds++;
      end
      #1;
      if (n > 0 || (sel1 && sel2)) begin
        checks++;
        if (ref_csb !== expected) begin
          failures++;
          $display("FAIL n=%0d sel1=%b sel2=%b k=%b ref=%b expected=%b",
                   n, sel1, sel2, k, ref_csb, expected);
        end
      end
    end
    checks++;
    if (loads == 0 || holds == 0) begin
      failures++;
      $display("FAIL loads=%0d holds=%0d: both must occur", loads, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
