// tb_berger_csg: exhaustive self-checking testbench for berger_csg.
//
// Applies every 4-bit word and compares the check symbol with the number of
// ones counted bit by bit in the testbench (0,1,1,2,1,2,2,3,1,2,2,3,2,3,3,4
// for 0..15). A second instance at WIDTH = 8 (4-bit symbol) is checked
// exhaustively as well. Combinational: values are compared 1 time unit
// after they are applied. A watchdog guards against a hang.
module tb_berger_csg;
  logic [3:0] d4;
  logic [2:0] k4;
  logic [7:0] d8;
  logic [3:0] k8;
  int checks = 0, failures = 0;

  berger_csg #(.WIDTH(4)) dut4 (.data(d4), .k(k4));
  berger_csg #(.WIDTH(8)) dut8 (.data(d8), .k(k8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(int unsigned v, int unsigned n);
    int c = 0;
    for (int i = 0; i < n; i++) if (v[i]) c++;
    return c;
  endfunction

  initial begin
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v);
      #1;
      checks++;
      if (int'(k4) != ones(v, 4)) begin
        failures++;
        $display("FAIL W=4 data=%b k=%0d expected=%0d", d4, k4, ones(v, 4));
      end
    end
    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v);
      #1;
      checks++;
      if (int'(k8) != ones(v, 8)) begin
        failures++;
        $display("FAIL W=8 data=%b k=%0d expected=%0d", d8, k8, ones(v, 8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
