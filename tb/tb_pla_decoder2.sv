// tb_pla_decoder2 -- exhaustive check of the 2-input decoder: for every
// input pair exactly one of the four lines is high, the one numbered {a,b}.
module tb_pla_decoder2;
  logic       a, b;
  logic [3:0] minterm;
  int unsigned checks, failures;

  pla_decoder2 dut (.a(a), .b(b), .minterm(minterm));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      for (int m = 0; m < 4; m++) begin
        checks++;
        if (minterm[m] !== (m == v)) begin
          failures++;
          $display("FAIL a=%0d b=%0d line %0d = %0d", a, b, m, minterm[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
