// tb_pla_xor_outputs -- exhaustive check of a 4-output XOR stage: every
// output must be the exclusive OR of its two OR lines.
module tb_pla_xor_outputs;
  localparam int unsigned NO = 4;
  logic [2*NO-1:0] line;
  logic [NO-1:0]   out;
  int unsigned checks, failures;

  pla_xor_outputs #(.N_OUT(NO)) dut (.line(line), .out(out));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    for (int n = 0; n < 256; n++) begin
      line = 8'(n);
      #1;
      for (int q = 0; q < NO; q++) begin
        checks++;
        if (out[q] !== (line[2*q] != line[2*q+1])) begin
          failures++;
          $display("FAIL lines %b out %0d = %0d", line, q, out[q]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
