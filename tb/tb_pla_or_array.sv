// tb_pla_or_array -- checks the OR array with 8 product terms and 5 lines
// (one of them selecting no term) against the OR of the selected terms, for
// all 256 product-term patterns.
module tb_pla_or_array;
  localparam int unsigned NT = 8;
  localparam int unsigned NL = 5;
  localparam logic [NL-1:0][NT-1:0] PLANE =
    {8'b0000_0000, 8'b1000_0001, 8'b0110_0000, 8'b0000_1111, 8'b0001_0000};

  logic [NT-1:0] pt;
  logic [NL-1:0] line;
  int unsigned checks, failures;

  pla_or_array #(.N_PT(NT), .N_LINE(NL), .PERSONALITY(PLANE)) dut (.pt(pt), .line(line));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_v;
    checks = 0; failures = 0;
    for (int n = 0; n < 256; n++) begin
      pt = 8'(n);
      #1;
      for (int o = 0; o < NL; o++) begin
        expect_v = 1'b0;
        for (int t = 0; t < NT; t++) expect_v = expect_v | (pt[t] & PLANE[o][t]);
        checks++;
        if (line[o] !== expect_v) begin
          failures++;
          $display("FAIL terms %b line %0d = %0d", pt, o, line[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
