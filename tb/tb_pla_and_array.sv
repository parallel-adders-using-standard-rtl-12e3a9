// tb_pla_and_array -- checks the AND array with 3 decoders and 16 product
// terms. Term t uses cell t on decoder 0 (all 16 functions of a pair), a
// half-sum cell or a don't care on decoder 1 and a generate cell or a don't
// care on decoder 2. For every one of the 64 input combinations the
// decoder lines are formed one-hot and each term is compared with the
// product of the cell bits selected by the three input pairs.
module tb_pla_and_array;
  localparam int unsigned ND = 3;
  localparam int unsigned NT = 16;

  function automatic logic [NT-1:0][ND-1:0][3:0] make_plane();
    logic [NT-1:0][ND-1:0][3:0] p;
    for (int t = 0; t < NT; t++) begin
      p[t][0] = 4'(t);
      p[t][1] = (t % 2 == 1) ? 4'b0110 : 4'b1111;
      p[t][2] = (t % 4 >= 2) ? 4'b1000 : 4'b1111;
    end
    return p;
  endfunction

  localparam logic [NT-1:0][ND-1:0][3:0] PLANE = make_plane();

  logic [ND-1:0][3:0] dec;
  logic [NT-1:0]      pt;
  int unsigned checks, failures;

  pla_and_array #(.N_DEC(ND), .N_PT(NT), .PERSONALITY(PLANE)) dut (.dec(dec), .pt(pt));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] v;
    logic       expect_v;
    checks = 0; failures = 0;
    for (int n = 0; n < 64; n++) begin
      v = 6'(n);
      for (int k = 0; k < ND; k++) dec[k] = 4'(1) << v[2*k +: 2];
      #1;
      for (int t = 0; t < NT; t++) begin
        expect_v = 1'b1;
        for (int k = 0; k < ND; k++) expect_v = expect_v & PLANE[t][k][v[2*k +: 2]];
        checks++;
        if (pt[t] !== expect_v) begin
          failures++;
          $display("FAIL inputs %b term %0d = %0d", v, t, pt[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
