// tb_csd_precompute: checks every shift-and-add product of the precomputing
// unit against a plain multiplication by the 8-bit cosine basis, for every
// 9-bit signed input.
module tb_csd_precompute;
  logic signed [8:0]  x;
  logic signed [15:0] prod [7];
  int checks = 0, failures = 0;
  int basis [7] = '{63, 59, 53, 45, 36, 24, 12};

  csd_precompute #(.IN_W(9)) dut (.x, .prod);

  initial begin
    for (int v = -256; v < 256; v++) begin
      x = 9'(v);
      #1;
      for (int k = 0; k < 7; k++) begin
        checks++;
        if (int'(prod[k]) != v * basis[k]) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d k=%0d got %0d exp %0d", v, k, prod[k], v*basis[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
