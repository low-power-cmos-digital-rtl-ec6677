// tb_corr_multiplier: exhaustive check of the 16 entries of the biased 2-bit
// product table against products computed from the digitizer weights.
module tb_corr_multiplier;
  import ac_pkg::*;
  import tb_ref_pkg::*;

  sample_t d, u;
  prod_t   p;
  int checks = 0, failures = 0;

  corr_multiplier dut (.d, .u, .p);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      d = sample_t'(i[3:2]);
      u = sample_t'(i[1:0]);
      #1;
      checks++;
      if (int'(p) != ref_product(d, u)) begin
        failures++;
        $display("FAIL d=%b u=%b p=%0d exp=%0d", d, u, p, ref_product(d, u));
      end
    end
    // spot values straight from the table: 11x11=6, 11x01=0, 10x10=3, 00x01=4
    d = 2'b11; u = 2'b11; #1; checks++; if (p != 6) failures++;
    d = 2'b11; u = 2'b01; #1; checks++; if (p != 0) failures++;
    d = 2'b10; u = 2'b10; #1; checks++; if (p != 3) failures++;
    d = 2'b00; u = 2'b01; #1; checks++; if (p != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
