// tb_digitizer_2bit: random voltages and thresholds; the sampled {sign, mag}
// one clock later must match the comparator rules, and all four codes must
// occur.
module tb_digitizer_2bit;
  import ac_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [11:0] v_in, vth_pos, vth_neg, vt0;
  sample_t q;
  logic [1:0] exp;
  int seen [4];
  int checks = 0, failures = 0;

  digitizer_2bit dut (.clk, .rst_n, .v_in, .vth_pos, .vth_neg, .vt0, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v_in = 0; vth_pos = 300; vth_neg = -300; vt0 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      if (c % 1000 == 0 && c > 0) begin
        vth_pos = 12'($urandom_range(800));
        vth_neg = -vth_pos;
        vt0 = 12'(int'($urandom_range(40)) - 20);
      end
      v_in = 12'(int'($urandom_range(4000)) - 2000);
      exp = ref_digitize(int'(v_in), int'(vth_pos), int'(vth_neg), int'(vt0));
      @(negedge clk);
      checks++;
      if (q !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL v=%0d q=%b exp=%b", v_in, q, exp);
      end
      seen[exp]++;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (seen[i] == 0) begin failures++; $display("FAIL code %b never seen", i[1:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
