// tb_dct_stage2: self-checking testbench for dct_stage2.
//
// For random input vectors the cut bundle is built by the reference
// (cut_ref) and fed to the second half of the data flow graph; its eight
// outputs must equal the complete step-by-step reference transform dct_ref().
// A second series feeds fully random cut words and checks each output
// against its closed-form combination of cut words and PMUL_3 products.
module tb_dct_stage2;
  import tb_dct_ref_pkg::*;

  localparam int unsigned W = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] cut  [12];
  logic signed [W-1:0] outd [8];

  dct_stage2 #(.W(W)) dut (.cut(cut), .outd(outd));

  int checks = 0;
  int failures = 0;

  task automatic compare(input vec8_t exp);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (outd[i] !== exp[i]) begin
        failures++;
        if (failures < 10) $display("FAIL outd[%0d] = %0d, expected %0d", i, outd[i], exp[i]);
      end
    end
  endtask

  vec8_t v, e;
  cut_t  c;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      foreach (v[i]) v[i] = rand_sample();
      c = cut_ref(v);
      for (int i = 0; i < 12; i++) cut[i] = c[i];
      #1;
      compare(dct_ref(v));
    end
    for (int n = 0; n < 500; n++) begin
      @(posedge clk);
      foreach (c[i]) c[i] = int'($urandom());
      for (int i = 0; i < 12; i++) cut[i] = c[i];
      #1;
      // c: 0 x0, 1 x4, 2 x2, 3 x6, 4 p11_3, 5 p12_3, 6 p11_5, 7 p12_5,
      //    8 p21_1, 9 p22_1, 10 p21_7, 11 p22_7
      e[0] = c[0];
      e[4] = c[1];
      e[1] = (c[8] - c[11] + c[4] + c[7]) + (c[10] + c[9] + c[6] - c[5]);
      e[7] = (c[8] - c[11] + c[4] + c[7]) - (c[10] + c[9] + c[6] - c[5]);
      e[3] = (c[8] - c[11]) - (c[4] + c[7]);
      e[5] = (c[10] + c[9]) - (c[6] - c[5]);
      e[2] = pmul_ref(3, 2, c[3]) + pmul_ref(3, 1, c[2]);
      e[6] = pmul_ref(3, 1, c[3]) - pmul_ref(3, 2, c[2]);
      compare(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
