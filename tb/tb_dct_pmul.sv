// tb_dct_pmul: self-checking testbench for dct_pmul.
//
// One instance of each PMUL kind (1, 2, 3) is driven with the same input.
// Each product is compared bit-exactly with the step-by-step reference in
// tb_dct_ref_pkg and, for moderate inputs, with the real constant the product
// stands for (the shift truncations may cost at most 4 LSBs). Inputs include
// corner values (0, -1, extremes) and random full-range and pixel-range words.
module tb_dct_pmul;
  import tb_dct_ref_pkg::*;

  localparam int unsigned W = 32;
  // Real gains of pmul_k_1 and pmul_k_2 (exact for the shift pattern).
  localparam real G [3][2] = '{'{0.8671875, 0.17578125},
                               '{0.74853515625, 0.5},
                               '{0.3203125, 0.7734375}};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] x;
  logic signed [W-1:0] p1 [3];
  logic signed [W-1:0] p2 [3];

  dct_pmul #(.W(W), .KIND(dct_pkg::PMUL_1)) u_k1 (.x(x), .p1(p1[0]), .p2(p2[0]));
  dct_pmul #(.W(W), .KIND(dct_pkg::PMUL_2)) u_k2 (.x(x), .p1(p1[1]), .p2(p2[1]));
  dct_pmul #(.W(W), .KIND(dct_pkg::PMUL_3)) u_k3 (.x(x), .p1(p1[2]), .p2(p2[2]));

  int checks = 0;
  int failures = 0;

  task automatic check_one(input int v);
    int  got, exp;
    real err;
    x = v;
    #1;
    for (int k = 0; k < 3; k++) begin
      for (int s = 0; s < 2; s++) begin
        got = (s == 0) ? p1[k] : p2[k];
        exp = pmul_ref(k + 1, s + 1, v);
        checks++;
        if (got !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL pmul_%0d_%0d(%0d) = %0d, expected %0d", k + 1, s + 1, v, got, exp);
        end
        if (v > -(1 << 20) && v < (1 << 20)) begin
          err = real'(got) - G[k][s] * real'(v);
          checks++;
          if (err > 4.0 || err < -4.0) begin
            failures++;
            if (failures < 10)
              $display("FAIL pmul_%0d_%0d(%0d) = %0d, gain error %f", k + 1, s + 1, v, got, err);
          end
        end
      end
    end
  endtask

  int corner [6] = '{0, 1, -1, 255, 32'sh7fffffff, 32'sh80000000};

  initial begin
    foreach (corner[i]) check_one(corner[i]);
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      check_one(rand_sample());
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
