// tb_dct_stage1: self-checking testbench for dct_stage1.
//
// Drives random input vectors (pixel-range and full-range words, plus an
// all-zero and an extreme vector) into the first half of the data flow graph
// and compares all twelve words of the cut bundle with tb_dct_ref_pkg's
// cut_ref(), which works them out from the inputs step by step.
module tb_dct_stage1;
  import tb_dct_ref_pkg::*;

  localparam int unsigned W = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [W-1:0] ind [8];
  logic signed [W-1:0] cut [12];

  dct_stage1 #(.W(W)) dut (.ind(ind), .cut(cut));

  int checks = 0;
  int failures = 0;

  task automatic check_vec(input vec8_t v);
    cut_t exp;
    for (int i = 0; i < 8; i++) ind[i] = v[i];
    #1;
    exp = cut_ref(v);
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (cut[i] !== exp[i]) begin
        failures++;
        if (failures < 10) $display("FAIL cut[%0d] = %0d, expected %0d", i, cut[i], exp[i]);
      end
    end
  endtask

  vec8_t v;

  initial begin
    v = '{default: 0};
    check_vec(v);
    v = '{32'sh7fffffff, 32'sh80000000, 32'sh7fffffff, 32'sh80000000,
          -1, 1, 32'sh40000000, -32'sh40000000};
    check_vec(v);
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      foreach (v[i]) v[i] = rand_sample();
      check_vec(v);
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
