// tb_dct_regbank: self-checking testbench for dct_regbank.
//
// Checks that reset clears data and valid, that a word presented with
// in_valid appears on q (with out_valid) exactly one clock later, that q
// holds while in_valid is low (out_valid low), and that back-to-back words
// move through one per clock. A model register in the testbench predicts q.
module tb_dct_regbank;

  localparam int unsigned W = 32;
  localparam int unsigned N = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n;
  logic                in_valid;
  logic signed [W-1:0] d [N];
  logic                out_valid;
  logic signed [W-1:0] q [N];

  dct_regbank #(.W(W), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .d(d),
    .out_valid(out_valid), .q(q)
  );

  int checks = 0;
  int failures = 0;

  int  mq [N];
  bit  mv;

  task automatic compare();
    checks++;
    if (out_valid !== mv) begin
      failures++;
      if (failures < 10) $display("FAIL out_valid = %0b, expected %0b", out_valid, mv);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i] !== mq[i]) begin
        failures++;
        if (failures < 10) $display("FAIL q[%0d] = %0d, expected %0d", i, q[i], mq[i]);
      end
    end
  endtask

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b1;
    for (int i = 0; i < N; i++) d[i] = int'($urandom());
    repeat (2) @(posedge clk);
    #1;
    mv = 1'b0;
    mq = '{default: 0};
    compare();
    for (int n = 0; n < 3000; n++) begin
      // Drive the next cycle's inputs, then predict the register.
      rst_n    = (n % 701) != 700;
      in_valid = (n < 200) ? 1'b1 : ($urandom_range(0, 2) != 0);
      for (int i = 0; i < N; i++) d[i] = int'($urandom());
      @(posedge clk);
      if (!rst_n) begin
        mv = 1'b0;
        mq = '{default: 0};
      end else begin
        mv = in_valid;
        if (in_valid) for (int i = 0; i < N; i++) mq[i] = d[i];
      end
      #1;
      compare();
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
