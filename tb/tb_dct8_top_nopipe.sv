// tb_dct8_top_nopipe: end-to-end testbench for dct8_top built without the
// pipeline registers (PIPELINED = 0, the non-pipelined base architecture).
//
// Same workload and checks as tb_dct8_top: one synthetic 176x144 frame is
// transformed as 8x8 blocks by the row-column method through the 1-D unit,
// every result is compared bit-exactly with dct_ref(), all coefficients of
// the row pass are compared with the real-valued DCT, and each result must
// appear exactly LATENCY = 2 clocks after its input, one result per clock
// while streaming. Pipeline fill, a full pipeline (two vectors in flight),
// streaming, bubbles and a reset flush must each be seen.
module tb_dct8_top_nopipe;
  import tb_dct_ref_pkg::*;

  localparam int unsigned W       = 32;
  localparam int unsigned LATENCY = 2;
  localparam int unsigned FW      = 176;
  localparam int unsigned FH      = 144;
  localparam int unsigned NBLK    = (FW / 8) * (FH / 8);
  localparam longint      PASS_MAX = longint'(NBLK) * 8 + longint'(LATENCY) + 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n;
  logic                in_valid;
  logic signed [W-1:0] ind  [8];
  logic                out_valid;
  logic signed [W-1:0] outd [8];

  dct8_top #(.PIPELINED(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .ind(ind),
    .out_valid(out_valid), .outd(outd)
  );

  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int n_fill = 0, n_full = 0, n_stream = 0, n_bubble = 0, n_flush = 0;

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected results in flight.
  typedef struct {
    vec8_t  exp;
    longint t_in;
  } pend_t;
  pend_t pend [$];

  vec8_t got_q [$];      // results collected for the transpose
  bit    collect = 1'b0;
  int    streak  = 0;    // consecutive clocks with out_valid

  // Output monitor: sampled just after each rising edge.
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      vec8_t g;
      pend_t p;
      for (int i = 0; i < 8; i++) g[i] = outd[i];
      checks++;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        p = pend.pop_front();
        checks++;
        if (cycle - p.t_in != longint'(LATENCY)) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d, expected %0d", cycle - p.t_in, LATENCY);
        end
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (g[i] !== p.exp[i]) begin
            failures++;
            if (failures < 10) $display("FAIL outd[%0d] = %0d, expected %0d", i, g[i], p.exp[i]);
          end
        end
      end
      if (collect) got_q.push_back(g);
      streak++;
      if (streak >= 2) n_stream++;
    end else begin
      streak = 0;
    end
  end

  // Present one vector on the next clock edge.
  task automatic send(input vec8_t v);
    pend_t p;
    bit was_empty;
    was_empty = (pend.size() == 0);
    for (int i = 0; i < 8; i++) ind[i] = v[i];
    in_valid = 1'b1;
    @(posedge clk);
    p.exp  = dct_ref(v);
    p.t_in = cycle;
    pend.push_back(p);
    if (was_empty) n_fill++;
    if (pend.size() >= LATENCY) n_full++;
    #1;
    in_valid = 1'b0;
  endtask

  task automatic idle(input int n);
    in_valid = 1'b0;
    repeat (n) begin
      @(posedge clk);
      #1;
    end
    if (n > 0) n_bubble++;
  endtask

  task automatic drain();
    int guard = 0;
    while (pend.size() != 0 && guard < 20) begin
      @(posedge clk);
      #2;
      guard++;
    end
  endtask

  function automatic int pixel(input int x, input int y);
    return (x * 3 + y * 5 + ((x * y) >> 3) + ((x ^ y) & 15)) & 255;
  endfunction

  // Real-valued check of one row: coefficient k must equal GAIN[k] times
  // the orthonormal DCT coefficient, within the error of the shift-and-add
  // constants (at most 1.1% of the summed input magnitude) plus rounding.
  localparam real GAIN [8] = '{2.82843, 2.52435, 1.67428, 1.78499,
                               2.82843, 1.78499, 1.67428, 2.52435};
  localparam real PI = 3.14159265358979;

  task automatic check_real(input vec8_t v, input vec8_t g);
    real acc, tol, mag, err;
    mag = 0.0;
    for (int n = 0; n < 8; n++) mag += (v[n] < 0) ? -real'(v[n]) : real'(v[n]);
    tol = 8.0 + 0.011 * mag;
    for (int k = 0; k < 8; k++) begin
      acc = 0.0;
      for (int n = 0; n < 8; n++)
        acc += real'(v[n]) * $cos(real'((2 * n + 1) * k) * PI / 16.0);
      acc = acc * ((k == 0) ? $sqrt(1.0 / 8.0) : 0.5) * GAIN[k];
      err = real'(g[k]) - acc;
      checks++;
      if (err > tol || err < -tol) begin
        failures++;
        if (failures < 10) $display("FAIL coefficient %0d = %0d, real-valued %f", k, g[k], acc);
      end
    end
  endtask

  vec8_t rows [NBLK * 8];
  vec8_t cols [NBLK * 8];
  vec8_t v;
  longint t0;

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < 8; i++) ind[i] = '0;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1'b1;
    @(posedge clk);
    #1;

    // Single vectors with gaps: pipeline fill and bubbles.
    for (int n = 0; n < 20; n++) begin
      foreach (v[i]) v[i] = rand_sample();
      send(v);
      idle($urandom_range(0, 4));
    end
    drain();

    // Reset while vectors are in flight: they must be discarded.
    for (int n = 0; n < 2; n++) begin
      foreach (v[i]) v[i] = rand_sample();
      send(v);
    end
    rst_n = 1'b0;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    pend.delete();
    n_flush++;
    repeat (LATENCY + 2) begin
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL output after reset flush");
      end
    end

    // Pass 1: all rows of the frame, back to back.
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          rows[b * 8 + r][c] = pixel((b % (FW / 8)) * 8 + c, (b / (FW / 8)) * 8 + r);
    collect = 1'b1;
    got_q.delete();
    t0 = cycle;
    for (int k = 0; k < NBLK * 8; k++) send(rows[k]);
    drain();
    checks++;
    if (cycle - t0 > PASS_MAX) begin
      failures++;
      $display("FAIL pass 1 took %0d clocks for %0d vectors", cycle - t0, NBLK * 8);
    end
    checks++;
    if (got_q.size() != NBLK * 8) begin
      failures++;
      $display("FAIL pass 1 produced %0d vectors", got_q.size());
    end else begin
      for (int k = 0; k < NBLK * 8; k++) check_real(rows[k], got_q[k]);
    end

    // Transpose each 8x8 block and run pass 2 on its columns.
    if (got_q.size() == NBLK * 8)
      for (int b = 0; b < NBLK; b++)
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++)
            cols[b * 8 + c][r] = got_q[b * 8 + r][c];
    got_q.delete();
    for (int k = 0; k < NBLK * 8; k++) send(cols[k]);
    drain();
    checks++;
    if (got_q.size() != NBLK * 8) begin
      failures++;
      $display("FAIL pass 2 produced %0d vectors", got_q.size());
    end
    collect = 1'b0;

    $display("blocks=%0d fill=%0d full=%0d stream=%0d bubble=%0d flush=%0d",
             NBLK, n_fill, n_full, n_stream, n_bubble, n_flush);
    checks += 5;
    if (n_fill   == 0) begin failures++; $display("FAIL pipeline fill never seen"); end
    if (n_full   == 0) begin failures++; $display("FAIL full pipeline never seen"); end
    if (n_stream == 0) begin failures++; $display("FAIL streaming never seen"); end
    if (n_bubble == 0) begin failures++; $display("FAIL bubble never seen"); end
    if (n_flush  == 0) begin failures++; $display("FAIL reset flush never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
