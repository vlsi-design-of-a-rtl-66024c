// dct8_top: pipelined 8-point fixed-point DCT (ISO/IEC 23002-2 algorithm).
//
// Every clock the unit accepts one vector of eight signed W-bit samples
// (ind[0..7], one row or column of an 8x8 block) and, a fixed number of
// clocks later, delivers the eight transform coefficients outd[0..7] in
// natural order. There are no multipliers: the cosine factors are the
// shift-and-add PMUL products of dct_pmul. The datapath is
//
//   ind -> input registers -> dct_stage1 -> [pipeline registers] ->
//          dct_stage2 -> output registers -> outd
//
// With PIPELINED = 1 (the default, the pipelined architecture) twelve
// pipeline registers split the six-operator critical path of the data
// flow graph into 3 + 3 operators, and the latency from in_valid to
// out_valid is 3 clocks. With PIPELINED = 0 the two halves are joined
// directly (the non-pipelined base architecture) and the latency is 2
// clocks. Either way one vector, eight pixels, is accepted and delivered
// per clock, with no stalls; out_valid marks the clocks that carry a result.
// rst_n is synchronous and active low.
//
// The algorithm, the 32-bit word width, the input and output registers and
// the pipelining follow the published architecture; the cut position, the valid flag
// and the reset are this design's choices.
module dct8_top
  import dct_pkg::*;
#(
  parameter int unsigned W         = DCT_W,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] ind  [DCT_N],
  output logic                out_valid,
  output logic signed [W-1:0] outd [DCT_N]
);

  logic                in_q_valid;
  logic signed [W-1:0] in_q   [DCT_N];
  logic signed [W-1:0] cut_d  [CUT_N];
  logic                cut_q_valid;
  logic signed [W-1:0] cut_q  [CUT_N];
  logic signed [W-1:0] res    [DCT_N];

  // Input registers.
  dct_regbank #(.W(W), .N(DCT_N)) u_in_regs (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .d(ind),
    .out_valid(in_q_valid), .q(in_q)
  );

  dct_stage1 #(.W(W)) u_stage1 (.ind(in_q), .cut(cut_d));

  if (PIPELINED) begin : g_pipe
    // Pipeline registers on the cut between the two halves.
    dct_regbank #(.W(W), .N(CUT_N)) u_pipe_regs (
      .clk(clk), .rst_n(rst_n),
      .in_valid(in_q_valid), .d(cut_d),
      .out_valid(cut_q_valid), .q(cut_q)
    );
  end else begin : g_nopipe
    assign cut_q_valid = in_q_valid;
    assign cut_q       = cut_d;
  end

  dct_stage2 #(.W(W)) u_stage2 (.cut(cut_q), .outd(res));

  // Output registers.
  dct_regbank #(.W(W), .N(DCT_N)) u_out_regs (
    .clk(clk), .rst_n(rst_n),
    .in_valid(cut_q_valid), .d(res),
    .out_valid(out_valid), .q(outd)
  );

endmodule
