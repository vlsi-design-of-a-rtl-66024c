// dct_regbank: bank of N registers of W bits with a valid flag.
//
// Used three times in the DCT: as the input registers (ind0..ind7), as the
// pipeline registers on the cut between the two halves of the data flow
// graph, and as the output registers (outd0..outd7). On a rising clock edge
// with in_valid high every word of d is captured into q and out_valid goes
// high; with in_valid low q holds its contents and out_valid goes low, so a
// word moves one stage per clock and a bubble travels with its valid flag.
// rst_n is synchronous and active low; it clears q and out_valid.
// That the datapath is cut by registers follows the published architecture; the valid
// flag, the hold on invalid cycles and the reset are this design's choices.
module dct_regbank #(
  parameter int unsigned W = 32,
  parameter int unsigned N = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] d [N],
  output logic                out_valid,
  output logic signed [W-1:0] q [N]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < N; i++) q[i] <= d[i];
      end
    end
  end

endmodule
